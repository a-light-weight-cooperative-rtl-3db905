// tb_ts_lock: self-checking test of the hardware test-and-set lock.
// Drives single bus-slave transactions (tread = read, twrite = write) and
// compares the returned previous value and the lock bit with a one-bit
// reference model; idle cycles must leave the lock alone and ready must
// follow sel in the same cycle.
module tb_ts_lock;
  import mp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  logic locked;
  int checks = 0, failures = 0;
  logic model;

  ts_lock dut (.clk, .rst_n, .s_req, .s_rsp, .locked);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one bus transaction; returns rdata
  task automatic access(input logic we, input logic v, output logic [31:0] rd);
    @(negedge clk);
    s_req = '{sel: 1'b1, we: we, addr: LOCK_ADDR, wdata: {31'b0, v}};
    #1;
    check("ready with sel", 32'(s_rsp.ready), 32'd1);
    rd = s_rsp.rdata;
    @(posedge clk);
    #1;
    s_req.sel = 1'b0;
  endtask

  task automatic tread(input logic exp_prev);
    logic [31:0] rd;
    access(1'b0, 1'b0, rd);
    check("tread previous value", rd, {31'b0, exp_prev});
    model = 1'b1;
    check("lock set after tread", 32'(locked), 32'(model));
  endtask

  task automatic twrite(input logic v);
    logic [31:0] rd;
    access(1'b1, v, rd);
    model = v;
    check("lock after twrite", 32'(locked), 32'(model));
  endtask

  initial begin
    s_req = '0;
    model = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check("reset value free", 32'(locked), 32'd0);
    tread(1'b0);         // acquire: returns FALSE
    tread(1'b1);         // second competitor spins
    tread(1'b1);
    twrite(1'b0);        // release
    tread(1'b0);         // acquire again
    twrite(1'b0);
    twrite(1'b1);
    tread(1'b1);
    // idle cycles with other fields toggling must not change the lock
    twrite(1'b0);
    @(negedge clk);
    s_req = '{sel: 1'b0, we: 1'b0, addr: LOCK_ADDR, wdata: 32'h1};
    #1 check("no ready without sel", 32'(s_rsp.ready), 32'd0);
    repeat (3) @(posedge clk);
    #1 check("idle leaves lock", 32'(locked), 32'd0);
    // random sequence against the model
    for (int i = 0; i < 200; i++) begin
      logic prev;
      prev = model;
      if ($urandom_range(1) == 1) tread(prev);
      else twrite(1'($urandom_range(1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
