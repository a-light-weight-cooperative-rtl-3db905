// tb_memory_interface: self-checking test of the bus-to-off-chip-memory
// bridge, with a behavioural memory of fixed latency behind it.
// Random reads and writes are held on the slave port until `ready`; the
// testbench checks read data against its own copy of the memory, that writes
// reach the memory, that ready comes exactly 1 + LATENCY + 1 cycles after
// sel rises and lasts one cycle, and that the off-chip request carries the
// bus transaction's fields.
module tb_memory_interface;
  import mp_pkg::*;
  localparam int unsigned WORDS = 256;
  localparam int unsigned LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  logic ext_req, ext_we, ext_ack;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  memory_interface dut (.*);
  main_memory_model #(.WORDS(WORDS), .LATENCY(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // off-chip request must mirror the bus transaction while it is up
  always @(negedge clk) if (rst_n && ext_req) begin
    check("ext_we", 32'(ext_we), 32'(s_req.we));
    check("ext_addr", ext_addr, s_req.addr);
    if (ext_we) check("ext_wdata", ext_wdata, s_req.wdata);
  end

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] wd,
                        output logic [31:0] rd);
    int cyc;
    s_req = '{sel: 1'b1, we: we, addr: a, wdata: wd};
    cyc = 0;
    forever begin
      @(negedge clk);
      if (s_rsp.ready) break;
      cyc++;
    end
    rd = s_rsp.rdata;
    check("latency", 32'(cyc), 32'(1 + LAT));
    @(posedge clk);
    #1 s_req.sel = 1'b0;
    @(negedge clk) check("ready is one cycle", 32'(s_rsp.ready), 32'd0);
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [31:0] rd;
    s_req = '0;
    for (int i = 0; i < int'(WORDS); i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk) #1;
    check("no ready when idle", 32'(s_rsp.ready), 32'd0);
    access(1'b1, 32'h40, 32'hCAFE_0001, rd);
    model[16] = 32'hCAFE_0001;
    check("write landed", u_mem.mem[16], 32'hCAFE_0001);
    access(1'b0, 32'h40, 32'h0, rd);
    check("read back", rd, 32'hCAFE_0001);
    for (int n = 0; n < 300; n++) begin
      logic we;
      logic [31:0] a, wd;
      we = 1'($urandom_range(1));
      a  = 32'($urandom_range(WORDS - 1)) << 2;
      wd = $urandom;
      access(we, a, wd, rd);
      if (we) begin
        model[a >> 2] = wd;
        check("random write landed", u_mem.mem[a >> 2], wd);
      end else check("random read", rd, model[a >> 2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
