// tb_tqm_regfile: self-checking test of the thread-queue register file.
// Checks the reset contents, then random writes and reads against an array
// model; the read port is combinational, the write takes effect at the edge.
module tb_tqm_regfile;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned W = 32;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic we;
  logic [IW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  tqm_regfile #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < int'(DEPTH); i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(DEPTH); i++) begin
      raddr = IW'(i); #1 check("reset contents", rdata, '0);
    end
    // fill every register with a distinct value, then read all back
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1; waddr = IW'(i); wdata = 32'h1000_0000 + 32'(i * 16);
      model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      raddr = IW'(i); #1 check("fill readback", rdata, model[i]);
    end
    // random traffic
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      raddr = IW'($urandom_range(DEPTH - 1));
      #1 check("random read", rdata, model[raddr]);
      we = 1'($urandom_range(1));
      waddr = IW'($urandom_range(DEPTH - 1));
      wdata = $urandom;
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
