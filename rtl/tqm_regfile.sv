// tqm_regfile: the register file of the thread-queue manager, Reg0 .. Reg(n)
// with n = DEPTH-1, each holding the stack pointer of one thread.
//
// One write port (written at the clock edge when we is high) and one
// combinational read port. The controller uses the write port at q_tail and
// the read port at q_head. All registers reset to zero.
//
// The register file and its role follow the original architecture; the
// depth, the port count and the reset are this design's choices.
module tqm_regfile #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [IW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [IW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
