// ts_lock: the hardware test-and-set lock on the central bus.
//
// It holds one bit. A read, tread(), returns the previous value of the bit in
// rdata[0] and sets it to TRUE in the same bus cycle, so that exactly one of
// several competing processors reads FALSE. A write, twrite(V), stores
// wdata[0]; twrite(FALSE) releases the lock. Both operations are atomic
// because the central bus carries only one transaction at a time.
//
// Interface: slave port of the central bus (mp_pkg::slv_req_t / slv_rsp_t).
// Timing: ready in the same cycle as sel; the bit changes at the clock edge
// that ends the transaction. The lock resets to FALSE (free).
//
// The two operations follow the original architecture; the single-cycle
// answer, the bit position and the reset value are this design's choices.
module ts_lock
  import mp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  slv_req_t s_req,
  output slv_rsp_t s_rsp,
  output logic     locked      // current value of the lock bit
);

  logic lock_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              lock_q <= 1'b0;
    else if (s_req.sel) begin
      if (s_req.we)          lock_q <= s_req.wdata[0];   // twrite(V)
      else                   lock_q <= 1'b1;             // tread(): test and set
    end
  end

  always_comb begin
    s_rsp.ready = s_req.sel;
    s_rsp.rdata = '0;
    s_rsp.rdata[0] = lock_q;     // previous value
  end

  assign locked = lock_q;

endmodule
