// memory_interface: the bridge between the central bus and the off-chip main
// memory.
//
// A bus transaction addressed to main memory is registered and turned into a
// request on the off-chip port: ext_req rises with the address, direction and
// write data and stays up until the memory returns a one-cycle ext_ack (with
// ext_rdata for a read). The read data is captured, and in the following
// cycle the interface answers the bus with `ready`. Long off-chip latencies
// therefore hold the single shared bus, which is the cost the thread-queue
// manager avoids for stack-pointer accesses.
//
// Timing: bus transaction = 1 cycle to launch + memory latency (cycles until
// ext_ack) + 1 cycle to answer. Word accesses only.
//
// Off-chip main memory behind a memory interface follows the original
// architecture; the handshake, the registering and the FSM are this design's
// choices.
module memory_interface
  import mp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  slv_req_t s_req,
  output slv_rsp_t s_rsp,
  // off-chip memory port
  output logic     ext_req,
  output logic     ext_we,
  output addr_t    ext_addr,
  output data_t    ext_wdata,
  input  logic     ext_ack,
  input  data_t    ext_rdata
);

  typedef enum logic [1:0] {IDLE, ACCESS, DONE} state_e;

  state_e state;
  data_t  rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      ext_req   <= 1'b0;
      ext_we    <= 1'b0;
      ext_addr  <= '0;
      ext_wdata <= '0;
      rdata_q   <= '0;
    end else begin
      unique case (state)
        IDLE: if (s_req.sel) begin
          ext_req   <= 1'b1;
          ext_we    <= s_req.we;
          ext_addr  <= s_req.addr;
          ext_wdata <= s_req.wdata;
          state     <= ACCESS;
        end
        ACCESS: if (ext_ack) begin
          ext_req <= 1'b0;
          rdata_q <= ext_we ? '0 : ext_rdata;
          state   <= DONE;
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign s_rsp.ready = (state == DONE);
  assign s_rsp.rdata = rdata_q;

  // the bus must keep the transaction up until it is answered
  a_sel_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state != IDLE) |-> s_req.sel);

endmodule
