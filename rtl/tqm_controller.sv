// tqm_controller: the controller of the thread-queue manager.
//
// It keeps the circular queue of stack pointers held in the register file:
// the indexes q_head (next SP to hand out) and q_tail (next free register),
// plus an entry count that tells a full queue from an empty one. It also
// speaks the central-bus slave protocol:
//   write QUEUE  : store wdata (the SP of a created or yielded thread) at
//                  q_tail and advance q_tail, wrapping from Reg(n) to Reg0;
//                  when the queue is full the SP is dropped and the sticky
//                  overflow flag is set
//   read  QUEUE  : return the SP at q_head and advance q_head; when the queue
//                  is empty it returns NULL_SP (0) and sets the sticky
//                  empty-read flag, so an idle processor learns that no
//                  thread is ready
//   read  STATUS : {overflow, empty_read, full, empty, 12'b0, count[15:0]}
//                  in bits 31, 30, 29, 28 and 15:0
//   write STATUS : clear the sticky flags
// Atomicity across processors is the software's job (the thread lock taken
// before the access); the bus guarantees one access at a time.
//
// Timing: ready in the same cycle as sel; the read data comes straight from
// the register file's read port and the indexes move at the closing edge.
//
// q_head/q_tail, the register file and the store/load role follow the
// original architecture; the register offsets, the count, the status word and
// the empty/full behaviour are this design's choices.
module tqm_controller
  import mp_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  slv_req_t      s_req,
  output slv_rsp_t      s_rsp,
  // register file port
  output logic          rf_we,
  output logic [IW-1:0] rf_waddr,
  output logic [DW-1:0] rf_wdata,
  output logic [IW-1:0] rf_raddr,
  input  logic [DW-1:0] rf_rdata,
  // state, for observation
  output logic [IW-1:0] q_head,
  output logic [IW-1:0] q_tail,
  output logic [CW-1:0] count,
  output logic          overflow,
  output logic          empty_read
);

  localparam logic [IW-1:0] LAST = IW'(DEPTH - 1);

  logic is_queue, is_status, push, pop, empty, full;

  assign is_queue  = s_req.sel && (s_req.addr[3:0] == TQM_QUEUE);
  assign is_status = s_req.sel && (s_req.addr[3:0] == TQM_STATUS);
  assign empty     = (count == '0);
  assign full      = (count == CW'(DEPTH));
  assign push      = is_queue &&  s_req.we && !full;
  assign pop       = is_queue && !s_req.we && !empty;

  function automatic logic [IW-1:0] next_idx(logic [IW-1:0] i);
    return (i == LAST) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_head     <= '0;
      q_tail     <= '0;
      count      <= '0;
      overflow   <= 1'b0;
      empty_read <= 1'b0;
    end else begin
      if (push) q_tail <= next_idx(q_tail);
      if (pop)  q_head <= next_idx(q_head);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
      if (is_status && s_req.we) begin
        overflow   <= 1'b0;
        empty_read <= 1'b0;
      end else begin
        if (is_queue &&  s_req.we && full)  overflow   <= 1'b1;
        if (is_queue && !s_req.we && empty) empty_read <= 1'b1;
      end
    end
  end

  assign rf_we    = push;
  assign rf_waddr = q_tail;
  assign rf_wdata = s_req.wdata;
  assign rf_raddr = q_head;

  always_comb begin
    s_rsp.ready = s_req.sel;
    s_rsp.rdata = '0;
    if (is_queue && !s_req.we) begin
      s_rsp.rdata = empty ? NULL_SP : rf_rdata;
    end else if (is_status && !s_req.we) begin
      s_rsp.rdata[31]   = overflow;
      s_rsp.rdata[30]   = empty_read;
      s_rsp.rdata[29]   = full;
      s_rsp.rdata[28]   = empty;
      s_rsp.rdata[15:0] = 16'(count);
    end
  end

endmodule
