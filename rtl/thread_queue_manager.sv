// thread_queue_manager: the hardware thread-queue manager, a bus slave that
// keeps the stack pointers of the ready user threads on chip so that a
// context switch does not have to fetch them from off-chip memory.
//
// It is the controller (tqm_controller) and the register file (tqm_regfile,
// Reg0 .. Reg(DEPTH-1)) joined together. A processor that creates or yields a
// thread writes the thread's stack pointer to the QUEUE register; a processor
// that is idle or switches threads reads the QUEUE register and gets the
// stack pointer of the next thread, first in first out, or 0 when no thread
// is queued. See tqm_controller for the register map and the full/empty
// rules.
//
// Timing: single-cycle bus slave (ready together with sel).
//
// The split into controller and register file follows the original
// architecture; the depth of 32 is this design's choice (enough for the 26
// actor threads of the data-flow encoder the system was evaluated with).
module thread_queue_manager
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
  output logic [IW-1:0] q_head,
  output logic [IW-1:0] q_tail,
  output logic [CW-1:0] count,
  output logic          overflow,
  output logic          empty_read
);

  logic          rf_we;
  logic [IW-1:0] rf_waddr, rf_raddr;
  logic [DW-1:0] rf_wdata, rf_rdata;

  tqm_controller #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .s_req, .s_rsp,
    .rf_we, .rf_waddr, .rf_wdata, .rf_raddr, .rf_rdata,
    .q_head, .q_tail, .count, .overflow, .empty_read
  );

  tqm_regfile #(.DEPTH(DEPTH), .W(DW)) u_rf (
    .clk, .rst_n,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr(rf_raddr), .rdata(rf_rdata)
  );

endmodule
