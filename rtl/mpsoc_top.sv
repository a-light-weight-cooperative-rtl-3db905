// mpsoc_top: the on-chip part of the shared-memory multi-processor.
//
// NUM_PROC processor bus ports share one central bus (central_bus) that
// carries one transaction at a time to one of three slaves:
//   - ts_lock              the hardware test-and-set lock (at LOCK_ADDR),
//   - thread_queue_manager the on-chip circular queue of stack pointers of
//                          the ready threads (at TQM_BASE),
//   - memory_interface     the bridge to the off-chip main memory (every
//                          address below PERIPH_BASE).
// The processor cores with their caches sit outside this module: each drives
// one proc_req port and receives one proc_rsp port (mp_pkg bus_req_t /
// bus_rsp_t, request held until a one-cycle ack). The off-chip memory is
// reached through the ext_* port (request held until a one-cycle ext_ack).
//
// Software builds everything else on these parts: spin locks (boot lock,
// thread-queue lock) live in main memory and are guarded by the hardware
// lock; a context switch writes the current thread's stack pointer to the
// queue manager and reads the next one from it.
//
// Timing: 2 cycles for a lock or queue access on an idle bus; 2 cycles plus
// the memory latency for a main-memory access.
//
// The set of blocks and how they are connected follow the original
// architecture; the bus protocol, address map, observation outputs and the
// queue depth are this design's choices.
module mpsoc_top
  import mp_pkg::*;
#(
  parameter int unsigned NUM_PROC  = 4,
  parameter int unsigned TQM_DEPTH = 32,
  localparam int unsigned PW = (NUM_PROC > 1) ? $clog2(NUM_PROC) : 1,
  localparam int unsigned QW = (TQM_DEPTH > 1) ? $clog2(TQM_DEPTH) : 1,
  localparam int unsigned CW = $clog2(TQM_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor ports
  input  bus_req_t      proc_req [NUM_PROC],
  output bus_rsp_t      proc_rsp [NUM_PROC],
  // off-chip main memory
  output logic          ext_req,
  output logic          ext_we,
  output addr_t         ext_addr,
  output data_t         ext_wdata,
  input  logic          ext_ack,
  input  data_t         ext_rdata,
  // observation
  output logic          bus_busy,
  output logic [PW-1:0] bus_owner,
  output logic          bus_contention,
  output logic          lock_state,
  output logic [QW-1:0] tqm_q_head,
  output logic [QW-1:0] tqm_q_tail,
  output logic [CW-1:0] tqm_count,
  output logic          tqm_overflow,
  output logic          tqm_empty_read
);

  slv_req_t mem_req, lock_req, tqm_req;
  slv_rsp_t mem_rsp, lock_rsp, tqm_rsp;

  central_bus #(.NM(NUM_PROC)) u_bus (
    .clk, .rst_n,
    .m_req(proc_req), .m_rsp(proc_rsp),
    .mem_req, .mem_rsp, .lock_req, .lock_rsp, .tqm_req, .tqm_rsp,
    .busy(bus_busy), .owner(bus_owner), .contention(bus_contention)
  );

  ts_lock u_lock (
    .clk, .rst_n, .s_req(lock_req), .s_rsp(lock_rsp), .locked(lock_state)
  );

  thread_queue_manager #(.DEPTH(TQM_DEPTH)) u_tqm (
    .clk, .rst_n, .s_req(tqm_req), .s_rsp(tqm_rsp),
    .q_head(tqm_q_head), .q_tail(tqm_q_tail), .count(tqm_count),
    .overflow(tqm_overflow), .empty_read(tqm_empty_read)
  );

  memory_interface u_memif (
    .clk, .rst_n, .s_req(mem_req), .s_rsp(mem_rsp),
    .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_ack, .ext_rdata
  );

endmodule
