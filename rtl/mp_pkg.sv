// mp_pkg: types and constants shared by the blocks of the four-processor
// shared-memory system (central bus, test-and-set lock, thread-queue manager,
// memory interface).
//
// A bus master drives a bus_req_t and receives a bus_rsp_t; a slave receives a
// slv_req_t and answers with a slv_rsp_t. A master holds `req` with stable
// fields until it sees `ack` for one cycle; a slave answers a cycle in which
// `sel` is high with `ready`, which ends the transaction.
//
// The address map, the register offsets and the 32-bit word size are this
// design's own choices; the four ARM masters and the three slaves are the
// system of the original architecture.
package mp_pkg;

  localparam int unsigned AW = 32;   // address width (32-bit ARM address space)
  localparam int unsigned DW = 32;   // data width (one ARM word)

  typedef logic [AW-1:0] addr_t;
  typedef logic [DW-1:0] data_t;

  // master side of the central bus
  typedef struct packed {
    logic  req;     // transaction requested, held until ack
    logic  we;      // 1 = write, 0 = read
    addr_t addr;    // byte address, word aligned
    data_t wdata;
  } bus_req_t;

  typedef struct packed {
    logic  ack;     // one-cycle pulse: transaction done, rdata valid
    data_t rdata;
  } bus_rsp_t;

  // slave side of the central bus
  typedef struct packed {
    logic  sel;     // this slave owns the current transaction
    logic  we;
    addr_t addr;
    data_t wdata;
  } slv_req_t;

  typedef struct packed {
    logic  ready;   // transaction completes at the end of this cycle
    data_t rdata;
  } slv_rsp_t;

  // Address map. Everything below PERIPH_BASE is off-chip main memory.
  localparam addr_t PERIPH_BASE = 32'hFFFF_0000;
  localparam addr_t LOCK_ADDR   = 32'hFFFF_0000;  // hardware test-and-set lock
  localparam addr_t TQM_BASE    = 32'hFFFF_1000;  // thread-queue manager

  // thread-queue manager register offsets (byte offsets from TQM_BASE)
  localparam logic [3:0] TQM_QUEUE  = 4'h0;  // write: push SP at q_tail, read: pop SP at q_head
  localparam logic [3:0] TQM_STATUS = 4'h4;  // read: status word, write: clear sticky flags

  // value a pop returns when the queue is empty (no thread ready)
  localparam data_t NULL_SP = '0;

  typedef enum logic [1:0] {
    SLV_MEM  = 2'd0,
    SLV_LOCK = 2'd1,
    SLV_TQM  = 2'd2,
    SLV_NONE = 2'd3   // unmapped peripheral address: answered by the bus with 0
  } slave_e;

  function automatic slave_e decode(addr_t a);
    if (a[AW-1:16] != PERIPH_BASE[AW-1:16]) return SLV_MEM;
    unique case (a[15:12])
      4'h0:    return SLV_LOCK;
      4'h1:    return SLV_TQM;
      default: return SLV_NONE;
    endcase
  endfunction

endpackage
