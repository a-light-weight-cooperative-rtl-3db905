// central_bus: the shared master/slave bus that joins the processors to the
// thread-queue manager, the test-and-set lock and the memory interface.
//
// It carries one transaction at a time. When the bus is idle, a round-robin
// arbiter picks one of the requesting masters; the winner owns the bus until
// the addressed slave answers `ready`, which is passed back to that master as
// a one-cycle `ack` with the read data. The owner's request is steered to the
// slave chosen by mp_pkg::decode(addr); an address in the peripheral window
// that maps to no slave is answered by the bus itself with rdata = 0.
//
// Timing: one arbitration cycle, then the slave's latency (a single-cycle
// slave gives a 2-cycle transaction); the bus returns to idle for one cycle
// after every transaction. Masters must hold their request stable until ack.
//
// Outputs for observation: busy, owner, and `contention`, high in a cycle in
// which some master requests but is not being served.
//
// One-transaction-at-a-time master/slave operation follows the original
// architecture; the round-robin policy, the handshake and the timing are this
// design's choices.
module central_bus
  import mp_pkg::*;
#(
  parameter int unsigned NM  = 4,
  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // masters
  input  bus_req_t      m_req [NM],
  output bus_rsp_t      m_rsp [NM],
  // slaves
  output slv_req_t      mem_req,
  input  slv_rsp_t      mem_rsp,
  output slv_req_t      lock_req,
  input  slv_rsp_t      lock_rsp,
  output slv_req_t      tqm_req,
  input  slv_rsp_t      tqm_rsp,
  // observation
  output logic          busy,
  output logic [IW-1:0] owner,
  output logic          contention
);

  logic [NM-1:0] request, grant;
  logic [IW-1:0] grant_idx;
  logic          start;
  bus_req_t      cur;
  slave_e        target;
  slv_req_t      fwd;
  slv_rsp_t      rsp;

  for (genvar i = 0; i < int'(NM); i++) begin : g_req
    assign request[i] = m_req[i].req;
  end

  assign start = !busy && (request != '0);

  rr_arbiter #(.N(NM)) u_arb (
    .clk, .rst_n, .request, .advance(start), .grant, .grant_idx
  );

  assign cur    = m_req[owner];
  assign target = decode(cur.addr);

  always_comb begin
    fwd.sel   = busy;
    fwd.we    = cur.we;
    fwd.addr  = cur.addr;
    fwd.wdata = cur.wdata;
    mem_req   = fwd;
    lock_req  = fwd;
    tqm_req   = fwd;
    mem_req.sel  = busy && (target == SLV_MEM);
    lock_req.sel = busy && (target == SLV_LOCK);
    tqm_req.sel  = busy && (target == SLV_TQM);
    unique case (target)
      SLV_MEM:  rsp = mem_rsp;
      SLV_LOCK: rsp = lock_rsp;
      SLV_TQM:  rsp = tqm_rsp;
      default:  rsp = '{ready: 1'b1, rdata: '0};
    endcase
    if (!busy) rsp.ready = 1'b0;
  end

  for (genvar i = 0; i < int'(NM); i++) begin : g_rsp
    assign m_rsp[i].ack   = rsp.ready && (owner == IW'(i));
    assign m_rsp[i].rdata = rsp.rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      owner <= grant_idx;
    end else if (busy && rsp.ready) begin
      busy  <= 1'b0;
    end
  end

  always_comb begin
    contention = 1'b0;
    for (int i = 0; i < int'(NM); i++)
      if (request[i] && !(busy && owner == IW'(i))) contention = 1'b1;
  end

  // Bus rules: the arbiter grants at most one master, one master is
  // acknowledged at a time, only the owner, and the
  // owner keeps its request up and unchanged until it is acknowledged.
  logic [NM-1:0] acks;
  for (genvar i = 0; i < int'(NM); i++) begin : g_ack
    assign acks[i] = m_rsp[i].ack;
  end
  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(acks));
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_owner_holds: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> cur.req);
  a_owner_stable: assert property (@(posedge clk) disable iff (!rst_n)
    busy && !rsp.ready |=> $stable(cur) && busy);

endmodule
