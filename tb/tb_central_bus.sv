// tb_central_bus: self-checking test of the central bus with four masters
// and three slave models (memory with a latency of 3 cycles, lock and thread
// queue answering in one cycle).
// Each slave model answers a read with a value derived from its own identity
// and the address, and remembers the last write it saw, so each master can
// check that its transaction reached the right slave with the right fields.
// Also checked: only one slave selected at a time, a 2-cycle transaction to a
// single-cycle slave on an idle bus, round-robin order when all four masters
// request back to back, the bus's own answer for an unmapped address, and
// that every master's transactions complete.
module tb_central_bus;
  import mp_pkg::*;
  localparam int unsigned NM = 4;
  localparam int unsigned MEM_LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  slv_req_t mem_req, lock_req, tqm_req;
  slv_rsp_t mem_rsp, lock_rsp, tqm_rsp;
  logic busy, contention;
  logic [1:0] owner;
  int checks = 0, failures = 0;
  int done [NM];
  int order [$];
  int contention_cycles = 0;
  int finished;

  central_bus #(.NM(NM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] reply(slave_e s, logic [31:0] a);
    return {6'(s), 26'(a)} ^ 32'h5A5A_0000;
  endfunction

  // slave models
  int unsigned mem_cnt;
  logic [31:0] last_waddr, last_wdata;
  slave_e last_wslave;
  always_ff @(posedge clk) begin
    if (!mem_req.sel || mem_rsp.ready) mem_cnt <= 0;
    else mem_cnt <= mem_cnt + 1;
  end
  always_comb begin
    mem_rsp.ready  = mem_req.sel && (mem_cnt == MEM_LAT - 1);
    mem_rsp.rdata  = reply(SLV_MEM, mem_req.addr);
    lock_rsp.ready = lock_req.sel;
    lock_rsp.rdata = reply(SLV_LOCK, lock_req.addr);
    tqm_rsp.ready  = tqm_req.sel;
    tqm_rsp.rdata  = reply(SLV_TQM, tqm_req.addr);
  end
  always @(posedge clk) begin
    if (mem_req.sel && mem_rsp.ready && mem_req.we)
      {last_wslave, last_waddr, last_wdata} <= {SLV_MEM, mem_req.addr, mem_req.wdata};
    if (lock_req.sel && lock_req.we)
      {last_wslave, last_waddr, last_wdata} <= {SLV_LOCK, lock_req.addr, lock_req.wdata};
    if (tqm_req.sel && tqm_req.we)
      {last_wslave, last_waddr, last_wdata} <= {SLV_TQM, tqm_req.addr, tqm_req.wdata};
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    check("one slave selected", 32'($countones({mem_req.sel, lock_req.sel, tqm_req.sel}) <= 1), 32'd1);
    if (contention) contention_cycles++;
  end

  // one transaction of master m, started just after a clock edge
  task automatic xfer(int m, logic we, logic [31:0] a, logic [31:0] wd, output int cycles);
    logic [31:0] rd;
    slave_e s;
    s = decode(a);
    m_req[m] = '{req: 1'b1, we: we, addr: a, wdata: wd};
    cycles = 0;
    forever begin
      @(negedge clk);
      cycles++;
      if (m_rsp[m].ack) break;
    end
    rd = m_rsp[m].rdata;
    order.push_back(m);
    @(posedge clk);
    #1;
    m_req[m].req = 1'b0;
    if (we) begin
      if (s != SLV_NONE) begin
        check("write reached slave", 32'(last_wslave), 32'(s));
        check("write address", last_waddr, a);
        check("write data", last_wdata, wd);
      end
    end else begin
      check("read data", rd, (s == SLV_NONE) ? 32'h0 : reply(s, a));
    end
    done[m]++;
  endtask

  function automatic logic [31:0] rand_addr();
    unique case ($urandom_range(3))
      0: return 32'($urandom_range(1023)) << 2;
      1: return LOCK_ADDR;
      2: return TQM_BASE | 32'($urandom_range(1) * 4);
      default: return 32'hFFFF_7000;
    endcase
  endfunction

  initial begin
    int cyc;
    for (int i = 0; i < int'(NM); i++) begin
      m_req[i] = '0;
      done[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk) #1;
    // single transactions on an idle bus
    xfer(2, 1'b0, LOCK_ADDR, 32'h0, cyc);
    check("2-cycle lock transaction", 32'(cyc), 32'd2);
    xfer(1, 1'b1, TQM_BASE, 32'h0000_1234, cyc);
    check("2-cycle queue transaction", 32'(cyc), 32'd2);
    xfer(0, 1'b0, 32'h100, 32'h0, cyc);
    check("memory transaction", 32'(cyc), 32'(1 + MEM_LAT));
    xfer(3, 1'b0, 32'hFFFF_7000, 32'h0, cyc);
    // round robin: all four masters request lock reads back to back
    order.delete();
    fork
      for (int k = 0; k < 8; k++) xfer(0, 1'b0, LOCK_ADDR, 32'h0, cyc);
      for (int k = 0; k < 8; k++) xfer(1, 1'b0, LOCK_ADDR, 32'h0, cyc);
      for (int k = 0; k < 8; k++) xfer(2, 1'b0, LOCK_ADDR, 32'h0, cyc);
      for (int k = 0; k < 8; k++) xfer(3, 1'b0, LOCK_ADDR, 32'h0, cyc);
    join
    check("round-robin count", 32'(order.size()), 32'd32);
    for (int k = 0; k < 32; k++) check("round-robin order", 32'(order[k]), 32'(k % 4));
    // random traffic from all masters
    finished = 0;
    fork
      for (int m = 0; m < int'(NM); m++) begin
        automatic int mm = m;
        fork begin
          for (int k = 0; k < 150; k++) begin
            int c;
            repeat ($urandom_range(3)) @(posedge clk);
            #1 xfer(mm, 1'($urandom_range(1)), rand_addr(), $urandom, c);
          end
          finished++;
        end join_none
      end
    join_none
    wait (finished == int'(NM));
    for (int m = 0; m < int'(NM); m++) check("transactions done", 32'(done[m]), 32'd159);
    checks++;
    if (contention_cycles == 0) begin
      failures++;
      $display("FAIL bus contention never seen");
    end
    $display("contention cycles: %0d", contention_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
