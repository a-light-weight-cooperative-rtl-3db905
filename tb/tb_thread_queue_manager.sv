// tb_thread_queue_manager: self-checking test of the thread-queue manager.
// Pushes and pops stack pointers through the QUEUE register and compares
// them with a first-in first-out reference queue: order, wrap-around of
// q_head/q_tail past Reg(n), the NULL_SP answer of an empty queue, a dropped
// push into a full queue, the status word and the clearing of its sticky
// flags, and the single-cycle answer on the bus.
module tb_thread_queue_manager;
  import mp_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  logic [IW-1:0] q_head, q_tail;
  logic [CW-1:0] count;
  logic overflow, empty_read;
  int checks = 0, failures = 0;
  int wraps = 0;
  logic [31:0] model [$];
  logic m_ovf, m_emp;

  thread_queue_manager #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .s_req, .s_rsp, .q_head, .q_tail, .count, .overflow, .empty_read);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic access(input logic we, input logic [3:0] off, input logic [31:0] wd,
                        output logic [31:0] rd);
    @(negedge clk);
    s_req = '{sel: 1'b1, we: we, addr: TQM_BASE | 32'(off), wdata: wd};
    #1;
    check("ready with sel", 32'(s_rsp.ready), 32'd1);
    rd = s_rsp.rdata;
    @(posedge clk);
    #1;
    s_req.sel = 1'b0;
  endtask

  task automatic push(input logic [31:0] sp);
    logic [31:0] rd;
    logic [IW-1:0] t0;
    t0 = q_tail;
    access(1'b1, TQM_QUEUE, sp, rd);
    if (model.size() < int'(DEPTH)) begin
      model.push_back(sp);
      if (t0 == IW'(DEPTH - 1)) wraps++;
    end else m_ovf = 1'b1;
    check("count after push", 32'(count), 32'(model.size()));
  endtask

  task automatic pop();
    logic [31:0] rd, exp;
    access(1'b0, TQM_QUEUE, 32'h0, rd);
    if (model.size() == 0) begin
      exp = NULL_SP;
      m_emp = 1'b1;
    end else exp = model.pop_front();
    check("popped SP", rd, exp);
    check("count after pop", 32'(count), 32'(model.size()));
  endtask

  task automatic status();
    logic [31:0] rd, exp;
    access(1'b0, TQM_STATUS, 32'h0, rd);
    exp = '0;
    exp[31] = m_ovf;
    exp[30] = m_emp;
    exp[29] = (model.size() == int'(DEPTH));
    exp[28] = (model.size() == 0);
    exp[15:0] = 16'(model.size());
    check("status word", rd, exp);
  endtask

  task automatic clear();
    logic [31:0] rd;
    access(1'b1, TQM_STATUS, 32'h0, rd);
    m_ovf = 1'b0;
    m_emp = 1'b0;
  endtask

  initial begin
    s_req = '0;
    m_ovf = 1'b0;
    m_emp = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    status();
    pop();                       // empty queue: NULL_SP, sticky flag
    status();
    clear();
    status();
    // create three threads, then switch through them
    push(32'h0000_4000);
    push(32'h0000_5000);
    push(32'h0000_6000);
    pop(); pop();
    push(32'h0000_4100);         // yield
    pop(); pop(); pop();         // last one finds the queue empty
    // fill to full, then one more: dropped, overflow set
    for (int i = 0; i < int'(DEPTH) + 1; i++) push(32'h0001_0000 + 32'(i * 256));
    status();
    check("overflow flag out", 32'(overflow), 32'd1);
    for (int i = 0; i < int'(DEPTH); i++) pop();
    status();
    clear();
    // an idle cycle with sel low must not move the queue
    @(negedge clk);
    s_req = '{sel: 1'b0, we: 1'b1, addr: TQM_BASE, wdata: 32'hDEAD_BEEF};
    #1 check("no ready without sel", 32'(s_rsp.ready), 32'd0);
    @(posedge clk) #1 check("idle keeps count", 32'(count), 32'(model.size()));
    // random create/yield/switch traffic
    for (int n = 0; n < 2000; n++) begin
      int unsigned op;
      op = $urandom_range(4);
      unique case (op)
        0, 1: push($urandom & 32'hFFFF_FFFC);
        2, 3: pop();
        default: status();
      endcase
    end
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("FAIL q_tail wrapped only %0d times", wraps);
    end
    $display("tail wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
