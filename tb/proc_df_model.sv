// proc_df_model: behavioural model of one processor core running a data-flow
// program on the cooperative thread library, for testbenches only.
//
// Every actor of the graph is a user thread. The processor that wins the boot
// lock creates all NA actor threads (stack frame in memory, stack pointer
// pushed to the thread-queue manager). Every processor then loops on
// start(): pop a stack pointer under the thread lock L_q, run the actor once,
// and either yield it back into the queue or, after FIRINGS firings, abort
// it and count it done.
// An actor fires when each input queue holds a token and each output queue
// has room: it takes one token from each input, computes
//   v = (source actor) ? 16*n + 1 : (sum of input tokens) + actor index,
// spends COMPUTE cycles off the bus, and writes v to each output queue.
// The sink writes its results to OUT_BASE. The queues are single-producer
// single-consumer rings in main memory (read index, write index, QCAP data
// words), so they need no lock.
// The graph arrives on ports: per actor its input and output queue numbers.
module proc_df_model
  import mp_pkg::*;
#(
  parameter int unsigned ID      = 0,
  parameter int unsigned NA      = 26,
  parameter int unsigned FIRINGS = 8,
  parameter int unsigned QCAP    = 2,
  parameter int unsigned COMPUTE = 20,
  parameter int unsigned MAXIO   = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  output bus_req_t req,
  input  bus_rsp_t rsp,
  input  int       n_in  [NA],
  input  int       in_q  [NA][MAXIO],
  input  int       n_out [NA],
  input  int       out_q [NA][MAXIO],
  output int       firings,
  output int       blocked,      // actor ran but could not fire
  output int       switches,
  output int       idle_starts,
  output int       hw_spins,
  output logic     finished
);

  localparam logic [31:0] L_B        = 32'h0000_0010;
  localparam logic [31:0] L_Q        = 32'h0000_0014;
  localparam logic [31:0] DONE_LOCK  = 32'h0000_0018;
  localparam logic [31:0] THREAD_DONE = 32'h0000_001C;
  localparam logic [31:0] STACK_BASE = 32'h0000_1000;
  localparam logic [31:0] QUEUE_BASE = 32'h0000_8000;
  localparam logic [31:0] OUT_BASE   = 32'h0000_C000;

  function automatic logic [31:0] q_addr(int q);
    return QUEUE_BASE + 32'(q) * 32'h40;    // [0]=read index, [4]=write index, [8..]=data
  endfunction

  task automatic xfer(input logic we, input logic [31:0] a, input logic [31:0] wd,
                      output logic [31:0] rd);
    req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    forever begin
      @(negedge clk);
      if (rsp.ack) break;
    end
    rd = rsp.rdata;
    @(posedge clk);
    #1 req.req = 1'b0;
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    xfer(1'b0, a, 32'h0, d);
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] unused;
    xfer(1'b1, a, d, unused);
  endtask

  task automatic hw_acquire();
    logic [31:0] v;
    forever begin
      rd(LOCK_ADDR, v);
      if (v[0] == 1'b0) break;
      hw_spins++;
    end
  endtask

  task automatic tsread(input logic [31:0] l, output logic old);
    logic [31:0] v;
    hw_acquire();
    rd(l, v);
    wr(l, 32'h1);
    wr(LOCK_ADDR, 32'h0);
    old = v[0];
  endtask

  task automatic tswrite(input logic [31:0] l, input logic [31:0] v);
    hw_acquire();
    wr(l, v);
    wr(LOCK_ADDR, 32'h0);
  endtask

  task automatic sw_acquire(input logic [31:0] l);
    logic old;
    do tsread(l, old); while (old);
  endtask

  task automatic push_sp(input logic [31:0] sp);
    logic [31:0] unused;
    sw_acquire(L_Q);
    xfer(1'b1, TQM_BASE | 32'(TQM_QUEUE), sp, unused);
    tswrite(L_Q, 32'h0);
  endtask

  // run actor a once; returns 1 when it has finished all its firings
  task automatic run_actor(input int a, input logic [31:0] sp, output logic done);
    logic [31:0] n, ri, wi, v, t;
    logic ready;
    rd(sp + 4, n);                        // firings so far
    ready = 1'b1;
    for (int k = 0; k < n_in[a]; k++) begin
      rd(q_addr(in_q[a][k]), ri);
      rd(q_addr(in_q[a][k]) + 4, wi);
      if (wi == ri) ready = 1'b0;
    end
    for (int k = 0; k < n_out[a]; k++) begin
      rd(q_addr(out_q[a][k]), ri);
      rd(q_addr(out_q[a][k]) + 4, wi);
      if (wi - ri >= QCAP) ready = 1'b0;
    end
    if (!ready) begin
      blocked++;
      done = 1'b0;
      return;
    end
    v = (n_in[a] == 0) ? 16 * n + 1 : 32'(a);
    for (int k = 0; k < n_in[a]; k++) begin
      rd(q_addr(in_q[a][k]), ri);
      rd(q_addr(in_q[a][k]) + 8 + 4 * (ri % QCAP), t);
      v += t;
      wr(q_addr(in_q[a][k]), ri + 1);
    end
    repeat (COMPUTE) @(posedge clk);
    #1;
    for (int k = 0; k < n_out[a]; k++) begin
      rd(q_addr(out_q[a][k]) + 4, wi);
      wr(q_addr(out_q[a][k]) + 8 + 4 * (wi % QCAP), v);
      wr(q_addr(out_q[a][k]) + 4, wi + 1);
    end
    if (n_out[a] == 0) wr(OUT_BASE + 4 * n, v);
    wr(sp + 4, n + 1);
    firings++;
    done = (n + 1 == FIRINGS);
  endtask

  initial begin
    logic old, done;
    logic [31:0] sp, id, cnt, unused;
    req = '0;
    {firings, blocked, switches, idle_starts, hw_spins} = '0;
    finished = 1'b0;
    @(posedge rst_n);
    repeat (1 + ID) @(posedge clk);
    #1;
    tsread(L_B, old);
    if (!old) begin                       // main(): create all actors
      for (int a = 0; a < int'(NA); a++) begin
        sp = STACK_BASE + 32'(a) * 32'h100 + 32'hF0;
        wr(sp, 32'(a));
        wr(sp + 4, 32'h0);
        push_sp(sp);
      end
    end
    forever begin
      rd(THREAD_DONE, cnt);
      if (cnt >= NA) break;
      // start()
      sw_acquire(L_Q);
      xfer(1'b0, TQM_BASE | 32'(TQM_QUEUE), 32'h0, sp);
      tswrite(L_Q, 32'h0);
      if (sp == NULL_SP) begin
        idle_starts++;
        continue;
      end
      switches++;
      rd(sp, id);
      run_actor(int'(id), sp, done);
      if (done) begin                     // abort()
        sw_acquire(DONE_LOCK);
        rd(THREAD_DONE, cnt);
        wr(THREAD_DONE, cnt + 1);
        tswrite(DONE_LOCK, 32'h0);
      end else begin                      // yield()
        push_sp(sp);
      end
    end
    finished = 1'b1;
  end

endmodule
