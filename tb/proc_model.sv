// proc_model: behavioural model of one processor core running the
// cooperative multi-threading library, for testbenches only (the cores are
// not part of the design).
//
// It produces the bus traffic of the library and of the "accumulate" user
// program, one bus transaction at a time, with the same handshake as a real
// master (request held until ack):
//   boot   : compete for the software boot lock L_b; the winner runs main(),
//            which creates NT threads (stack frame in memory, stack pointer
//            pushed to the thread-queue manager); the others run slave_main()
//   start(): take the software thread lock L_q, pop a stack pointer from the
//            queue manager, release L_q; 0 means no thread is ready
//   thread : load its context (id, index, partial sum) from its stack, add
//            CHUNK numbers from main memory, then either yield (save context,
//            push the stack pointer back under L_q) or finish (store the sum,
//            bump thread_done under DONE_LOCK, abort)
//   main() : after thread_done reaches NT, turn the results into prefix sums
// Software locks follow the two-step scheme: spin on the hardware lock, read
// and set (or write) the lock word in memory, release the hardware lock.
// Counters of what happened are outputs for the testbench.
module proc_model
  import mp_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned NT    = 4,     // user threads
  parameter int unsigned NPER  = 16,    // numbers per thread
  parameter int unsigned CHUNK = 4,     // numbers per time slice before yield()
  parameter logic [31:0] NUM_BASE = 32'h0001_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  output bus_req_t req,
  input  bus_rsp_t rsp,
  output int       hw_spins,      // tread() that returned TRUE
  output int       sw_spins,      // software lock found taken
  output int       creates,
  output int       switches,      // start() that got a thread
  output int       idle_starts,   // start() that found the queue empty
  output int       yields,
  output int       aborts,
  output int       mem_reads,
  output logic     is_main,
  output logic     finished
);

  // software memory map of the program
  localparam logic [31:0] L_B        = 32'h0000_0010;
  localparam logic [31:0] L_Q        = 32'h0000_0014;
  localparam logic [31:0] DONE_LOCK  = 32'h0000_0018;
  localparam logic [31:0] THREAD_DONE = 32'h0000_001C;
  localparam logic [31:0] RESULT     = 32'h0000_0040;
  localparam logic [31:0] STACK_BASE = 32'h0000_1000;

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
    if (a < PERIPH_BASE) mem_reads++;
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] unused;
    xfer(1'b1, a, d, unused);
  endtask

  task automatic hw_acquire();
    logic [31:0] v;
    forever begin
      rd(LOCK_ADDR, v);            // tread()
      if (v[0] == 1'b0) break;
      hw_spins++;
    end
  endtask

  task automatic hw_release();
    wr(LOCK_ADDR, 32'h0);          // twrite(FALSE)
  endtask

  // tsread(L): returns the old value of software lock L and sets it
  task automatic tsread(input logic [31:0] l, output logic old);
    logic [31:0] v;
    hw_acquire();
    rd(l, v);
    wr(l, 32'h1);
    hw_release();
    old = v[0];
  endtask

  task automatic tswrite(input logic [31:0] l, input logic [31:0] v);
    hw_acquire();
    wr(l, v);
    hw_release();
  endtask

  task automatic sw_acquire(input logic [31:0] l);
    logic old;
    forever begin
      tsread(l, old);
      if (!old) break;
      sw_spins++;
    end
  endtask

  function automatic logic [31:0] stack_of(int t);
    return STACK_BASE + 32'(t) * 32'h100 + 32'hF0;
  endfunction

  task automatic create(int t);
    logic [31:0] sp, unused;
    sp = stack_of(t);
    wr(sp, 32'(t));                // thread argument: its id
    wr(sp + 4, 32'h0);             // loop index
    wr(sp + 8, 32'h0);             // partial sum
    sw_acquire(L_Q);
    xfer(1'b1, TQM_BASE | 32'(TQM_QUEUE), sp, unused);
    tswrite(L_Q, 32'h0);
    creates++;
  endtask

  task automatic start();
    logic [31:0] sp, id, i, acc, v, n;
    sw_acquire(L_Q);
    xfer(1'b0, TQM_BASE | 32'(TQM_QUEUE), 32'h0, sp);
    tswrite(L_Q, 32'h0);
    if (sp == NULL_SP) begin
      idle_starts++;
      return;
    end
    switches++;
    rd(sp, id);
    rd(sp + 4, i);
    rd(sp + 8, acc);
    for (int k = 0; k < int'(CHUNK) && i < NPER; k++) begin
      rd(NUM_BASE + 4 * (i + NPER * id), v);
      acc += v;
      i++;
    end
    if (i < NPER) begin            // yield(): back into the queue
      wr(sp + 4, i);
      wr(sp + 8, acc);
      sw_acquire(L_Q);
      xfer(1'b1, TQM_BASE | 32'(TQM_QUEUE), sp, v);
      tswrite(L_Q, 32'h0);
      yields++;
    end else begin                 // thread end: report and abort()
      wr(RESULT + 4 * id, acc);
      sw_acquire(DONE_LOCK);
      rd(THREAD_DONE, n);
      wr(THREAD_DONE, n + 1);
      tswrite(DONE_LOCK, 32'h0);
      aborts++;
    end
  endtask

  initial begin
    logic old;
    logic [31:0] n, prev, r;
    req = '0;
    {hw_spins, sw_spins, creates, switches, idle_starts, yields, aborts, mem_reads} = '0;
    is_main = 1'b0;
    finished = 1'b0;
    @(posedge rst_n);
    repeat (1 + ID) @(posedge clk);
    #1;
    tsread(L_B, old);              // boot: compete for L_b
    is_main = !old;
    if (is_main) begin
      for (int t = 0; t < int'(NT); t++) create(t);
    end
    forever begin
      rd(THREAD_DONE, n);
      if (n >= NT) break;
      start();
    end
    if (is_main) begin
      rd(RESULT, prev);
      for (int t = 1; t < int'(NT); t++) begin
        rd(RESULT + 4 * t, r);
        prev = prev + r;
        wr(RESULT + 4 * t, prev);
      end
    end
    finished = 1'b1;
  end

endmodule
