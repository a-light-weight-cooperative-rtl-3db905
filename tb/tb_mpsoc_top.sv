// tb_mpsoc_top: end-to-end test of the whole on-chip system at its default
// size (four processor ports, 32-entry thread queue), running the
// "accumulate numbers" program on four behavioural processors.
//
// Main memory holds NT*NPER numbers, generated here as n(k) = 7k + 3 xor
// (k >> 2). Each of NT threads adds its own NPER numbers in slices of CHUNK,
// yielding between slices, so the threads migrate between processors through
// the thread-queue manager. At the end the testbench compares the prefix sums
// main() left in memory with sums it computed itself, and checks that every
// mechanism happened: boot-lock win and loss, spinning on the hardware lock
// and on a software lock, thread creation, context switches through the
// queue, yields, aborts, start() on an empty queue, wrap-around of q_tail and
// q_head past the last register, bus contention and off-chip memory waits.
// The number of cycles is printed.
module tb_mpsoc_top;
  import mp_pkg::*;
  localparam int unsigned NP    = 4;
  localparam int unsigned NT    = 4;
  localparam int unsigned NPER  = 40;
  localparam int unsigned CHUNK = 4;
  localparam int unsigned LAT   = 4;
  localparam int unsigned WORDS = 32768;
  localparam logic [31:0] NUM_BASE = 32'h0001_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t proc_req [NP];
  bus_rsp_t proc_rsp [NP];
  logic ext_req, ext_we, ext_ack;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic bus_busy, bus_contention, lock_state, tqm_overflow, tqm_empty_read;
  logic [1:0] bus_owner;
  logic [4:0] tqm_q_head, tqm_q_tail;
  logic [5:0] tqm_count;

  int hw_spins [NP], sw_spins [NP], creates [NP], switches [NP], idle_starts [NP];
  int yields [NP], aborts [NP], mem_reads [NP];
  logic is_main [NP], finished [NP];

  int checks = 0, failures = 0;
  longint cycles = 0;
  logic [4:0] last_tail = '0, last_head = '0;
  int contention_cycles = 0, mem_wait_cycles = 0, tail_wraps = 0, head_wraps = 0;

  mpsoc_top dut (.*);

  main_memory_model #(.WORDS(WORDS), .LATENCY(LAT)) u_mem (
    .clk, .rst_n, .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_ack, .ext_rdata
  );

  for (genvar p = 0; p < int'(NP); p++) begin : g_proc
    proc_model #(.ID(p), .NT(NT), .NPER(NPER), .CHUNK(CHUNK), .NUM_BASE(NUM_BASE)) u_cpu (
      .clk, .rst_n, .req(proc_req[p]), .rsp(proc_rsp[p]),
      .hw_spins(hw_spins[p]), .sw_spins(sw_spins[p]), .creates(creates[p]),
      .switches(switches[p]), .idle_starts(idle_starts[p]), .yields(yields[p]),
      .aborts(aborts[p]), .mem_reads(mem_reads[p]), .is_main(is_main[p]),
      .finished(finished[p])
    );
  end

  always #5 clk = ~clk;

  function automatic logic [31:0] number(int k);
    return (32'(k) * 7 + 3) ^ (32'(k) >> 2);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic happened(string what, longint n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (bus_contention) contention_cycles++;
    if (ext_req && !ext_ack) mem_wait_cycles++;
    if (tqm_q_tail == 5'd0 && last_tail == 5'd31) tail_wraps++;
    if (tqm_q_head == 5'd0 && last_head == 5'd31) head_wraps++;
    last_tail <= tqm_q_tail;
    last_head <= tqm_q_head;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sum [NT];
    logic [31:0] prefix;
    int mains, all_done;
    for (int p = 0; p < int'(NP); p++) proc_req[p] = '0;
    repeat (3) @(posedge clk);
    // after the memory model has cleared itself at time 0
    for (int k = 0; k < int'(NT * NPER); k++) u_mem.mem[(NUM_BASE >> 2) + k] = number(k);
    #1 rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int p = 0; p < int'(NP); p++) if (!finished[p]) all_done = 0;
    end while (!all_done);
    $display("finished after %0d cycles", cycles);
    // results: prefix sums of the per-thread sums
    prefix = 0;
    for (int t = 0; t < int'(NT); t++) begin
      sum[t] = 0;
      for (int k = 0; k < int'(NPER); k++) sum[t] += number(t * NPER + k);
      prefix += sum[t];
      check($sformatf("result[%0d]", t), u_mem.mem[(32'h40 >> 2) + t], prefix);
    end
    check("thread_done", u_mem.mem[32'h1C >> 2], NT);
    mains = 0;
    for (int p = 0; p < int'(NP); p++) if (is_main[p]) mains++;
    check("exactly one processor runs main()", mains, 1);
    check("queue empty at the end", tqm_count, 0);
    check("hardware lock free at the end", lock_state, 0);
    check("no queue overflow", tqm_overflow, 0);
    begin
      int c, sw, y, a, ids, hs, ss, mr, slaves;
      {c, sw, y, a, ids, hs, ss, mr, slaves} = '0;
      for (int p = 0; p < int'(NP); p++) begin
        c += creates[p]; sw += switches[p]; y += yields[p]; a += aborts[p];
        ids += idle_starts[p]; hs += hw_spins[p]; ss += sw_spins[p]; mr += mem_reads[p];
        if (!is_main[p] && switches[p] > 0) slaves++;
      end
      check("creates", c, NT);
      check("aborts", a, NT);
      check("yields", y, NT * (NPER / CHUNK - 1));
      check("context switches", sw, NT * (NPER / CHUNK));
      $display("mechanisms:");
      happened("boot lock lost (slave_main)", NP - mains);
      happened("thread create()", c);
      happened("context switch via queue", sw);
      happened("yield()", y);
      happened("abort()", a);
      happened("start() on empty queue", ids);
      happened("hardware lock spin", hs);
      happened("software lock spin", ss);
      happened("threads run on slave processors", slaves);
      happened("q_tail wrap past Reg(n)", tail_wraps);
      happened("q_head wrap past Reg(n)", head_wraps);
      happened("bus contention cycles", contention_cycles);
      happened("off-chip memory wait cycles", mem_wait_cycles);
      happened("main-memory reads", mr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
