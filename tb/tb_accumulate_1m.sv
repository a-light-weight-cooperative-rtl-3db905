// tb_accumulate_1m: the "accumulate one million numbers" program at its full
// size: four threads of 250000 numbers each, run to completion without
// yielding, on a one-processor and a four-processor copy of the system side
// by side (each with its own main memory of 2M words and memory latency 4).
// Numbers are n(k) = ((7k + 3) xor (k >> 2)) mod 256, so the 32-bit sums
// cannot overflow. Checked per system: the four prefix sums main() leaves in
// memory against sums computed here, all threads done, one main(). The cycle
// counts of both systems are printed.
module tb_accumulate_1m;
  import mp_pkg::*;
  localparam int unsigned NT    = 4;
  localparam int unsigned NPER  = 250000;
  localparam int unsigned LAT   = 4;
  localparam int unsigned WORDS = 2097152;
  localparam logic [31:0] NUM_BASE = 32'h0001_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  longint cycles = 0;
  longint done_at [2];
  logic sys_done [2];

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  function automatic logic [31:0] number(int k);
    return ((32'(k) * 7 + 3) ^ (32'(k) >> 2)) & 32'hFF;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  for (genvar s = 0; s < 2; s++) begin : g_sys
    localparam int unsigned NP = (s == 0) ? 1 : 4;
    bus_req_t proc_req [NP];
    bus_rsp_t proc_rsp [NP];
    logic ext_req, ext_we, ext_ack;
    logic [31:0] ext_addr, ext_wdata, ext_rdata;
    logic bus_busy, bus_contention, lock_state, tqm_overflow, tqm_empty_read;
    logic [(NP > 1 ? $clog2(NP) : 1)-1:0] bus_owner;
    logic [4:0] tqm_q_head, tqm_q_tail;
    logic [5:0] tqm_count;
    int hw_spins [NP], sw_spins [NP], creates [NP], switches [NP], idle_starts [NP];
    int yields [NP], aborts [NP], mem_reads [NP];
    logic is_main [NP], finished [NP];

    mpsoc_top #(.NUM_PROC(NP)) u_top (.*);

    main_memory_model #(.WORDS(WORDS), .LATENCY(LAT)) u_mem (
      .clk, .rst_n, .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_ack, .ext_rdata
    );

    for (genvar p = 0; p < int'(NP); p++) begin : g_proc
      proc_model #(.ID(p), .NT(NT), .NPER(NPER), .CHUNK(NPER), .NUM_BASE(NUM_BASE)) u_cpu (
        .clk, .rst_n, .req(proc_req[p]), .rsp(proc_rsp[p]),
        .hw_spins(hw_spins[p]), .sw_spins(sw_spins[p]), .creates(creates[p]),
        .switches(switches[p]), .idle_starts(idle_starts[p]), .yields(yields[p]),
        .aborts(aborts[p]), .mem_reads(mem_reads[p]), .is_main(is_main[p]),
        .finished(finished[p])
      );
    end

    // after the memory model has cleared itself at time 0
    initial #1 for (int k = 0; k < int'(NT * NPER); k++) u_mem.mem[(NUM_BASE >> 2) + k] = number(k);

    logic [31:0] results [NT];
    logic [31:0] thread_done;
    always @(posedge clk) begin
      for (int t = 0; t < int'(NT); t++) results[t] = u_mem.mem[(32'h40 >> 2) + t];
      thread_done = u_mem.mem[32'h1C >> 2];
    end

    always_comb begin
      sys_done[s] = 1'b1;
      for (int p = 0; p < int'(NP); p++) if (!finished[p]) sys_done[s] = 1'b0;
    end
    always @(posedge clk) if (rst_n && sys_done[s] && done_at[s] == 0) done_at[s] <= cycles;

    task automatic report();
      logic [31:0] prefix, sum;
      int mains;
      prefix = 0;
      for (int t = 0; t < int'(NT); t++) begin
        sum = 0;
        for (int k = 0; k < int'(NPER); k++) sum += number(t * NPER + k);
        prefix += sum;
        check($sformatf("P=%0d result[%0d]", NP, t), results[t], prefix);
      end
      check($sformatf("P=%0d thread_done", NP), thread_done, NT);
      mains = 0;
      for (int p = 0; p < int'(NP); p++) if (is_main[p]) mains++;
      check($sformatf("P=%0d one main()", NP), mains, 1);
      $display("P=%0d processors: %0d cycles for %0d numbers", NP, done_at[s], NT * NPER);
    endtask
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    done_at[0] = 0;
    done_at[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (sys_done[0] && sys_done[1]);
    repeat (2) @(posedge clk);
    g_sys[0].report();
    g_sys[1].report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
