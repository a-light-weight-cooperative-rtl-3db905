// tb_dataflow_encoder: runs the 26-actor data-flow image-encoder graph on
// the system with 1, 2, 3 and 4 processors side by side (four independent
// copies of mpsoc_top, each with its own main memory and processors).
//
// Graph: a source actor feeds a chain of three more actors, each pair joined
// by three parallel queues; the fourth actor fans out into four branches of
// five actors each (one queue between neighbours); the branches join in a
// merge actor, which feeds the sink through two queues. That is 26 actors and
// 35 queues. Every actor is a thread; all 26 stack pointers sit in the
// thread-queue manager at once after creation.
//
// Checked per system: the sink's FIRINGS results against values computed here
// from the graph, all actors done, the number of firings, and that actors
// were found blocked, start() found the queue empty (more than one
// processor) and the queue held all 26 threads at once. The cycle count of
// each system is printed.
module tb_dataflow_encoder;
  import mp_pkg::*;
  localparam int unsigned NA = 26;
  localparam int unsigned NQ = 35;
  localparam int unsigned MAXIO = 4;
  localparam int unsigned FIRINGS = 8;
  localparam int unsigned LAT = 4;
  localparam int unsigned COMPUTE = 400;
  localparam int unsigned WORDS = 16384;

  logic clk = 1'b0, rst_n = 1'b0;
  int n_in [NA], in_q [NA][MAXIO], n_out [NA], out_q [NA][MAXIO];
  int checks = 0, failures = 0;
  longint cycles = 0;
  longint done_at [4];
  int max_count [4];
  logic sys_done [4];

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // build the graph of actors and queues
  int nq_built;
  task automatic connect(int src, int dst);
    out_q[src][n_out[src]] = nq_built;
    n_out[src]++;
    in_q[dst][n_in[dst]] = nq_built;
    n_in[dst]++;
    nq_built++;
  endtask

  initial begin
    for (int a = 0; a < int'(NA); a++) begin
      n_in[a] = 0;
      n_out[a] = 0;
      for (int k = 0; k < int'(MAXIO); k++) begin
        in_q[a][k] = 0;
        out_q[a][k] = 0;
      end
    end
    nq_built = 0;
    for (int s = 0; s < 3; s++)                 // actors 0..3, three queues apart
      for (int k = 0; k < 3; k++) connect(s, s + 1);
    for (int b = 0; b < 4; b++) begin           // branches: actors 4+5b .. 8+5b
      connect(3, 4 + 5 * b);
      for (int j = 0; j < 4; j++) connect(4 + 5 * b + j, 5 + 5 * b + j);
      connect(8 + 5 * b, 24);                   // into the merge actor
    end
    connect(24, 25);                            // merge to sink, two queues
    connect(24, 25);
  end

  for (genvar s = 0; s < 4; s++) begin : g_sys
    localparam int unsigned NP = s + 1;
    bus_req_t proc_req [NP];
    bus_rsp_t proc_rsp [NP];
    logic ext_req, ext_we, ext_ack;
    logic [31:0] ext_addr, ext_wdata, ext_rdata;
    logic bus_busy, bus_contention, lock_state, tqm_overflow, tqm_empty_read;
    logic [(NP > 1 ? $clog2(NP) : 1)-1:0] bus_owner;
    logic [4:0] tqm_q_head, tqm_q_tail;
    logic [5:0] tqm_count;
    int firings [NP], blocked [NP], switches [NP], idle_starts [NP], hw_spins [NP];
    logic finished [NP];

    mpsoc_top #(.NUM_PROC(NP)) u_top (.*);

    main_memory_model #(.WORDS(WORDS), .LATENCY(LAT)) u_mem (
      .clk, .rst_n, .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_ack, .ext_rdata
    );

    for (genvar p = 0; p < int'(NP); p++) begin : g_proc
      proc_df_model #(.ID(p), .NA(NA), .FIRINGS(FIRINGS), .COMPUTE(COMPUTE), .MAXIO(MAXIO)) u_cpu (
        .clk, .rst_n, .req(proc_req[p]), .rsp(proc_rsp[p]),
        .n_in, .in_q, .n_out, .out_q,
        .firings(firings[p]), .blocked(blocked[p]), .switches(switches[p]),
        .idle_starts(idle_starts[p]), .hw_spins(hw_spins[p]), .finished(finished[p])
      );
    end

    logic [31:0] sink_res [FIRINGS];
    logic [31:0] actors_done;
    always @(posedge clk) begin
      for (int n = 0; n < int'(FIRINGS); n++) sink_res[n] = u_mem.mem[(32'hC000 >> 2) + n];
      actors_done = u_mem.mem[32'h1C >> 2];
    end

    always @(posedge clk) begin
      if (!rst_n) max_count[s] <= 0;
      else if (int'(tqm_count) > max_count[s]) max_count[s] <= int'(tqm_count);
    end

    always_comb begin
      sys_done[s] = 1'b1;
      for (int p = 0; p < int'(NP); p++) if (!finished[p]) sys_done[s] = 1'b0;
    end

    always @(posedge clk) if (rst_n && sys_done[s] && done_at[s] == 0) done_at[s] <= cycles;

    task automatic report();
      longint f, bl, idl;
      logic [31:0] val [NA];
      {f, bl, idl} = '0;
      for (int p = 0; p < int'(NP); p++) begin
        f += firings[p];
        bl += blocked[p];
        idl += idle_starts[p];
      end
      for (int n = 0; n < int'(FIRINGS); n++) begin
        for (int a = 0; a < int'(NA); a++) begin
          val[a] = (n_in[a] == 0) ? 32'(16 * n + 1) : 32'(a);
          for (int k = 0; k < n_in[a]; k++)
            for (int src = 0; src < a; src++)
              for (int o = 0; o < n_out[src]; o++)
                if (out_q[src][o] == in_q[a][k]) val[a] += val[src];
        end
        check($sformatf("P=%0d sink result %0d", NP, n), sink_res[n], val[NA - 1]);
      end
      check($sformatf("P=%0d actors done", NP), actors_done, NA);
      check($sformatf("P=%0d firings", NP), f, NA * FIRINGS);
      check($sformatf("P=%0d queue held all actors", NP), max_count[s], NA);
      check($sformatf("P=%0d no overflow", NP), tqm_overflow, 0);
      if (NP > 1) begin
        checks++;
        if (bl == 0) begin
          failures++;
          $display("FAIL P=%0d: no actor was ever blocked", NP);
        end
        checks++;
        if (idl == 0) begin
          failures++;
          $display("FAIL P=%0d: start() never found the queue empty", NP);
        end
      end
      $display("P=%0d processors: %0d cycles, %0d firings, %0d blocked runs, %0d empty starts",
               NP, done_at[s], f, bl, idl);
    endtask
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    for (int s = 0; s < 4; s++) done_at[s] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (sys_done[0] && sys_done[1] && sys_done[2] && sys_done[3]);
    repeat (2) @(posedge clk);
    check("queues built", nq_built, NQ);
    g_sys[0].report();
    g_sys[1].report();
    g_sys[2].report();
    g_sys[3].report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
