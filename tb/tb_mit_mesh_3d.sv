// tb_mit_mesh_3d - end-to-end test of a three-dimensional 3 x 3 x 3 mesh (7 testers per node,
// 7 arbitration flags per node) with a behavioural core on every node.
//
// Phase 1, all cores healthy: every node runs through the whole signature
// table (the counter wraps); every core must receive 2d+1 requests per test
// loop, all nodes must stay healthy and every verdict must be "healthy".
// Phase 2, faults: node FA's core starts returning wrong results, node FB's
// core stops answering, and one test unit (NCU 1 of node FT) is forced to a
// false "faulty" verdict about its healthy neighbour. Expected: FA and FB are
// judged faulty by their own self-test and by all 2d neighbours and stop
// testing; every other node, including the one with a false verdict against
// it, stays healthy because the majority outvotes the single wrong verdict.
// Throughout, the node assertions check that no node is ever tested by two
// units at once. Mechanisms counted (each must occur): self-tests, neighbour
// tests, threads spinning on their arbitration flag, the ring held by a busy
// holder, signature counter wrap, wrong-response detection, missing-response
// detection, halting, a false verdict outvoted. The longest test loop (launch
// of the threads to their join) is checked against the worst-case bound.
module tb_mit_mesh_3d;
  import mit_pkg::*;
  localparam int D = 3, SIDE = 3, N = 2 * D + 1;
  localparam dims_t SZ = uniform_dims(D, SIDE);
  localparam int NN = node_count(D, SZ);
  localparam int W_T = W_T_DEF, W_R = W_R_DEF, KMAX = 8;
  localparam int FA = 5, FB = 10, FT = 0;
  localparam int TAU_RESP = 16, CLK1_DIV = 4;  // the mesh defaults
  // longest possible test loop (launch to join): a thread may wait for the
  // token to pass all 2d other slots, each holding a test, then runs its own
  localparam int LOOP_BOUND = (2 * D + 1) * CLK1_DIV + 2 * D * (TAU_RESP + 1)
                              + (TAU_RESP + 1) + CLK1_DIV + 2;
  int max_loop = 0;
  int loop_len [NN];
  int checks = 0, failures = 0;
  int n_self = 0, n_nbr = 0, n_spin = 0, n_hold = 0, n_wrap = 0;
  int n_det_wrong = 0, n_det_dead = 0, n_halt = 0, n_outvoted = 0;
  logic clk = 0, rst_n = 0;

  logic           core_req  [NN];
  logic [W_T-1:0] core_sig  [NN];
  logic [W_R-1:0] core_resp [NN];
  logic           healthy   [NN];
  logic [1:0]     fault     [NN];
  int unsigned    n_req     [NN];

  logic           halted  [NN];
  logic           running [NN];
  logic [N-1:0]   af      [NN];
  logic [N-1:0]   free    [NN];
  logic [N-1:0]   waiting [NN];
  logic           clk1    [NN];

  always #5 clk = ~clk;

  mit_mesh #(.D(D), .SIZE(SZ)) dut (.clk, .rst_n, .core_req, .core_sig, .core_resp, .healthy, .nbr_healthy());

  for (genvar n = 0; n < NN; n++) begin : g_core
    // response latencies differ from node to node, from 1 to TAU_RESP-1 cycles
    core_model #(.W_T(W_T), .W_R(W_R), .LATENCY(1 + (n % (TAU_RESP - 1)))) u_core (
      .clk, .rst_n, .req(core_req[n]), .sig(core_sig[n]), .fault(fault[n]),
      .resp(core_resp[n]), .n_req(n_req[n])
    );
    assign halted[n]  = dut.g_node[n].u_node.st_halted;
    assign running[n] = dut.g_node[n].u_node.st_running;
    assign af[n]      = dut.g_node[n].u_node.st_af;
    assign free[n]    = dut.g_node[n].u_node.free;
    assign waiting[n] = dut.g_node[n].u_node.st_waiting;
    assign clk1[n]    = dut.g_node[n].u_node.clk1;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // verdicts[n][i]: verdict of the tester in direction i of node n about node n
  logic verdicts [NN][1:2*D];
  for (genvar n = 0; n < NN; n++) begin : g_verdict
    for (genvar i = 1; i <= 2 * D; i++) begin : g_dir
      assign verdicts[n][i] = dut.t_phi[nbr_index(n, i, D, SZ)][opp_dir(i, D)];
    end
  end
  function automatic logic verdict_about(int n, int i);
    return verdicts[n][i];
  endfunction

  // mechanism counters
  int loops [NN];
  logic prev_running [NN];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (core_req[n]) begin
        if (af[n][0]) n_self++; else n_nbr++;
      end
      if (|waiting[n]) n_spin++;
      if (clk1[n] && |(af[n] & ~free[n])) n_hold++;
      if (running[n]) loop_len[n]++;
      if (prev_running[n] && !running[n]) begin
        if (loop_len[n] > max_loop) max_loop = loop_len[n];
        loop_len[n] = 0;
        loops[n]++;
        if (loops[n] % KMAX == 0) n_wrap++;
      end
      prev_running[n] = running[n];
    end
  end

  initial begin
    int base [NN];
    for (int n = 0; n < NN; n++) begin fault[n] = 0; loops[n] = 0; prev_running[n] = 0; loop_len[n] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // phase 1: one full pass over the signature table on every node, plus one
    wait (loops[0] >= KMAX + 1);
    repeat (5) @(posedge clk);
    #1;
    for (int n = 0; n < NN; n++) begin
      check(healthy[n] && !halted[n], $sformatf("node %0d healthy in phase 1", n));
      check(loops[n] >= KMAX, $sformatf("node %0d ran %0d loops", n, loops[n]));
      for (int i = 1; i <= 2 * D; i++) check(verdict_about(n, i), "verdict healthy");
      base[n] = n_req[n];
      check(n_req[n] >= N * KMAX, $sformatf("node %0d core saw %0d requests", n, n_req[n]));
    end
    // phase 2: inject faults
    fault[FA] = 1;
    fault[FB] = 2;
    force dut.g_node[FT].u_node.g_ncu[1].u_ncu.phi = 1'b0;
    wait (loops[1] >= KMAX + 4);
    repeat (5) @(posedge clk);
    #1;
    for (int n = 0; n < NN; n++) begin
      if (n == FA || n == FB) begin
        check(!healthy[n], $sformatf("faulty node %0d detected", n));
        check(halted[n], $sformatf("faulty node %0d stopped testing", n));
        for (int i = 1; i <= 2 * D; i++) check(!verdict_about(n, i), "neighbour verdict faulty");
        if (!healthy[n] && n == FA) n_det_wrong++;
        if (!healthy[n] && n == FB) n_det_dead++;
        if (halted[n]) n_halt++;
      end else begin
        check(healthy[n] && !halted[n], $sformatf("healthy node %0d kept", n));
        check(n_req[n] > base[n], "healthy node still tested");
      end
    end
    // the node with a false verdict against it
    begin
      automatic int victim = nbr_index(FT, 1, D, SZ);
      check(!verdict_about(victim, opp_dir(1, D)), "forced false verdict present");
      if (healthy[victim]) n_outvoted++;
    end
    release dut.g_node[FT].u_node.g_ncu[1].u_ncu.phi;
    $display("self-tests=%0d neighbour-tests=%0d spins=%0d holds=%0d wraps=%0d",
             n_self, n_nbr, n_spin, n_hold, n_wrap);
    $display("wrong-detected=%0d dead-detected=%0d halts=%0d outvoted=%0d",
             n_det_wrong, n_det_dead, n_halt, n_outvoted);
    $display("longest test loop %0d cycles, bound %0d", max_loop, LOOP_BOUND);
    check(max_loop > 0 && max_loop <= LOOP_BOUND, "test loop length within the bound");
    check(n_self > 0, "self-test happened");
    check(n_nbr > 0, "neighbour test happened");
    check(n_spin > 0, "spin happened");
    check(n_hold > 0, "ring hold happened");
    check(n_wrap > 0, "signature counter wrap happened");
    check(n_det_wrong > 0, "wrong-response detection happened");
    check(n_det_dead > 0, "missing-response detection happened");
    check(n_halt > 0, "halt happened");
    check(n_outvoted > 0, "false verdict outvoted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
