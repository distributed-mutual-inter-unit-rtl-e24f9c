// tb_mit_node - one processor node whose tester links are looped back onto its
// own tested links (a one-node wrap-around mesh: NCU i tests the node through
// slot opp(i)), with a behavioural core on the core test port.
// Checked:
//  - every loop the core receives exactly 2d+1 requests, one per slot, each
//    from the slot holding the token, carrying the signature T(k) computed
//    here, with k counting through the table;
//  - each test keeps the holder's free flag low for TAU_RESP+1 cycles;
//  - a healthy core stays healthy; a core returning wrong results, and after a
//    new reset a core returning nothing, is judged faulty within one loop and
//    the node then stops testing.
// Mechanisms counted: threads spinning on their flag, the ring held by a
// busy holder, the signature counter wrapping, detection, halting.
module tb_mit_node;
  import mit_pkg::*;
  localparam int D = 2, N = 2 * D + 1, W_T = 16, W_R = 16;
  localparam int KMAX = 4, TLOOP = 20, TRESP = 8, DIV = 2;
  int checks = 0, failures = 0;
  int n_spin = 0, n_hold = 0, n_wrap = 0, n_detect = 0, n_halt = 0;
  logic clk = 0, rst_n = 0;

  logic           t_req [1:2*D], t_b [1:2*D], t_phi [1:2*D], t_z [1:2*D];
  logic [W_T-1:0] t_sig [1:2*D];
  logic [W_R-1:0] t_resp [1:2*D];
  logic           s_req [1:2*D], s_b [1:2*D], s_phi [1:2*D], s_z [1:2*D];
  logic [W_T-1:0] s_sig [1:2*D];
  logic [W_R-1:0] s_resp [1:2*D];
  logic           core_req, healthy, st_running, st_halted;
  logic [W_T-1:0] core_sig;
  logic [W_R-1:0] core_resp;
  logic [$clog2(KMAX)-1:0] st_k;
  logic [N-1:0]   st_waiting, st_af;
  logic [1:0]     fault;
  int unsigned    n_req;

  always #5 clk = ~clk;

  for (genvar i = 1; i <= 2 * D; i++) begin : g_loop
    localparam int O = opp_dir(i, D);
    assign s_req[O]  = t_req[i];
    assign s_sig[O]  = t_sig[i];
    assign s_b[O]    = t_b[i];
    assign s_phi[O]  = t_phi[i];
    assign t_resp[i] = s_resp[O];
    assign t_z[i]    = s_z[O];
  end

  mit_node #(.D(D), .W_T(W_T), .W_R(W_R), .KMAX(KMAX), .TAU_LOOP(TLOOP),
             .TAU_RESP(TRESP), .CLK1_DIV(DIV)) dut (
    .clk, .rst_n, .t_req, .t_sig, .t_b, .t_phi, .t_resp, .t_z,
    .s_req, .s_sig, .s_b, .s_phi, .s_resp, .s_z,
    .core_req, .core_sig, .core_resp, .healthy,
    .st_k, .st_running, .st_halted, .st_waiting, .st_af
  );

  core_model #(.W_T(W_T), .W_R(W_R), .LATENCY(3)) u_core (
    .clk, .rst_n, .req(core_req), .sig(core_sig), .fault, .resp(core_resp), .n_req
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W_T-1:0] ref_sig(int kk);
    logic [63:0] v;
    v = 64'(kk + 1) * 64'hD1B54A32D192ED03;
    v = v ^ {32'd0, v[63:32]};
    return v[W_T-1:0];
  endfunction

  // per-loop bookkeeping of requests seen at the core
  logic [N-1:0] slots_seen;
  int           reqs_in_loop, loop_k, busy_len, prev_k;
  logic         prev_running;
  logic [N-1:0] busy_mask;

  always @(posedge clk) if (rst_n) begin
    // busy units of this node's slots (slot j is served by NCU opp(j) through the loop-back)
    busy_mask = ~dut.free;
    if (|st_waiting) n_spin++;
    if (dut.clk1 && |(st_af & busy_mask)) n_hold++;
    if (|busy_mask) busy_len++;
    else if (busy_len != 0) begin
      check(busy_len == TRESP + 1, $sformatf("test length %0d cycles", busy_len));
      busy_len = 0;
    end
    if (core_req) begin
      automatic int slot = -1;
      for (int j = 0; j < N; j++) if (st_af[j]) slot = j;
      check(slot >= 0 && busy_mask[slot], "request from the token holder");
      check(!slots_seen[slot], "one request per slot and loop");
      slots_seen[slot] = 1'b1;
      reqs_in_loop++;
      check(core_sig == ref_sig(loop_k), $sformatf("signature for k=%0d", loop_k));
    end
    if (prev_running && !st_running && !st_halted) begin
      check(reqs_in_loop == N && &slots_seen, $sformatf("%0d requests in loop", reqs_in_loop));
      reqs_in_loop = 0; slots_seen = '0;
      loop_k = (loop_k + 1) % KMAX;
      if (loop_k == 0) n_wrap++;
    end
    if (prev_running == 0 && st_running) check(int'(st_k) == loop_k, "k sequence");
    prev_running = st_running;
  end

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(posedge clk);
    slots_seen = '0; reqs_in_loop = 0; loop_k = 0; busy_len = 0; prev_running = 0;
    #1 rst_n = 1;
  endtask

  task automatic wait_loops(input int nl);
    repeat (nl) begin
      @(posedge st_running);
      @(negedge st_running);
    end
  endtask

  initial begin
    fault = 0;
    do_reset();
    wait_loops(2 * KMAX + 1);
    check(healthy && !st_halted, "healthy core stays healthy");
    for (int i = 1; i <= 2 * D; i++) check(t_phi[i], "all verdicts healthy");
    check(n_wrap >= 2, "signature counter wrapped");
    // wrong results from now on
    fault = 1;
    wait_loops(1);
    repeat (2) @(posedge clk);
    #1;
    check(!healthy, "wrong responses detected");
    for (int i = 1; i <= 2 * D; i++) check(!t_phi[i], "every neighbour verdict faulty");
    if (!healthy) n_detect++;
    repeat (TLOOP + 5) @(posedge clk);
    #1 check(st_halted, "faulty node halts");
    if (st_halted) n_halt++;
    // a dead core after a fresh reset
    fault = 2;
    do_reset();
    wait_loops(1);
    repeat (2) @(posedge clk);
    #1 check(!healthy, "missing responses detected");
    if (!healthy) n_detect++;
    $display("spins=%0d holds=%0d wraps=%0d detections=%0d halts=%0d requests=%0d",
             n_spin, n_hold, n_wrap, n_detect, n_halt, n_req);
    check(n_spin > 0, "spin happened");
    check(n_hold > 0, "ring hold happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
