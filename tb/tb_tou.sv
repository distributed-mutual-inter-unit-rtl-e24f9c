// tb_tou - test of the test organization unit with modelled test threads.
// The 2d+1 threads (d = 1 here, so 3) are modelled by done pulses at random
// delays after each start. Checked: the first start TAU_LOOP cycles after
// reset, every later start TAU_LOOP+1 cycles after the last done pulse, no
// start before all threads joined, the signature and expected response of
// each start against a reference computed here, k counting 0..KMAX-1 and
// wrapping, and the unit halting for good once the node is no longer healthy.
module tb_tou;
  localparam int D = 1, N = 2 * D + 1, W_T = 16, W_R = 12, KMAX = 4, TLOOP = 5;
  int checks = 0, failures = 0;
  int wraps = 0;
  logic clk = 0, rst_n = 0;
  logic healthy, start, running, halted;
  logic [W_T-1:0] sig;
  logic [W_R-1:0] exp_resp;
  logic [N-1:0] done;
  logic [$clog2(KMAX)-1:0] k;
  int cycle;

  always #5 clk = ~clk;

  tou #(.D(D), .W_T(W_T), .W_R(W_R), .KMAX(KMAX), .TAU_LOOP(TLOOP)) dut (
    .clk, .rst_n, .healthy, .start, .sig, .exp_resp, .done, .k, .running, .halted
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // reference signature table and healthy-core response
  function automatic logic [W_T-1:0] ref_sig(int kk);
    logic [63:0] v;
    v = 64'(kk + 1) * 64'hD1B54A32D192ED03;
    v = v ^ {32'd0, v[63:32]};
    return v[W_T-1:0];
  endfunction
  function automatic logic [W_R-1:0] ref_resp(logic [W_T-1:0] t);
    logic [63:0] r;
    r = 64'(t) * 64'h9E3779B97F4A7C15;
    r = r ^ {29'd0, r[63:29]} ^ 64'h5A5A;
    return r[W_R-1:0];
  endfunction

  always @(posedge clk) cycle <= rst_n ? cycle + 1 : 0;

  initial begin
    int last_done, delay[N], maxd, exp_k;
    healthy = 1; done = '0; cycle = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    last_done = -1;
    exp_k = 0;
    for (int loop = 0; loop < 11; loop++) begin
      // wait for start
      while (!start) begin
        @(posedge clk); #1;
        if (!start) check(!running, "no thread running between loops");
      end
      if (loop == 0) check(cycle == TLOOP, $sformatf("first start at cycle %0d", cycle));
      else           check(cycle == last_done + TLOOP + 1, $sformatf("start %0d cycles after join", cycle - last_done));
      check(sig == ref_sig(exp_k), $sformatf("signature k=%0d", exp_k));
      check(exp_resp == ref_resp(ref_sig(exp_k)), "expected response");
      check(int'(k) == exp_k, "k");
      maxd = 0;
      for (int i = 0; i < N; i++) begin
        delay[i] = $urandom_range(1, 12) + i * 13;  // distinct, ordered
        if (delay[i] > maxd) maxd = delay[i];
      end
      for (int c = 1; c <= maxd; c++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) done[i] = (delay[i] == c);
        @(posedge clk); #1;
        if (c < maxd) check(running && !start, "still running before the join");
      end
      @(negedge clk); done = '0;
      last_done = cycle - 1;
      exp_k = (exp_k + 1) % KMAX;
      if (exp_k == 0) wraps++;
    end
    // the node is judged faulty: the unit must halt and never start again
    healthy = 0;
    repeat (TLOOP + 3) @(posedge clk);
    #1;
    check(halted, "halted after the node was judged faulty");
    for (int c = 0; c < 50; c++) begin
      @(posedge clk); #1;
      check(!start, "no start while halted");
    end
    healthy = 1;
    repeat (20) @(posedge clk);
    #1 check(halted && !start, "halt is permanent");
    check(wraps >= 2, "signature counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
