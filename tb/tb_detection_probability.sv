// tb_detection_probability - Monte Carlo run of the majority decision.
// Each of the 2d+1 test units of a node holding a faulty core reports the
// fault correctly with probability pi, independently. The majority gate of a
// node (N = 5, 7 and 11 votes: d = 2, 3 and 5) is driven with such random
// votes, and the fraction of trials in which it reports the fault is compared
// with the binomial sum P = sum_{i > N/2} C(N,i) pi^i (1-pi)^(N-i), computed
// here. Also checked: the gain P/pi over a lone self-test is about 1.1956 for
// d = 2 at pi = 0.7 and above 1.3 for d = 5 at pi = 0.7.
module tb_detection_probability;
  localparam int TRIALS = 200000;
  int checks = 0, failures = 0;
  logic [4:0]  v5;  logic y5;
  logic [6:0]  v7;  logic y7;
  logic [10:0] v11; logic y11;

  majority #(.N(5))  m5  (.vote(v5),  .y(y5));
  majority #(.N(7))  m7  (.vote(v7),  .y(y7));
  majority #(.N(11)) m11 (.vote(v11), .y(y11));

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 1; i <= k; i++) r = r * real'(n - k + i) / real'(i);
    return r;
  endfunction

  function automatic real p_detect(int n, real p);
    real s = 0.0;
    for (int i = (n + 1) / 2; i <= n; i++) s += binom(n, i) * (p ** i) * ((1.0 - p) ** (n - i));
    return s;
  endfunction

  function automatic logic bernoulli(real p);
    return real'($urandom) < p * 4294967296.0;
  endfunction

  task automatic run(input int n, input real p);
    int hits = 0;
    real est, ref_p;
    for (int t = 0; t < TRIALS; t++) begin
      for (int i = 0; i < 11; i++) begin
        logic b = bernoulli(p);
        if (i < 5)  v5[i]  = b;
        if (i < 7)  v7[i]  = b;
        v11[i] = b;
      end
      #1;
      case (n)
        5: hits += int'(y5);
        7: hits += int'(y7);
        default: hits += int'(y11);
      endcase
    end
    est   = real'(hits) / real'(TRIALS);
    ref_p = p_detect(n, p);
    checks++;
    if (est - ref_p > 0.006 || ref_p - est > 0.006) begin
      failures++;
      $display("FAIL N=%0d pi=%0.2f measured %0.4f expected %0.4f", n, p, est, ref_p);
    end else
      $display("N=%0d pi=%0.2f: P measured %0.4f, formula %0.4f, gain over self-test %0.4f",
               n, p, est, ref_p, est / p);
  endtask

  initial begin
    real g2, g5;
    run(5, 0.6);  run(5, 0.7);  run(5, 0.9);
    run(7, 0.6);  run(7, 0.7);  run(7, 0.9);
    run(11, 0.6); run(11, 0.7); run(11, 0.9);
    g2 = p_detect(5, 0.7) / 0.7;
    g5 = p_detect(11, 0.7) / 0.7;
    checks++;
    if (g2 < 1.1950 || g2 > 1.1962) begin failures++; $display("FAIL gain d=2 %0.4f", g2); end
    checks++;
    if (g5 <= 1.3) begin failures++; $display("FAIL gain d=5 %0.4f", g5); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
