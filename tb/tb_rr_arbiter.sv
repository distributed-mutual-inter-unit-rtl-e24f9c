// tb_rr_arbiter - random test of the arbitration ring against a token model.
// Each cycle the CLK1 pulse and the free flags are random; the model moves
// its token position by one slot (wrapping 2d -> 0) when a pulse finds the
// holder free. Checked every cycle: af equals the model's one-hot flag.
// Also counted: the token held by a busy holder and a full turn of the ring.
module tb_rr_arbiter;
  localparam int D = 2;
  localparam int N = 2 * D + 1;
  int checks = 0, failures = 0;
  int holds = 0, turns = 0;
  logic clk = 0, rst_n = 0;
  logic clk1;
  logic [N-1:0] free, af;
  int pos;

  always #5 clk = ~clk;

  rr_arbiter #(.D(D)) dut (.clk, .rst_n, .clk1, .free, .af);

  initial begin
    clk1 = 0; free = '1; pos = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (af !== N'(1)) begin failures++; $display("FAIL reset value af=%b", af); end
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      clk1 = ($urandom_range(0, 1) == 1);
      free = N'($urandom);
      // keep the holder busy for stretches, as a test would
      if ((c / 7) % 3 == 0) free[pos] = 1'b0;
      @(posedge clk);
      if (clk1 && free[pos]) begin
        pos = (pos + 1) % N;
        if (pos == 0) turns++;
      end else if (clk1) begin
        holds++;
      end
      #1;
      checks++;
      if (af !== N'(1) << pos) begin
        failures++;
        $display("FAIL cycle %0d af=%b expected slot %0d", c, af, pos);
      end
    end
    checks++;
    if (holds == 0 || turns == 0) begin failures++; $display("FAIL holds=%0d turns=%0d", holds, turns); end
    $display("ring turns=%0d holds=%0d", turns, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
