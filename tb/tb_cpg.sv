// tb_cpg - checks the CLK1 pulse chain: one pulse every CLK1_DIV cycles, the
// first CLK1_DIV cycles after reset, for dividers 4 (default), 1 and 3.
module tb_cpg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic p4, p1, p3;

  always #5 clk = ~clk;

  cpg              dut4 (.clk, .rst_n, .clk1(p4));
  cpg #(.CLK1_DIV(1)) dut1 (.clk, .rst_n, .clk1(p1));
  cpg #(.CLK1_DIV(3)) dut3 (.clk, .rst_n, .clk1(p3));

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // cycle c = 1, 2, ... after reset release: counter value is c % DIV, pulse when it is DIV-1
    for (int c = 1; c <= 60; c++) begin
      @(posedge clk); #1;
      checks += 3;
      if (p4 !== (c % 4 == 3)) begin failures++; $display("FAIL div4 cycle %0d p=%b", c, p4); end
      if (p1 !== 1'b1)         begin failures++; $display("FAIL div1 cycle %0d p=%b", c, p1); end
      if (p3 !== (c % 3 == 2)) begin failures++; $display("FAIL div3 cycle %0d p=%b", c, p3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
