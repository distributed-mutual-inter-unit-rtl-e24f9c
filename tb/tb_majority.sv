// tb_majority - exhaustive check of the majority gate for 5 and 7 votes
// (two- and three-dimensional meshes). The reference counts ones bit by bit.
module tb_majority;
  int checks = 0, failures = 0;
  logic [4:0] v5; logic y5;
  logic [6:0] v7; logic y7;

  majority #(.N(5)) dut5 (.vote(v5), .y(y5));
  majority #(.N(7)) dut7 (.vote(v7), .y(y7));

  function automatic logic ref_maj(logic [6:0] v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) if (v[i]) c++;
    return (2 * c > n);
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) begin
      v5 = 5'(i); #1;
      checks++;
      if (y5 !== ref_maj(7'(i), 5)) begin failures++; $display("FAIL N=5 vote=%b y=%b", v5, y5); end
    end
    for (int i = 0; i < 128; i++) begin
      v7 = 7'(i); #1;
      checks++;
      if (y7 !== ref_maj(7'(i), 7)) begin failures++; $display("FAIL N=7 vote=%b y=%b", v7, y7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
