// majority - majority gate of the 2d+1 healthy/faulty flags of one node.
//
// Input bit 0 is the node's own self-test verdict, bits 1 .. 2d are the
// verdicts of the neighbours that test it (1 = healthy). The output, the
// node's generalized flag, is 1 when more than half of the inputs are 1.
// With an odd number of inputs there is never a tie. Purely combinational,
// realised as a population count and a compare.
module majority #(
  parameter int unsigned N = 5   // number of votes, 2d+1
) (
  input  logic [N-1:0] vote,
  output logic         y
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < N; i++) ones = ones + CW'(vote[i]);
  end

  assign y = (ones > CW'(N / 2));
endmodule
