// rr_arbiter - round-robin collision resolution of one processor node.
//
// Flags AF0 .. AF(2d) form a ring shift register that holds a single '1'
// (the token). AF0 permits the node's own self-test unit to start, AFj
// (j = 1 .. 2d) permits the direct neighbour in direction j to start testing
// this node; that flag leaves the node as the neighbour's z input. On every
// CLK1 pulse the token moves from AFj to AF(j+1), and from AF(2d) back to AF0,
// unless the unit holding the token is testing: a tester pulls its free flag
// b low while it tests, which blocks the ring (the AND gates in front of the
// flip-flop clocks) until the test ends. Hence at most one unit tests the node
// at any time.
//
// Each flip-flop of the original scheme is a JK flip-flop whose K input is the
// inverted J input, i.e. a D flip-flop loading its ring predecessor; here that
// is a D register with a clock enable instead of a gated clock. Reset puts the
// token in AF0 (self-test first), as the algorithm's initialisation requires.
//
// Interface: clk1 is the CLK1 enable pulse, free[j] the b flag of the unit
// that slot j serves (free[0] from the self-test unit), af the flags.
// Timing: af changes one clock after a CLK1 pulse that finds the holder free.
// A tester may lower free[j] combinationally in the cycle it sees af[j], so
// a pulse in that very cycle is already blocked.
module rr_arbiter #(
  parameter int unsigned D = 2               // mesh dimension d
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clk1,
  input  logic [2*D:0]   free,
  output logic [2*D:0]   af
);
  localparam int unsigned N = 2 * D + 1;

  logic gate_open;

  // The ring may step only if every slot is either not holding the token or
  // its unit is free (the AND gates of the clock path).
  assign gate_open = &(~af | free);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  af <= N'(1);
    else if (clk1 && gate_open)  af <= {af[N-2:0], af[N-1]};
  end

  a_one_token: assert property (@(posedge clk) disable iff (!rst_n) $onehot(af))
    else $error("rr_arbiter: token lost or duplicated");
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           |(af & ~free) |=> $stable(af))
    else $error("rr_arbiter: token moved while its holder was testing");
endmodule
