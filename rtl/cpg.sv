// cpg - clock pulse generator of the arbitration pulse chain CLK1.
//
// The round-robin arbitration ring is stepped by a pulse chain CLK1. Instead of
// a separate gated clock, this design derives CLK1 from the node clock as a
// one-cycle enable pulse every CLK1_DIV cycles (a modulo counter), so the whole
// test hardware stays in one clock domain. The source only requires that some
// pulse chain (a separate generator or the processor's own) clocks the ring;
// the divider and its ratio are this design's choice.
//
// Interface: clk, active-low asynchronous rst_n, output clk1 (high for one
// cycle out of every CLK1_DIV, first in the CLK1_DIV-th cycle after reset).
module cpg #(
  parameter int unsigned CLK1_DIV = 4   // node clock cycles per CLK1 pulse (>= 1)
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk1
);
  localparam int unsigned CW = (CLK1_DIV > 1) ? $clog2(CLK1_DIV) : 1;
  localparam logic [CW-1:0] LAST = CW'(CLK1_DIV - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (cnt == LAST)  cnt <= '0;
    else                   cnt <= cnt + 1'b1;
  end

  assign clk1 = (cnt == LAST);

  initial assert (CLK1_DIV >= 1) else $error("cpg: CLK1_DIV must be at least 1");
endmodule
