// ncu - neighbour check unit: one test thread B_i of a processor node.
//
// The same unit serves as NCU1 .. NCU2d (testing the direct neighbour i) and,
// with its link wired to the node's own core, as the self-test unit STU
// (thread B_0); the source states that all threads are identical.
//
// Sequence for one test signature:
//   IDLE  start pulse from the test organization unit: the signature T(k) and
//         the expected response R0(k) are latched, then
//   SPIN  wait for the arbitration flag z of the tested node. In the cycle z
//         is seen high the unit lowers its free flag b (so the tested node's
//         ring stops with the token on this unit) and sends the signature
//         with a one-cycle req strobe;
//   TEST  the response timer runs for TAU_RESP cycles; in the last of them
//         the response lines are sampled and compared with R0(k). A mismatch
//         (also a missing response) clears the healthy flag phi; a match
//         leaves it as it is. b rises again and done pulses for one cycle.
// phi is set to 1 by reset and, once cleared, stays cleared (a detected fault
// is permanent); this reading follows "Otherwise, nothing happens and phi
// remains high".
//
// Timing: req is high in cycle t0; the response is sampled at the clock edge
// ending cycle t0 + TAU_RESP, when done is high; b is low from t0 to
// t0 + TAU_RESP inclusive. sig_out holds the latched signature throughout.
module ncu
  import mit_pkg::*;
#(
  parameter int unsigned W_T      = W_T_DEF,  // test signature width
  parameter int unsigned W_R      = W_R_DEF,  // response token width
  parameter int unsigned TAU_RESP = 16        // response time limit tau_i^max, cycles (>= 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // from the test organization unit
  input  logic           start,
  input  logic [W_T-1:0] sig_in,
  input  logic [W_R-1:0] exp_in,
  output logic           done,
  // link to the tested node
  input  logic           z,        // arbitration flag: permitted to start
  output logic           b,        // free flag: low while this unit tests
  output logic           req,      // signature strobe
  output logic [W_T-1:0] sig_out,
  input  logic [W_R-1:0] resp_in,
  output logic           phi,      // 1 = tested node judged healthy
  // status
  output logic           waiting   // spinning on z
);
  typedef enum logic [1:0] {S_IDLE, S_SPIN, S_TEST} state_e;

  localparam int unsigned TW = (TAU_RESP > 1) ? $clog2(TAU_RESP) : 1;

  state_e         state;
  logic [TW-1:0]  tau;
  logic [W_R-1:0] exp_q;
  logic           grant;

  assign grant   = (state == S_SPIN) && z;
  assign req     = grant;
  assign b       = !(grant || state == S_TEST);
  assign done    = (state == S_TEST) && (tau == '0);
  assign waiting = (state == S_SPIN) && !z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tau     <= '0;
      exp_q   <= '0;
      sig_out <= '0;
      phi     <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          sig_out <= sig_in;
          exp_q   <= exp_in;
          state   <= S_SPIN;
        end
        S_SPIN: if (z) begin
          tau   <= TW'(TAU_RESP - 1);
          state <= S_TEST;
        end
        S_TEST: if (tau == '0) begin
          if (resp_in != exp_q) phi <= 1'b0;
          state <= S_IDLE;
        end else begin
          tau <= tau - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (TAU_RESP >= 1) else $error("ncu: TAU_RESP must be at least 1");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> state == S_IDLE)
    else $error("ncu: start while a test is in progress");
endmodule
