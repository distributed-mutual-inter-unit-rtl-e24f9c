// tou - test organization unit of one processor node.
//
// Runs the outer test loop of the node:
//   1. the loop timer counts TAU_LOOP cycles (time between two test loops);
//   2. if the node's own generalized flag still says healthy, signature T(k)
//      and its expected response R0(k) are read from the signature store and
//      a one-cycle start pulse launches all 2d+1 test threads (the 2d NCUs and
//      the STU) at once; a node judged faulty stops testing for good;
//   3. the unit waits until every thread has reported done (the join of the
//      parallel section), then increments k modulo KMAX and starts over.
// The signature store is a constant table of KMAX entries; the source leaves
// its contents to the test routines predefined in the cores, and this design
// fills it from mit_pkg::signature_word / reference_response. All cores are
// identical, so one expected-response entry per signature serves all threads.
//
// Interface: healthy in, start / sig / exp out to the threads, done[0..2d]
// in from the threads (single-cycle pulses), k and loop state out.
// Timing: start is high in the TAU_LOOP-th cycle after reset, and
// TAU_LOOP+1 cycles after the last done pulse of the previous loop; sig and
// exp_resp stay valid from start until the next start.
module tou
  import mit_pkg::*;
#(
  parameter int unsigned D        = 2,        // mesh dimension d
  parameter int unsigned W_T      = W_T_DEF,  // test signature width
  parameter int unsigned W_R      = W_R_DEF,  // response token width
  parameter int unsigned KMAX     = 8,        // number of test signatures k^max
  parameter int unsigned TAU_LOOP = 64        // loop timer tau^max, cycles (>= 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    healthy,
  output logic                    start,
  output logic [W_T-1:0]          sig,
  output logic [W_R-1:0]          exp_resp,
  input  logic [2*D:0]            done,
  output logic [$clog2(KMAX)-1:0] k,
  output logic                    running,   // threads launched, not all done
  output logic                    halted     // node judged faulty, testing stopped
);
  typedef enum logic [1:0] {S_TIMER, S_RUN, S_HALT} state_e;

  localparam int unsigned KW = $clog2(KMAX);
  localparam int unsigned TW = (TAU_LOOP > 1) ? $clog2(TAU_LOOP) : 1;

  // signature store: T(k) and R0(k)
  logic [W_T-1:0] sig_rom [KMAX];
  logic [W_R-1:0] exp_rom [KMAX];
  for (genvar g = 0; g < KMAX; g++) begin : g_rom
    localparam logic [63:0] T64 = signature_word(g);
    localparam logic [63:0] R64 = reference_response(64'(T64[W_T-1:0]));
    assign sig_rom[g] = T64[W_T-1:0];
    assign exp_rom[g] = R64[W_R-1:0];
  end

  state_e        state;
  logic [TW-1:0] tau;
  logic [2*D:0]  joined;
  logic [2*D:0]  joined_nxt;

  assign joined_nxt = joined | done;
  assign running    = (state == S_RUN);
  assign halted     = (state == S_HALT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_TIMER;
      tau      <= TW'(TAU_LOOP - 1);
      k        <= '0;
      start    <= 1'b0;
      sig      <= '0;
      exp_resp <= '0;
      joined   <= '0;
    end else begin
      start <= 1'b0;
      unique case (state)
        S_TIMER:
          if (!healthy) begin
            state <= S_HALT;
          end else if (tau == '0) begin
            sig      <= sig_rom[k];
            exp_resp <= exp_rom[k];
            start    <= 1'b1;
            joined   <= '0;
            state    <= S_RUN;
          end else begin
            tau <= tau - 1'b1;
          end
        S_RUN: begin
          joined <= joined_nxt;
          if (&joined_nxt) begin
            k     <= (k == KW'(KMAX - 1)) ? '0 : k + 1'b1;
            tau   <= TW'(TAU_LOOP - 1);
            state <= S_TIMER;
          end
        end
        S_HALT: ;
        default: state <= S_HALT;
      endcase
    end
  end

  initial assert (KMAX >= 2 && TAU_LOOP >= 1) else $error("tou: KMAX must be >= 2 and TAU_LOOP >= 1");
endmodule
