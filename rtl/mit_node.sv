// mit_node - the test hardware of one processor node of a d-dimensional mesh.
//
// Contents: a test organization unit (tou) running the test loop, 2d
// neighbour check units (ncu, NCU1 .. NCU2d) testing the direct neighbours,
// a self-test unit (an ncu instance, STU) testing the node's own core, the
// round-robin arbiter (rr_arbiter, flags AF0 .. AF2d) that lets exactly one of
// {own STU, the 2d neighbours} test this node at a time, the clock pulse
// generator of the arbitration pulse chain (cpg) and the majority gate that
// forms the node's generalized healthy/faulty flag from its own self-test
// verdict and the 2d verdicts of the neighbours that test it.
//
// Links, all indexed by direction 1 .. 2d (see mit_pkg for the numbering):
//   t_*  this node as tester: NCU i drives t_req/t_sig/t_b/t_phi towards the
//        neighbour in direction i and receives its t_resp and t_z.
//   s_*  this node as tested node: the neighbour in direction j drives
//        s_req/s_sig/s_b/s_phi; this node returns s_resp and s_z = AFj.
//   core_* the test port of the processor core: core_req strobes a signature
//        core_sig into the core, which must place the response token on
//        core_resp within TAU_RESP cycles and hold it until the next strobe.
//   st_*   status outputs (signature index, loop running, halted, threads
//        spinning on their flag, arbitration flags) for observation.
// Because at most one tester holds the token, the core port is a plain
// multiplexer steered by the token, and the core's response is returned on
// every link (only the token holder samples it).
//
// The structure (NCUs, STU, TOU, AF ring, CPG, majority gate) follows the
// source; the link signal set, the single clock with a CLK1 enable and the
// token-steered core port are this design's choices.
module mit_node
  import mit_pkg::*;
#(
  parameter int unsigned D        = 2,        // mesh dimension d
  parameter int unsigned W_T      = W_T_DEF,  // test signature width
  parameter int unsigned W_R      = W_R_DEF,  // response token width
  parameter int unsigned KMAX     = 8,        // test signatures per node
  parameter int unsigned TAU_LOOP = 64,       // cycles between test loops
  parameter int unsigned TAU_RESP = 16,       // response time limit, cycles
  parameter int unsigned CLK1_DIV = 4         // node cycles per CLK1 pulse
) (
  input  logic           clk,
  input  logic           rst_n,
  // this node testing its neighbours
  output logic           t_req  [1:2*D],
  output logic [W_T-1:0] t_sig  [1:2*D],
  output logic           t_b    [1:2*D],
  output logic           t_phi  [1:2*D],
  input  logic [W_R-1:0] t_resp [1:2*D],
  input  logic           t_z    [1:2*D],
  // the neighbours testing this node
  input  logic           s_req  [1:2*D],
  input  logic [W_T-1:0] s_sig  [1:2*D],
  input  logic           s_b    [1:2*D],
  input  logic           s_phi  [1:2*D],
  output logic [W_R-1:0] s_resp [1:2*D],
  output logic           s_z    [1:2*D],
  // test port of the processor core
  output logic           core_req,
  output logic [W_T-1:0] core_sig,
  input  logic [W_R-1:0] core_resp,
  // generalized flag: 1 = node healthy
  output logic           healthy,
  // status, for observation only
  output logic [$clog2(KMAX)-1:0] st_k,        // current signature index
  output logic           st_running,           // a test loop is in progress
  output logic           st_halted,            // node judged faulty, no longer tests
  output logic [2*D:0]   st_waiting,           // thread i spins on its z flag
  output logic [2*D:0]   st_af                 // arbitration flags AF0 .. AF2d
);
  localparam int unsigned N = 2 * D + 1;

  // ---- test organization unit ----
  logic           start;
  logic [W_T-1:0] sig;
  logic [W_R-1:0] exp_resp;
  logic [N-1:0]   done;
  logic [$clog2(KMAX)-1:0] k;
  logic           running, halted;

  tou #(.D(D), .W_T(W_T), .W_R(W_R), .KMAX(KMAX), .TAU_LOOP(TAU_LOOP)) u_tou (
    .clk, .rst_n, .healthy, .start, .sig, .exp_resp, .done, .k, .running, .halted
  );
  assign st_k       = k;
  assign st_running = running;
  assign st_halted  = halted;


  // ---- self-test unit (thread B_0) ----
  logic           stu_req, stu_b, stu_phi, stu_wait;
  logic [W_T-1:0] stu_sig;
  logic [N-1:0]   af;
  logic [N-1:0]   waiting;

  ncu #(.W_T(W_T), .W_R(W_R), .TAU_RESP(TAU_RESP)) u_stu (
    .clk, .rst_n, .start, .sig_in(sig), .exp_in(exp_resp), .done(done[0]),
    .z(af[0]), .b(stu_b), .req(stu_req), .sig_out(stu_sig), .resp_in(core_resp),
    .phi(stu_phi), .waiting(stu_wait)
  );
  assign waiting[0] = stu_wait;

  // ---- neighbour check units (threads B_1 .. B_2d) ----
  for (genvar i = 1; i <= 2 * D; i++) begin : g_ncu
    logic w;
    ncu #(.W_T(W_T), .W_R(W_R), .TAU_RESP(TAU_RESP)) u_ncu (
      .clk, .rst_n, .start, .sig_in(sig), .exp_in(exp_resp), .done(done[i]),
      .z(t_z[i]), .b(t_b[i]), .req(t_req[i]), .sig_out(t_sig[i]), .resp_in(t_resp[i]),
      .phi(t_phi[i]), .waiting(w)
    );
    assign waiting[i] = w;
  end

  // ---- round-robin collision resolution ----
  logic         clk1;
  logic [N-1:0] free;

  cpg #(.CLK1_DIV(CLK1_DIV)) u_cpg (.clk, .rst_n, .clk1);

  assign free[0] = stu_b;
  for (genvar j = 1; j <= 2 * D; j++) begin : g_slot
    assign free[j]   = s_b[j];
    assign s_z[j]    = af[j];
    assign s_resp[j] = core_resp;
  end

  rr_arbiter #(.D(D)) u_arb (.clk, .rst_n, .clk1, .free, .af);

  // ---- core test port, steered by the token ----
  always_comb begin
    core_req = af[0] & stu_req;
    core_sig = af[0] ? stu_sig : '0;
    for (int unsigned j = 1; j <= 2 * D; j++) begin
      core_req = core_req | (af[j] & s_req[j]);
      if (af[j]) core_sig = s_sig[j];
    end
  end

  // ---- majority gate: own verdict and the verdicts of the testers ----
  logic [N-1:0] vote;
  always_comb begin
    vote[0] = stu_phi;
    for (int unsigned j = 1; j <= 2 * D; j++) vote[j] = s_phi[j];
  end

  majority #(.N(N)) u_maj (.vote, .y(healthy));

  assign st_waiting = waiting;
  assign st_af      = af;

  // Collision freedom: a unit that tests this node holds the token.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
                                   (~free & ~af) == '0)
    else $error("mit_node: a unit tests this node without holding the token");
endmodule
