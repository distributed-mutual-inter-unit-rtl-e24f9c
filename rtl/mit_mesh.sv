// mit_mesh - d-dimensional mesh of processor nodes with mutual inter-unit test.
//
// SIZE[0] x SIZE[1] x ... x SIZE[D-1] nodes, each with the test hardware of
// mit_node. In two dimensions SIZE[0] is the number of rows m (coordinate y)
// and SIZE[1] the number of columns n (coordinate x).
// Every node is tested by its 2d direct neighbours and by itself, 2d+1 testers
// in all, so the majority of their verdicts is always defined. The mesh wraps
// around: a node on an edge is tested by the node on the opposite edge in
// place of the missing neighbour (coordinate arithmetic modulo the size of
// that dimension). Node n has coordinates given by the mixed-radix digits of n
// (digit k runs over 0 .. SIZE[k]-1); neighbour i of node n is
// mit_pkg::nbr_index(n, i, D, sizes), and node n is neighbour opp_dir(i) of it,
// so the tester link t_*[i] of node n meets the tested link s_*[opp_dir(i)]
// of that neighbour.
//
// The processor cores are outside this design: each node's core test port
// (core_req, core_sig in; core_resp back) is a port of the mesh, and healthy[n]
// is node n's generalized flag. Each node sends that flag to its 2d direct
// neighbours: nbr_healthy[n][i] is the flag node n receives from its neighbour
// in direction i, the signal its core would use to isolate a faulty neighbour
// (what the core does with it is outside this design). All nodes share one
// clock and reset.
//
// The wrap-around neighbour rule, the m x n sizes and the d-dimensional
// generality follow the source; the 4 x 4 default is this design's choice.
module mit_mesh
  import mit_pkg::*;
#(
  parameter int unsigned D        = 2,        // mesh dimension d
  // nodes per dimension, entry k for dimension k (>= 2 each); for instance
  // '{0: 3, 1: 5, default: 1} is 3 rows by 5 columns
  parameter dims_t       SIZE     = uniform_dims(D, 4),
  parameter int unsigned W_T      = W_T_DEF,  // test signature width
  parameter int unsigned W_R      = W_R_DEF,  // response token width
  parameter int unsigned KMAX     = 8,        // test signatures per node
  parameter int unsigned TAU_LOOP = 64,       // cycles between test loops
  parameter int unsigned TAU_RESP = 16,       // response time limit, cycles
  parameter int unsigned CLK1_DIV = 4,        // node cycles per CLK1 pulse
  localparam int unsigned NN       = node_count(D, SIZE) // number of nodes
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           core_req  [NN],
  output logic [W_T-1:0] core_sig  [NN],
  input  logic [W_R-1:0] core_resp [NN],
  output logic           healthy   [NN],
  output logic           nbr_healthy [NN][1:2*D]
);
  logic           t_req  [NN][1:2*D];
  logic [W_T-1:0] t_sig  [NN][1:2*D];
  logic           t_b    [NN][1:2*D];
  logic           t_phi  [NN][1:2*D];
  logic [W_R-1:0] t_resp [NN][1:2*D];
  logic           t_z    [NN][1:2*D];
  logic           s_req  [NN][1:2*D];
  logic [W_T-1:0] s_sig  [NN][1:2*D];
  logic           s_b    [NN][1:2*D];
  logic           s_phi  [NN][1:2*D];
  logic [W_R-1:0] s_resp [NN][1:2*D];
  logic           s_z    [NN][1:2*D];

  for (genvar n = 0; n < NN; n++) begin : g_node
    // wiring between node n and its neighbour in each direction
    for (genvar i = 1; i <= 2 * D; i++) begin : g_link
      localparam int unsigned M = nbr_index(n, i, D, SIZE);
      localparam int unsigned O = opp_dir(i, D);
      assign s_req[n][i]  = t_req[M][O];
      assign s_sig[n][i]  = t_sig[M][O];
      assign s_b[n][i]    = t_b[M][O];
      assign s_phi[n][i]  = t_phi[M][O];
      assign t_resp[n][i] = s_resp[M][O];
      assign t_z[n][i]    = s_z[M][O];
      assign nbr_healthy[n][i] = healthy[M];
    end

    mit_node #(
      .D(D), .W_T(W_T), .W_R(W_R), .KMAX(KMAX),
      .TAU_LOOP(TAU_LOOP), .TAU_RESP(TAU_RESP), .CLK1_DIV(CLK1_DIV)
    ) u_node (
      .clk, .rst_n,
      .t_req(t_req[n]), .t_sig(t_sig[n]), .t_b(t_b[n]), .t_phi(t_phi[n]),
      .t_resp(t_resp[n]), .t_z(t_z[n]),
      .s_req(s_req[n]), .s_sig(s_sig[n]), .s_b(s_b[n]), .s_phi(s_phi[n]),
      .s_resp(s_resp[n]), .s_z(s_z[n]),
      .core_req(core_req[n]), .core_sig(core_sig[n]), .core_resp(core_resp[n]),
      .healthy(healthy[n]),
      .st_k(), .st_running(), .st_halted(), .st_waiting(), .st_af()
    );
  end

  initial begin
    assert (D >= 1 && D <= MAX_D) else $error("mit_mesh: D out of range");
    for (int k = 0; k < D; k++)
      assert (SIZE[k] >= 2) else $error("mit_mesh: every dimension needs at least 2 nodes");
  end
endmodule
