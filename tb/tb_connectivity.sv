// tb_connectivity - counts the external test terminals of a node and compares
// them with the closed-form count Omega = 2d(2(W_R + W_T + 4) + 1): 2d tester
// links and 2d tested links of W_T + W_R + 4 wires each, plus the node's
// generalized flag sent to each of its 2d neighbours. Done for d = 2, 3, 4 and
// signature/response widths 16/16 and 32/32. The node is also run briefly with
// its links looped back so that the counted ports are live.
module tb_connectivity;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  function automatic int omega(int d, int wt, int wr);
    return 2 * d * (2 * (wr + wt + 4) + 1);
  endfunction

  for (genvar gd = 2; gd <= 4; gd++) begin : g_d
    for (genvar gw = 16; gw <= 32; gw += 16) begin : g_w
      localparam int D = gd, W = gw, N = 2 * D + 1;
      logic           t_req [1:2*D], t_b [1:2*D], t_phi [1:2*D], t_z [1:2*D];
      logic [W-1:0]   t_sig [1:2*D];
      logic [W-1:0]   t_resp [1:2*D];
      logic           s_req [1:2*D], s_b [1:2*D], s_phi [1:2*D], s_z [1:2*D];
      logic [W-1:0]   s_sig [1:2*D];
      logic [W-1:0]   s_resp [1:2*D];
      logic           core_req, healthy, st_running, st_halted;
      logic [W-1:0]   core_sig, core_resp;
      logic [2:0]     st_k;
      logic [N-1:0]   st_waiting, st_af;
      for (genvar i = 1; i <= 2 * D; i++) begin : g_loop
        localparam int O = mit_pkg::opp_dir(i, D);
        assign s_req[O] = t_req[i];  assign s_sig[O] = t_sig[i];
        assign s_b[O]   = t_b[i];    assign s_phi[O] = t_phi[i];
        assign t_resp[i] = s_resp[O]; assign t_z[i]  = s_z[O];
      end
      // the core answers with the signature itself, so every test fails
      assign core_resp = core_sig;
      mit_node #(.D(D), .W_T(W), .W_R(W), .TAU_LOOP(4), .TAU_RESP(2), .CLK1_DIV(1)) u_node (
        .clk, .rst_n, .t_req, .t_sig, .t_b, .t_phi, .t_resp, .t_z,
        .s_req, .s_sig, .s_b, .s_phi, .s_resp, .s_z,
        .core_req, .core_sig, .core_resp, .healthy,
        .st_k, .st_running, .st_halted, .st_waiting, .st_af
      );
      // wires of the 2d tester links and of the 2d tested links, plus one
      // generalized-flag terminal per neighbour
      localparam int TERMINALS = $bits(t_req) + $bits(t_sig) + $bits(t_b) + $bits(t_phi)
                               + $bits(t_resp) + $bits(t_z)
                               + $bits(s_req) + $bits(s_sig) + $bits(s_b) + $bits(s_phi)
                               + $bits(s_resp) + $bits(s_z) + 2 * D * $bits(healthy);
      initial begin
        #1;
        checks++;
        if (TERMINALS != omega(D, W, W)) begin
          failures++;
          $display("FAIL d=%0d W=%0d terminals=%0d omega=%0d", D, W, TERMINALS, omega(D, W, W));
        end else $display("d=%0d W_T=W_R=%0d: %0d terminals", D, W, TERMINALS);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (400) @(posedge clk);
    #1;
    // every node judged its own (mis-answering) core faulty and stopped
    checks++; if (g_d[2].g_w[16].healthy || !g_d[2].g_w[16].st_halted) failures++;
    checks++; if (g_d[4].g_w[32].healthy || !g_d[4].g_w[32].st_halted) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
