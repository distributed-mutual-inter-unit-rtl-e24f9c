// tb_ncu - directed tests of one test thread.
// A small model of the tested node raises z after a random delay and answers
// a request with a chosen response. Checked: req only while z is high and
// the thread was started, the signature on the link, b low exactly from the
// request cycle through the sampling cycle, done exactly TAU_RESP cycles after
// the request, phi kept on a match, cleared on a mismatch and on a missing
// response, and staying cleared afterwards.
module tb_ncu;
  localparam int W_T = 16, W_R = 16, TAU = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, done, z, b, req, phi, waiting;
  logic [W_T-1:0] sig_in, sig_out;
  logic [W_R-1:0] exp_in, resp_in;

  always #5 clk = ~clk;

  ncu #(.W_T(W_T), .W_R(W_R), .TAU_RESP(TAU)) dut (
    .clk, .rst_n, .start, .sig_in, .exp_in, .done, .z, .b, .req, .sig_out,
    .resp_in, .phi, .waiting
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One test: start, z after zdelay cycles, response 'resp' placed rdelay
  // cycles after the request (rdelay > TAU means no response in time).
  task automatic run_one(input logic [W_T-1:0] s, input logic [W_R-1:0] e,
                         input logic [W_R-1:0] r, input int zdelay, input int rdelay,
                         input logic phi_after);
    int t_req, t_done, cyc;
    logic seen_req;
    @(negedge clk);
    start = 1; sig_in = s; exp_in = e;
    @(negedge clk);
    start = 0; sig_in = '0; exp_in = '0;
    // spinning: no request, b high
    for (int i = 0; i < zdelay; i++) begin
      check(!req && b && waiting, "spin: req low, b high, waiting");
      @(negedge clk);
    end
    z = 1;
    #1;
    check(req && !b && !waiting, "request in the cycle z is seen");
    check(sig_out == s, "signature on the link");
    seen_req = 1; t_req = 0; t_done = -1;
    @(negedge clk);
    z = 0;
    for (cyc = 1; cyc <= TAU + 2; cyc++) begin
      if (cyc == rdelay) resp_in = r;
      #1;
      if (done) t_done = cyc;
      if (cyc <= TAU) check(!b, "b low during the test");
      else            check(b, "b high after the test");
      check(!req, "single request strobe");
      @(negedge clk);
    end
    check(t_done == TAU, $sformatf("done %0d cycles after the request", t_done));
    check(phi == phi_after, "phi after the test");
  endtask

  initial begin
    start = 0; z = 0; sig_in = '0; exp_in = '0; resp_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(phi && b && !req, "reset state");
    // z already high must not matter before start
    z = 1;
    repeat (3) begin @(negedge clk); check(!req && b, "no request before start"); end
    z = 0;
    run_one(16'h1234, 16'hBEEF, 16'hBEEF, 3, 2, 1'b1);   // match, quick response
    run_one(16'h0F0F, 16'h4321, 16'h4321, 0, TAU, 1'b1); // response in the last cycle
    run_one(16'h5555, 16'h7777, 16'h7777, 7, 1, 1'b1);
    run_one(16'hAAAA, 16'h1111, 16'h1110, 2, 3, 1'b0);   // wrong response
    run_one(16'h1234, 16'hBEEF, 16'hBEEF, 1, 2, 1'b0);   // stays faulty
    // second instance behaviour: missing response after a fresh reset
    rst_n = 0; #1; rst_n = 1;
    resp_in = '0;
    run_one(16'h2222, 16'h3333, 16'h3333, 2, TAU + 1, 1'b0); // too late
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
