// core_model - behavioural model of a processor core's test port (testbench only).
//
// The processor cores are not part of the test hardware. This model stands in
// for one: when req is high it runs the "test routine" that the signature sig
// selects and, LATENCY cycles later, places the routine's result on resp and
// holds it there until the next request. The routine of a healthy core is the
// multiply-xorshift mix written out below. Fault modes, selected by 'fault':
//   0  healthy
//   1  wrong result: the response has bit 0 inverted
//   2  no response: resp keeps its old value (the core is dead)
// It also counts the requests it received.
module core_model #(
  parameter int unsigned W_T     = 16,
  parameter int unsigned W_R     = 16,
  parameter int unsigned LATENCY = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req,
  input  logic [W_T-1:0] sig,
  input  logic [1:0]     fault,
  output logic [W_R-1:0] resp,
  output int unsigned    n_req
);
  function automatic logic [W_R-1:0] routine(logic [W_T-1:0] t);
    logic [127:0] p;
    logic [63:0]  r;
    p = {64'd0, 64'(t)} * {64'd0, 64'h9E37_79B9_7F4A_7C15};
    r = p[63:0];
    r = r ^ {29'd0, r[63:29]} ^ 64'h0000_0000_0000_5A5A;
    return r[W_R-1:0];
  endfunction

  logic [W_T-1:0] pend_sig;
  int unsigned    cnt;
  logic           pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp  <= '0;
      pend  <= 1'b0;
      cnt   <= 0;
      n_req <= 0;
      pend_sig <= '0;
    end else begin
      if (req) begin
        pend     <= 1'b1;
        pend_sig <= sig;
        cnt      <= LATENCY - 1;
        n_req    <= n_req + 1;
      end else if (pend) begin
        if (cnt == 0) begin
          pend <= 1'b0;
          unique case (fault)
            2'd0: resp <= routine(pend_sig);
            2'd1: resp <= routine(pend_sig) ^ W_R'(1);
            default: ;
          endcase
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
