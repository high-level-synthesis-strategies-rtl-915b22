// rgmiu_step6: step 6 of an RGMIU iteration, Gamma = B + c * y2 * y2^H.
//
// The rank-one update is formed as y3 * y2^H, reusing y3 = c * y2 from
// step 5 (so the steps run in series, as drawn in the reference design's
// iteration diagram). Each entry y3(i) * conj(y2(j)) is a full-precision
// cmult product, added to B(i,j) before a single rounding. All N*N entries
// are computed. Inputs b, y2 and y3 must arrive in the same cycle; b is
// delayed internally to meet the products. Timing: latency 2.
module rgmiu_step6
  import rgmiu_pkg::*;
#(
  parameter int N = 1
) (
  input  logic                 clk,
  input  logic                 en,
  input  cplx_t [N-1:0][N-1:0] b,
  input  cplx_t [N-1:0]        y2,
  input  cplx_t [N-1:0]        y3,
  output cplx_t [N-1:0][N-1:0] gamma
);

  cprod_t [N-1:0][N-1:0] p;
  cplx_t  [N-1:0][N-1:0] b_q;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      cmult #(.CONJ_B(1'b1)) u_mul (.clk, .en, .a(y3[i]), .b(y2[j]), .p(p[i][j]));
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      b_q <= b;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          gamma[i][j].re <= round_sat((64'(b_q[i][j].re) <<< FRAC) + 64'(p[i][j].re), FRAC);
          gamma[i][j].im <= round_sat((64'(b_q[i][j].im) <<< FRAC) + 64'(p[i][j].im), FRAC);
        end
      end
    end
  end

endmodule
