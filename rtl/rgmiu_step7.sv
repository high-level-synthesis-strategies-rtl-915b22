// rgmiu_step7: step 7 of an RGMIU iteration, assembly of the grown inverse
//   B_next = [ Gamma    -y3 ]
//            [ -y3^H     c  ]
// an (N+1) x (N+1) matrix. Only negation and conjugation are needed
// (negation saturates the most negative word). Timing: one register stage.
module rgmiu_step7
  import rgmiu_pkg::*;
#(
  parameter int N = 1
) (
  input  logic                 clk,
  input  logic                 en,
  input  cplx_t [N-1:0][N-1:0] gamma,
  input  cplx_t [N-1:0]        y3,
  input  fix_t                 c,
  output cplx_t [N:0][N:0]     b_next
);

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) b_next[i][j] <= gamma[i][j];
        b_next[i][N].re <= neg_sat(y3[i].re);
        b_next[i][N].im <= neg_sat(y3[i].im);
        b_next[N][i].re <= neg_sat(y3[i].re);
        b_next[N][i].im <= y3[i].im;
      end
      b_next[N][N].re <= c;
      b_next[N][N].im <= '0;
    end
  end

endmodule
