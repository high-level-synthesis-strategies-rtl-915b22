// rgmiu_step4: step 4 of an RGMIU iteration, c = 1 / (z - y1^H * y2).
//
// z is the (real) diagonal entry G(N+1,N+1); y1 and y2 come from steps 1 to
// 3. Because B is Hermitian, y1^H * y2 = y1^H * B * y1 is real, so only its
// real part, sum(y1.re*y2.re + y1.im*y2.im), is computed (two real
// multipliers per entry). The difference, the Schur complement of the
// growing Gram block, is rounded to a word and sent to the reciprocal unit.
// Timing: latency L_STEP4 = 2 + DIV_LAT (product register, difference
// register, reciprocal), a new input every cycle of en.
module rgmiu_step4
  import rgmiu_pkg::*;
#(
  parameter int N = 1
) (
  input  logic          clk,
  input  logic          en,
  input  fix_t          z,
  input  cplx_t [N-1:0] y1,
  input  cplx_t [N-1:0] y2,
  output fix_t          c
);

  prod_t [N-1:0] p;
  fix_t          z_q;
  fix_t          d;

  always_ff @(posedge clk) begin
    if (en) begin
      z_q <= z;
      for (int i = 0; i < N; i++) begin
        p[i] <= PW'(y1[i].re * y2[i].re) + PW'(y1[i].im * y2[i].im);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      logic signed [63:0] acc;
      acc = 64'(z_q) <<< FRAC;
      for (int i = 0; i < N; i++) acc = acc - 64'(p[i]);
      d <= round_sat(acc, FRAC);
    end
  end

  recip u_recip (.clk, .en, .d(d), .q(c));

endmodule
