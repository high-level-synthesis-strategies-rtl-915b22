// rgmiu_step5: step 5 of an RGMIU iteration, y3 = c * y2.
//
// c is real, so each entry takes two real multipliers; the products are
// rounded back to words. Timing: latency 1, a new input every cycle of en.
module rgmiu_step5
  import rgmiu_pkg::*;
#(
  parameter int N = 1
) (
  input  logic          clk,
  input  logic          en,
  input  fix_t          c,
  input  cplx_t [N-1:0] y2,
  output cplx_t [N-1:0] y3
);

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < N; i++) begin
        y3[i].re <= round_sat(64'(c * y2[i].re), FRAC);
        y3[i].im <= round_sat(64'(c * y2[i].im), FRAC);
      end
    end
  end

endmodule
