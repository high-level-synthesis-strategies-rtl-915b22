// cmult: pipelined complex multiplier, p = a * b, or a * conj(b) when CONJ_B
// is set.
//
// Built as four real W x W multipliers and two real adders, the structure
// the reference design uses for every complex product. The result is kept
// at full precision (2W+1 bits per part, no rounding) so that the consumer
// can sum several products before rounding once. Computing a * conj(b)
// directly avoids negating b.im, which could overflow for the most negative
// word. Timing: one register stage, advanced by en (latency 1).
module cmult
  import rgmiu_pkg::*;
#(
  parameter bit CONJ_B = 1'b0
) (
  input  logic   clk,
  input  logic   en,
  input  cplx_t  a,
  input  cplx_t  b,
  output cprod_t p
);

  logic signed [2*W-1:0] rr, ii, ri, ir;

  always_comb begin
    rr = a.re * b.re;
    ii = a.im * b.im;
    ri = a.re * b.im;
    ir = a.im * b.re;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (CONJ_B) begin
        p.re <= PW'(rr) + PW'(ii);
        p.im <= PW'(ir) - PW'(ri);
      end else begin
        p.re <= PW'(rr) - PW'(ii);
        p.im <= PW'(ri) + PW'(ir);
      end
    end
  end

endmodule
