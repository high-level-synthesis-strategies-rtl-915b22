// rgmiu_step3: step 3 of an RGMIU iteration, y2 = B * y1, where B is the
// current N x N inverse and y1 the first N entries of column N+1 of the Gram
// matrix.
//
// All N*N complex products are formed in parallel by cmult instances (the
// loop is fully unrolled, as in the reference design), then each row is
// summed at full precision and rounded once to a word. Timing: latency 2
// (product register, sum register), a new input every cycle of en.
module rgmiu_step3
  import rgmiu_pkg::*;
#(
  parameter int N = 1
) (
  input  logic                    clk,
  input  logic                    en,
  input  cplx_t [N-1:0][N-1:0]    b,
  input  cplx_t [N-1:0]           y1,
  output cplx_t [N-1:0]           y2
);

  cprod_t [N-1:0][N-1:0] p;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      cmult u_mul (.clk, .en, .a(b[i][j]), .b(y1[j]), .p(p[i][j]));
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < N; i++) begin
        logic signed [63:0] acc_re, acc_im;
        acc_re = '0;
        acc_im = '0;
        for (int j = 0; j < N; j++) begin
          acc_re = acc_re + 64'(p[i][j].re);
          acc_im = acc_im + 64'(p[i][j].im);
        end
        y2[i].re <= round_sat(acc_re, FRAC);
        y2[i].im <= round_sat(acc_im, FRAC);
      end
    end
  end

endmodule
