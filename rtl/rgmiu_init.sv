// rgmiu_init: starting point of the RGMIU recursion, the 1 x 1 inverse
// B1 = 1 / G(1,1), computed by the pipelined reciprocal unit from the real
// part of the first diagonal entry (the imaginary part of a Gram diagonal is
// zero). G and the valid flag are delayed to stay aligned with B1.
// Interface as rgmiu_iter. Timing: latency DIV_LAT, a new matrix every
// cycle of en.
module rgmiu_init
  import rgmiu_pkg::*;
#(
  parameter int K = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  cplx_t [K-1:0][K-1:0] g_i,
  output logic                 out_valid,
  output cplx_t [0:0][0:0]     b_o,
  output cplx_t [K-1:0][K-1:0] g_o
);

  typedef cplx_t [K-1:0][K-1:0] gram_t;

  fix_t c;
  recip u_recip (.clk, .en, .d(g_i[0][0].re), .q(c));

  always_comb begin
    b_o[0][0].re = c;
    b_o[0][0].im = '0;
  end

  pipe_delay #(.T(gram_t), .DEPTH(DIV_LAT)) u_d_g (.clk, .rst_n, .en, .d(g_i), .q(g_o));
  pipe_delay #(.T(logic), .DEPTH(DIV_LAT), .HAS_RESET(1'b1))
    u_d_v (.clk, .rst_n, .en, .d(in_valid), .q(out_valid));

endmodule
