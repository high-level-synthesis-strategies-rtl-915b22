// rgmiu_iter: one iteration of the RGMIU recursion. From the inverse B_N of
// the leading N x N block of the Gram matrix G, it builds the inverse
// B_{N+1} of the leading (N+1) x (N+1) block.
//
//   step 1  z  = G(N+1,N+1)            (selection, no logic)
//   step 2  y1 = G(1:N, N+1)           (selection, no logic)
//   step 3  y2 = B_N * y1              rgmiu_step3, 2 cycles
//   step 4  c  = 1 / (z - y1^H y2)     rgmiu_step4, 2 + DIV_LAT cycles
//   step 5  y3 = c * y2                rgmiu_step5, 1 cycle
//   step 6  Gamma = B_N + y3 * y2^H    rgmiu_step6, 2 cycles
//   step 7  B_{N+1} = [Gamma -y3; -y3^H c]   rgmiu_step7, 1 cycle
//
// The steps form one pipeline, in series as in the reference design's
// iteration diagram; pipe_delay side paths hold y1, z, y2, y3, c and B until
// the step that needs them. Only the upper triangle and the diagonal of G
// are read (G is Hermitian). The whole of G travels with the data, delayed
// by the iteration latency, for the iterations further down the chain.
//
// Interface: in_valid/out_valid mark the cycles that carry a matrix; en
// advances every register (low = stall). Timing: latency ITER_LAT =
// DIV_LAT + 8 cycles of en, a new matrix every cycle. Requires N < K.
module rgmiu_iter
  import rgmiu_pkg::*;
#(
  parameter int N = 1,   // size of the incoming inverse
  parameter int K = 2    // size of the Gram matrix carried along
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  cplx_t [N-1:0][N-1:0] b_i,
  input  cplx_t [K-1:0][K-1:0] g_i,
  output logic                 out_valid,
  output cplx_t [N:0][N:0]     b_o,
  output cplx_t [K-1:0][K-1:0] g_o
);

  if (N < 1 || N >= K) begin : g_bad_size
    $error("rgmiu_iter: N must satisfy 1 <= N < K");
  end

  typedef cplx_t [N-1:0]        vec_t;
  typedef cplx_t [N-1:0][N-1:0] mat_t;
  typedef cplx_t [K-1:0][K-1:0] gram_t;

  // Steps 1 and 2: select z and y1 from column N (0-based) of G.
  vec_t y1;
  fix_t z;
  always_comb begin
    for (int i = 0; i < N; i++) y1[i] = g_i[i][N];
    z = g_i[N][N].re;
  end

  // Step 3.
  vec_t y2;
  rgmiu_step3 #(.N(N)) u_step3 (.clk, .en, .b(b_i), .y1(y1), .y2(y2));

  // Step 4, with y1 and z delayed to meet y2.
  vec_t y1_s4;
  fix_t z_s4;
  fix_t c;
  pipe_delay #(.T(vec_t), .DEPTH(L_STEP3)) u_d_y1 (.clk, .rst_n, .en, .d(y1), .q(y1_s4));
  pipe_delay #(.T(fix_t), .DEPTH(L_STEP3)) u_d_z  (.clk, .rst_n, .en, .d(z),  .q(z_s4));
  rgmiu_step4 #(.N(N)) u_step4 (.clk, .en, .z(z_s4), .y1(y1_s4), .y2(y2), .c(c));

  // Step 5, with y2 delayed to meet c.
  vec_t y2_s5;
  vec_t y3;
  pipe_delay #(.T(vec_t), .DEPTH(L_STEP4)) u_d_y2a (.clk, .rst_n, .en, .d(y2), .q(y2_s5));
  rgmiu_step5 #(.N(N)) u_step5 (.clk, .en, .c(c), .y2(y2_s5), .y3(y3));

  // Step 6, with y2 and B delayed to meet y3.
  vec_t y2_s6;
  mat_t b_s6;
  mat_t gamma;
  pipe_delay #(.T(vec_t), .DEPTH(L_STEP5)) u_d_y2b (.clk, .rst_n, .en, .d(y2_s5), .q(y2_s6));
  pipe_delay #(.T(mat_t), .DEPTH(L_STEP3 + L_STEP4 + L_STEP5))
    u_d_b (.clk, .rst_n, .en, .d(b_i), .q(b_s6));
  rgmiu_step6 #(.N(N)) u_step6 (.clk, .en, .b(b_s6), .y2(y2_s6), .y3(y3), .gamma(gamma));

  // Step 7, with y3 and c delayed to meet Gamma.
  vec_t y3_s7;
  fix_t c_s7;
  pipe_delay #(.T(vec_t), .DEPTH(L_STEP6)) u_d_y3 (.clk, .rst_n, .en, .d(y3), .q(y3_s7));
  pipe_delay #(.T(fix_t), .DEPTH(L_STEP5 + L_STEP6)) u_d_c (.clk, .rst_n, .en, .d(c), .q(c_s7));
  rgmiu_step7 #(.N(N)) u_step7 (.clk, .en, .gamma(gamma), .y3(y3_s7), .c(c_s7), .b_next(b_o));

  // Gram matrix and valid flag travel alongside.
  pipe_delay #(.T(gram_t), .DEPTH(ITER_LAT)) u_d_g (.clk, .rst_n, .en, .d(g_i), .q(g_o));
  pipe_delay #(.T(logic), .DEPTH(ITER_LAT), .HAS_RESET(1'b1))
    u_d_v (.clk, .rst_n, .en, .d(in_valid), .q(out_valid));

endmodule
