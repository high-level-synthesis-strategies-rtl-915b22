// rgmiu_top: fully unrolled RGMIU core that inverts a K x K complex Gram
// matrix G = H^H H, one new matrix per clock cycle.
//
// Structure: rgmiu_init (B1 = 1/G11) followed by K-1 rgmiu_iter stages, the
// stage for B of size n growing it to n+1, so every iteration of the
// recursion has its own hardware and the chain is one pipeline with an
// initiation interval of one. The output B_K is the full inverse.
//
// Interface: all K*K entries of G arrive in parallel from an input FIFO and
// all K*K entries of the inverse leave in parallel to an output FIFO,
// first-word-fall-through style:
//   g_empty_n  input FIFO holds a matrix on g_i;  g_read pops it
//   b_full_n   output FIFO can take a matrix;     b_write pushes b_o
// The pipeline advances in every cycle in which the output FIFO is not full
// and stalls as a whole otherwise; an empty input FIFO lets a bubble in.
// Only the upper triangle and the real diagonal of g_i are used.
// Timing: latency DIV_LAT + (K-1)*ITER_LAT advancing cycles
// (17 + 25*(K-1); 192 for K = 8), throughput one inverse per cycle.
// The FIFO-side handshake signal names and the stall policy are this
// design's choice. The imaginary part of the last diagonal entry of b_o is
// constant zero (that entry is the real c of the last iteration), and the
// copy of G that leaves the last stage is unused, which lint reports.
module rgmiu_top
  import rgmiu_pkg::*;
#(
  parameter int K = 8    // number of user terminals (matrix size)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input FIFO side
  input  logic                 g_empty_n,
  output logic                 g_read,
  input  cplx_t [K-1:0][K-1:0] g_i,
  // output FIFO side
  input  logic                 b_full_n,
  output logic                 b_write,
  output cplx_t [K-1:0][K-1:0] b_o
);

  logic en;
  assign en     = b_full_n;
  assign g_read = en && g_empty_n;

  for (genvar n = 1; n <= K; n++) begin : g_stage
    cplx_t [n-1:0][n-1:0] b;
    cplx_t [K-1:0][K-1:0] g;
    logic                 v;

    if (n == 1) begin : g_first
      rgmiu_init #(.K(K)) u_init (
        .clk, .rst_n, .en,
        .in_valid (g_empty_n),
        .g_i      (g_i),
        .out_valid(v),
        .b_o      (b),
        .g_o      (g)
      );
    end else begin : g_next
      rgmiu_iter #(.N(n - 1), .K(K)) u_iter (
        .clk, .rst_n, .en,
        .in_valid (g_stage[n-1].v),
        .b_i      (g_stage[n-1].b),
        .g_i      (g_stage[n-1].g),
        .out_valid(v),
        .b_o      (b),
        .g_o      (g)
      );
    end
  end

  assign b_o     = g_stage[K].b;
  assign b_write = en && g_stage[K].v;

  // Handshake rules: never pop an empty FIFO, never push a full one.
  a_read_nonempty: assert property (@(posedge clk) disable iff (!rst_n) g_read |-> g_empty_n);
  a_write_nonfull: assert property (@(posedge clk) disable iff (!rst_n) b_write |-> b_full_n);

endmodule
