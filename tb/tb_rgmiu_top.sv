// tb_rgmiu_top: end-to-end testbench of the RGMIU core at its default size
// (K = 8 users, parameters untouched).
//
// Test matrices: for each case a channel of 128 antennas and K users is
// drawn, G = H^H H / 128 is formed and quantised to 16-bit words, and the
// reference inverse of the quantised G is computed in double precision by
// Gauss-Jordan elimination. The testbench models the two FIFOs around the
// core: the input FIFO is a queue of cases, the output FIFO accepts pushes
// unless the test holds it full.
//
// Phases:
//   1. one matrix through an idle pipeline: the read-to-write latency must
//      be 17 + 25*(K-1) = 192 cycles;
//   2. a burst of matrices with both FIFOs ready: the inverses must leave on
//      consecutive cycles (initiation interval 1);
//   3. a long stream with random input bubbles (input FIFO empty) and output
//      stalls (output FIFO full).
// Every inverse is compared entry by entry with the reference within TOL,
// in order. Each mechanism (latency run, back-to-back output, bubble,
// stall) is counted, and one that never happened counts as a failure.
module tb_rgmiu_top;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int  K      = 8;
  localparam int  M_ANT  = 128;
  localparam int  LAT    = 17 + 25 * (K - 1);
  localparam int  NBURST = 40;
  localparam int  NRAND  = 160;
  localparam int  NCASE  = 1 + NBURST + NRAND;
  localparam real TOL    = 0.001;

  typedef cplx_t [K-1:0][K-1:0] gram_t;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  g_empty_n, g_read, b_full_n, b_write;
  gram_t g_i, b_o;

  int    checks = 0, failures = 0;
  real   max_err = 0.0;

  gram_t gq    [NCASE];
  rmat_t ref_r [NCASE];
  rmat_t ref_i [NCASE];

  // input FIFO model
  int  in_q [$];
  bit  in_hold;       // forces the FIFO to look empty (bubble)
  bit  out_hold;      // forces the output FIFO to look full (stall)
  int  out_next;      // index of the next expected inverse
  int  cycle;
  int  read_cycle [NCASE];
  int  write_cycle[NCASE];

  // mechanism counters
  int  n_bubble, n_stall, n_b2b, n_latency_ok;
  int  last_write;

  rgmiu_top dut (
    .clk, .rst_n,
    .g_empty_n, .g_read, .g_i(g_i),
    .b_full_n, .b_write, .b_o(b_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // FIFO-side signals, set before each rising edge
  always_comb begin
    g_empty_n = (in_q.size() > 0) && !in_hold;
    g_i       = (in_q.size() > 0) ? gq[in_q[0]] : '0;
    b_full_n  = !out_hold;
  end

  // Cycle-by-cycle bookkeeping at the rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (g_read) begin
        read_cycle[in_q[0]] = cycle;
        void'(in_q.pop_front());
      end
      if (in_hold && b_full_n) n_bubble++;
      if (!b_full_n) n_stall++;
      if (b_write) begin
        if (out_next >= NCASE) begin
          check("extra output", 1'b0);
        end else begin
          write_cycle[out_next] = cycle;
          if (last_write == cycle - 1) n_b2b++;
          last_write = cycle;
          for (int i = 0; i < K; i++)
            for (int j = 0; j < K; j++) begin
              real er, ei;
              er = to_real(b_o[i][j].re) - ref_r[out_next][i][j];
              ei = to_real(b_o[i][j].im) - ref_i[out_next][i][j];
              if (er < 0.0) er = -er;
              if (ei < 0.0) ei = -ei;
              if (er > max_err) max_err = er;
              if (ei > max_err) max_err = ei;
              check("inverse entry", er <= TOL && ei <= TOL);
            end
          out_next++;
        end
      end
    end
  end

  initial begin
    rmat_t gr, gi, qr, qi;
    for (int t = 0; t < NCASE; t++) begin
      make_gram(M_ANT, K, gr, gi);
      for (int i = 0; i < KMAX; i++)
        for (int j = 0; j < KMAX; j++) begin
          qr[i][j] = 0.0;
          qi[i][j] = 0.0;
        end
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          gq[t][i][j].re = fix_t'(quantize(gr[i][j]));
          gq[t][i][j].im = fix_t'(quantize(gi[i][j]));
          qr[i][j] = to_real(gq[t][i][j].re);
          qi[i][j] = to_real(gq[t][i][j].im);
        end
      cinv(K, qr, qi, ref_r[t], ref_i[t]);
    end

    cycle = 0;
    out_next = 0;
    last_write = -10;
    n_bubble = 0;
    n_stall = 0;
    n_b2b = 0;
    n_latency_ok = 0;
    in_hold = 1'b0;
    out_hold = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Phase 1: a single matrix through the empty pipeline.
    in_q.push_back(0);
    wait (out_next == 1);
    @(negedge clk);
    check("phase 1 latency", write_cycle[0] - read_cycle[0] == LAT);
    if (write_cycle[0] - read_cycle[0] == LAT) n_latency_ok++;
    else $display("latency %0d, expected %0d", write_cycle[0] - read_cycle[0], LAT);

    // Phase 2: a burst with both FIFOs always ready.
    for (int t = 1; t <= NBURST; t++) in_q.push_back(t);
    wait (out_next == 1 + NBURST);
    @(negedge clk);
    for (int t = 2; t <= NBURST; t++)
      check("back-to-back output", write_cycle[t] == write_cycle[t-1] + 1);
    check("burst latency", write_cycle[1] - read_cycle[1] == LAT);

    // Phase 3: random bubbles and stalls.
    for (int t = 1 + NBURST; t < NCASE; t++) in_q.push_back(t);
    while (out_next < NCASE) begin
      @(negedge clk);
      in_hold  = ($urandom % 4 == 0);
      out_hold = ($urandom % 5 == 0);
    end
    @(negedge clk);
    in_hold  = 1'b0;
    out_hold = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    check("all outputs delivered, none extra", out_next == NCASE && in_q.size() == 0);

    $display("max abs error %f (tolerance %f)", max_err, TOL);
    $display("mechanisms: latency runs %0d, back-to-back outputs %0d, input bubbles %0d, output stalls %0d",
             n_latency_ok, n_b2b, n_bubble, n_stall);
    check("latency run happened", n_latency_ok > 0);
    check("back-to-back outputs happened", n_b2b > 0);
    check("input bubbles happened", n_bubble > 0);
    check("output stalls happened", n_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
