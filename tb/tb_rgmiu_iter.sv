// tb_rgmiu_iter: self-checking testbench of one RGMIU iteration, N = 3,
// K = 5. Each test case draws a channel of 128 antennas and K users,
// forms G = H^H H / 128 and quantises it; the incoming B is the quantised
// exact inverse of the leading 3 x 3 block (the situation of a user being
// added to an already inverted group). The 4 x 4 output is compared with
// the double-precision inverse of the leading 4 x 4 block of the quantised
// G, entry by entry, within TOL. Cases are streamed with random bubbles and
// stalls; a reference pipeline of 25 stages that advances with en checks
// out_valid in every cycle (latency 25), the case order and the delayed
// copy of G.
module tb_rgmiu_iter;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int  N     = 3;
  localparam int  K     = 5;
  localparam int  LAT   = 25;
  localparam int  NCASE = 200;
  localparam real TOL   = 0.0005;

  typedef cplx_t [K-1:0][K-1:0] gram_t;

  logic                 clk = 1'b0;
  logic                 rst_n, en, in_valid, out_valid;
  cplx_t [N-1:0][N-1:0] b_i;
  cplx_t [N:0][N:0]     b_o;
  gram_t                g_i, g_o;
  int                   checks = 0, failures = 0;
  real                  max_err = 0.0;

  gram_t gq   [NCASE];
  rmat_t ref_r[NCASE];
  rmat_t ref_i[NCASE];
  cplx_t [N-1:0][N-1:0] bq [NCASE];

  int pipe_case [LAT];

  rgmiu_iter #(.N(N), .K(K)) dut (.clk, .rst_n, .en, .in_valid, .b_i(b_i), .g_i(g_i),
                                  .out_valid, .b_o(b_o), .g_o(g_o));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rmat_t gr, gi, qr, qi, br, bi;
    int    next, done;
    next = 0;
    done = 0;
    for (int t = 0; t < NCASE; t++) begin
      make_gram(128, K, gr, gi);
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
      cinv(N, qr, qi, br, bi);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          bq[t][i][j].re = fix_t'(quantize(br[i][j]));
          bq[t][i][j].im = fix_t'(quantize(bi[i][j]));
        end
      cinv(N + 1, qr, qi, ref_r[t], ref_i[t]);
    end

    for (int i = 0; i < LAT; i++) pipe_case[i] = -1;
    rst_n = 1'b0;
    en = 1'b1;
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (done < NCASE) begin
      int cur;
      @(negedge clk);
      in_valid = (next < NCASE) && ($urandom % 4 != 0);
      cur = in_valid ? next : int'($urandom % NCASE);
      g_i = gq[cur];
      b_i = bq[cur];
      en = ($urandom % 5 != 0);
      @(posedge clk);
      if (en) begin
        for (int i = LAT - 1; i > 0; i--) pipe_case[i] = pipe_case[i-1];
        pipe_case[0] = in_valid ? next : -1;
        if (in_valid) next++;
      end
      #1;
      check("out_valid", out_valid == (pipe_case[LAT-1] >= 0));
      if (en && pipe_case[LAT-1] >= 0) begin
        int t;
        t = pipe_case[LAT-1];
        check("g", g_o == gq[t]);
        for (int i = 0; i <= N; i++)
          for (int j = 0; j <= N; j++) begin
            real er, ei;
            er = to_real(b_o[i][j].re) - ref_r[t][i][j];
            if (er < 0.0) er = -er;
            ei = to_real(b_o[i][j].im) - ref_i[t][i][j];
            if (ei < 0.0) ei = -ei;
            if (er > max_err) max_err = er;
            if (ei > max_err) max_err = ei;
            check("b entry", er <= TOL && ei <= TOL);
          end
        done++;
      end
    end
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
