// tb_rgmiu_run: one self-checking run of the RGMIU core at size K, used by
// tb_rgmiu_workloads to cover several user counts side by side.
//
// It draws NCASE channels of M_ANT antennas and K users, quantises
// G = H^H H / M_ANT to 16-bit words and computes each reference inverse in
// double precision. The first matrix goes through an idle pipeline and its
// read-to-write latency must equal 17 + 25*(K-1); the rest stream through
// with random input bubbles and output stalls and must come out in order,
// each entry within TOL of the reference. The run reports its counts on
// its ports and raises done at the end. It drives its own clock.
module tb_rgmiu_run
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;
#(
  parameter int  K     = 4,
  parameter int  NCASE = 60,
  parameter int  M_ANT = 128,
  parameter real TOL   = 0.001
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_bubble,
  output int   n_stall,
  output int   n_b2b
);

  localparam int LAT = 17 + 25 * (K - 1);

  typedef cplx_t [K-1:0][K-1:0] gram_t;

  logic  clk;
  logic  rst_n;
  logic  g_empty_n, g_read, b_full_n, b_write;
  gram_t g_i, b_o;
  real   max_err;

  gram_t gq    [NCASE];
  rmat_t ref_r [NCASE];
  rmat_t ref_i [NCASE];

  int  in_q [$];
  bit  in_hold, out_hold;
  int  out_next, cycle, last_write;
  int  read_cycle [NCASE];
  int  write_cycle[NCASE];

  rgmiu_top #(.K(K)) dut (
    .clk, .rst_n,
    .g_empty_n, .g_read, .g_i(g_i),
    .b_full_n, .b_write, .b_o(b_o)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("K=%0d FAIL %s at cycle %0d", K, what, cycle);
    end
  endtask

  always_comb begin
    g_empty_n = (in_q.size() > 0) && !in_hold;
    g_i       = (in_q.size() > 0) ? gq[in_q[0]] : '0;
    b_full_n  = !out_hold;
  end

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
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_bubble = 0;
    n_stall = 0;
    n_b2b = 0;
    max_err = 0.0;
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
    in_hold = 1'b0;
    out_hold = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    in_q.push_back(0);
    wait (out_next == 1);
    @(negedge clk);
    check("latency", write_cycle[0] - read_cycle[0] == LAT);

    for (int t = 1; t < NCASE; t++) in_q.push_back(t);
    while (out_next < NCASE) begin
      @(negedge clk);
      in_hold  = ($urandom % 4 == 0);
      out_hold = ($urandom % 5 == 0);
    end
    in_hold  = 1'b0;
    out_hold = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    check("all outputs delivered, none extra", out_next == NCASE && in_q.size() == 0);
    $display("K=%0d: max abs error %f (tolerance %f), latency %0d cycles", K, max_err, TOL, LAT);
    done = 1'b1;
  end
endmodule
