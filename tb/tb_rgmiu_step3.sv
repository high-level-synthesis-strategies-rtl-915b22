// tb_rgmiu_step3: self-checking testbench of step 3, y2 = B * y1, for N = 3.
// Random B (values around the range of a Gram inverse, plus occasional
// extreme words) and y1 are streamed one per cycle with random stalls. The
// expected y2 is computed with 64-bit integers (full-precision row sums,
// one rounding) and delayed in a 2-stage reference pipeline that advances
// with en, so the latency of 2 is checked as well.
module tb_rgmiu_step3;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int N   = 3;
  localparam int LAT = 2;

  logic                 clk = 1'b0;
  logic                 en;
  cplx_t [N-1:0][N-1:0] b;
  cplx_t [N-1:0]        y1, y2;
  int                   checks = 0, failures = 0;

  cplx_t [N-1:0] exp_pipe [LAT];
  bit            val_pipe [LAT];

  rgmiu_step3 #(.N(N)) dut (.clk, .en, .b(b), .y1(y1), .y2(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fix_t pick(input bit wide);
    return wide ? rand_word() : rand_range(-1.9, 1.9);
  endfunction

  initial begin
    cplx_t [N-1:0] e;
    for (int i = 0; i < LAT; i++) val_pipe[i] = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      bit wide;
      @(negedge clk);
      wide = ($urandom % 10 == 0);
      for (int i = 0; i < N; i++) begin
        y1[i].re = pick(wide);
        y1[i].im = pick(wide);
        for (int j = 0; j < N; j++) begin
          b[i][j].re = pick(wide);
          b[i][j].im = pick(wide);
        end
      end
      for (int i = 0; i < N; i++) begin
        longint sr, si;
        sr = 0;
        si = 0;
        for (int j = 0; j < N; j++) begin
          sr += longint'(b[i][j].re) * y1[j].re - longint'(b[i][j].im) * y1[j].im;
          si += longint'(b[i][j].re) * y1[j].im + longint'(b[i][j].im) * y1[j].re;
        end
        e[i].re = fix_t'(ref_rs(sr, 14));
        e[i].im = fix_t'(ref_rs(si, 14));
      end
      en = (n < 5) || ($urandom % 5 != 0);
      @(posedge clk);
      if (en) begin
        for (int i = LAT - 1; i > 0; i--) begin
          exp_pipe[i] = exp_pipe[i-1];
          val_pipe[i] = val_pipe[i-1];
        end
        exp_pipe[0] = e;
        val_pipe[0] = 1'b1;
      end
      #1;
      if (val_pipe[LAT-1]) begin
        checks++;
        if (y2 !== exp_pipe[LAT-1]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d: y2=%h expected %h", n, y2, exp_pipe[LAT-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
