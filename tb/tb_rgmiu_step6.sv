// tb_rgmiu_step6: self-checking testbench of step 6,
// Gamma = B + y3 * y2^H, for N = 3. Inputs are streamed one per cycle with
// random stalls; the reference (64-bit integer, B scaled up, product added,
// one rounding) is delayed by a 2-stage pipeline that advances with en.
module tb_rgmiu_step6;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int N   = 3;
  localparam int LAT = 2;

  logic                 clk = 1'b0;
  logic                 en;
  cplx_t [N-1:0][N-1:0] b, gamma;
  cplx_t [N-1:0]        y2, y3;
  int                   checks = 0, failures = 0;

  cplx_t [N-1:0][N-1:0] exp_pipe [LAT];
  bit                   val_pipe [LAT];

  rgmiu_step6 #(.N(N)) dut (.clk, .en, .b(b), .y2(y2), .y3(y3), .gamma(gamma));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t [N-1:0][N-1:0] e;
    for (int i = 0; i < LAT; i++) val_pipe[i] = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      bit wide;
      @(negedge clk);
      wide = ($urandom % 10 == 0);
      for (int i = 0; i < N; i++) begin
        y2[i].re = wide ? rand_word() : rand_range(-0.5, 0.5);
        y2[i].im = wide ? rand_word() : rand_range(-0.5, 0.5);
        y3[i].re = wide ? rand_word() : rand_range(-0.5, 0.5);
        y3[i].im = wide ? rand_word() : rand_range(-0.5, 0.5);
        for (int j = 0; j < N; j++) begin
          b[i][j].re = wide ? rand_word() : rand_range(-1.9, 1.9);
          b[i][j].im = wide ? rand_word() : rand_range(-1.9, 1.9);
        end
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          longint pr, pi;
          // y3(i) * conj(y2(j))
          pr = longint'(y3[i].re) * y2[j].re + longint'(y3[i].im) * y2[j].im;
          pi = longint'(y3[i].im) * y2[j].re - longint'(y3[i].re) * y2[j].im;
          e[i][j].re = fix_t'(ref_rs(longint'(b[i][j].re) * 16384 + pr, 14));
          e[i][j].im = fix_t'(ref_rs(longint'(b[i][j].im) * 16384 + pi, 14));
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
        if (gamma !== exp_pipe[LAT-1]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d: gamma=%h expected %h", n, gamma, exp_pipe[LAT-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
