// tb_rgmiu_step4: self-checking testbench of step 4, c = 1/(z - y1^H y2),
// for N = 3. Inputs are streamed one per cycle with random stalls. The
// reference computes the real part of y1^H y2 with 64-bit integers, rounds
// the difference to a word and takes round(2^28 / d) saturated to 32767; a
// reference pipeline of 2 + 17 = 19 stages that advances with en checks the
// latency. Most inputs give a divisor around 1.0; some give a divisor at or
// below 0.5, which must saturate.
module tb_rgmiu_step4;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int N   = 3;
  localparam int LAT = 19;

  logic          clk = 1'b0;
  logic          en;
  fix_t          z, c;
  cplx_t [N-1:0] y1, y2;
  int            checks = 0, failures = 0, sat_seen = 0;

  int exp_pipe [LAT];
  bit val_pipe [LAT];

  rgmiu_step4 #(.N(N)) dut (.clk, .en, .z(z), .y1(y1), .y2(y2), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LAT; i++) val_pipe[i] = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int     e;
      longint acc;
      bit     wide;
      @(negedge clk);
      wide = ($urandom % 8 == 0);
      z = wide ? rand_word() : rand_range(0.3, 1.99);
      for (int i = 0; i < N; i++) begin
        y1[i].re = wide ? rand_word() : rand_range(-0.3, 0.3);
        y1[i].im = wide ? rand_word() : rand_range(-0.3, 0.3);
        y2[i].re = wide ? rand_word() : rand_range(-0.3, 0.3);
        y2[i].im = wide ? rand_word() : rand_range(-0.3, 0.3);
      end
      acc = longint'(z) * 16384;
      for (int i = 0; i < N; i++)
        acc -= longint'(y1[i].re) * y2[i].re + longint'(y1[i].im) * y2[i].im;
      e = ref_recip(ref_rs(acc, 14));
      en = (n < 30) || ($urandom % 5 != 0);
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
        if (exp_pipe[LAT-1] == 32767) sat_seen++;
        if (int'(c) != exp_pipe[LAT-1]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d: c=%0d expected %0d", n, c, exp_pipe[LAT-1]);
        end
      end
    end
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
