// tb_rgmiu_step5: self-checking testbench of step 5, y3 = c * y2, for N = 4.
// Random words (extremes included) are streamed with random stalls and
// compared bit-exactly, one cycle later, with 64-bit integer products
// rounded to nearest and saturated.
module tb_rgmiu_step5;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int N = 4;

  logic          clk = 1'b0;
  logic          en;
  fix_t          c;
  cplx_t [N-1:0] y2, y3, e;
  bit            have = 1'b0;
  int            checks = 0, failures = 0;

  rgmiu_step5 #(.N(N)) dut (.clk, .en, .c(c), .y2(y2), .y3(y3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      c = rand_word();
      for (int i = 0; i < N; i++) begin
        y2[i].re = rand_word();
        y2[i].im = rand_word();
      end
      en = (n < 5) || ($urandom % 5 != 0);
      @(posedge clk);
      if (en) begin
        for (int i = 0; i < N; i++) begin
          e[i].re = fix_t'(ref_rs(longint'(c) * y2[i].re, 14));
          e[i].im = fix_t'(ref_rs(longint'(c) * y2[i].im, 14));
        end
        have = 1'b1;
      end
      #1;
      if (have) begin
        checks++;
        if (y3 !== e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d: y3=%h expected %h", n, y3, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
