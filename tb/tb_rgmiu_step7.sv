// tb_rgmiu_step7: self-checking testbench of step 7, the assembly
// [Gamma -y3; -y3^H c], for N = 3. Each entry of the (N+1) x (N+1) output
// is compared one cycle later with the expected value built entry by entry,
// including the saturating negation of the most negative word; random low
// en cycles check that the register holds.
module tb_rgmiu_step7;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int N = 3;

  logic                 clk = 1'b0;
  logic                 en;
  cplx_t [N-1:0][N-1:0] gamma;
  cplx_t [N-1:0]        y3;
  fix_t                 c;
  cplx_t [N:0][N:0]     b_next, e;
  bit                   have = 1'b0;
  int                   checks = 0, failures = 0;

  rgmiu_step7 #(.N(N)) dut (.clk, .en, .gamma(gamma), .y3(y3), .c(c), .b_next(b_next));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int negs(input int v);
    return (v == -32768) ? 32767 : -v;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      c = rand_word();
      for (int i = 0; i < N; i++) begin
        y3[i].re = rand_word();
        y3[i].im = rand_word();
        for (int j = 0; j < N; j++) begin
          gamma[i][j].re = rand_word();
          gamma[i][j].im = rand_word();
        end
      end
      en = (n < 5) || ($urandom % 5 != 0);
      @(posedge clk);
      if (en) begin
        for (int i = 0; i <= N; i++)
          for (int j = 0; j <= N; j++) begin
            if (i < N && j < N) e[i][j] = gamma[i][j];
            else if (i < N) begin
              e[i][j].re = fix_t'(negs(int'(y3[i].re)));
              e[i][j].im = fix_t'(negs(int'(y3[i].im)));
            end else if (j < N) begin
              e[i][j].re = fix_t'(negs(int'(y3[j].re)));
              e[i][j].im = y3[j].im;
            end else begin
              e[i][j].re = c;
              e[i][j].im = '0;
            end
          end
        have = 1'b1;
      end
      #1;
      if (have) begin
        for (int i = 0; i <= N; i++)
          for (int j = 0; j <= N; j++) begin
            checks++;
            if (b_next[i][j] !== e[i][j]) begin
              failures++;
              if (failures < 10)
                $display("FAIL n=%0d (%0d,%0d): %h expected %h", n, i, j, b_next[i][j], e[i][j]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
