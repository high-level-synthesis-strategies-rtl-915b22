// tb_cmult: self-checking testbench of the complex multiplier, both in plain
// (a*b) and conjugating (a*conj(b)) form. Random operands, with the extreme
// words often, are compared bit-exactly with 64-bit integer arithmetic one
// cycle later; random low en cycles check that the register holds.
module tb_cmult;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  logic   clk = 1'b0;
  logic   en;
  cplx_t  a, b;
  cprod_t p0, p1;
  int     checks = 0, failures = 0;
  bit     have = 1'b0;

  cmult #(.CONJ_B(1'b0)) u_plain (.clk, .en, .a(a), .b(b), .p(p0));
  cmult #(.CONJ_B(1'b1)) u_conj  (.clk, .en, .a(a), .b(b), .p(p1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint e0r, e0i, e1r, e1i;

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a.re = rand_word(); a.im = rand_word();
      b.re = rand_word(); b.im = rand_word();
      en   = (n < 5) || ($urandom % 5 != 0);
      @(posedge clk);
      if (en) begin
        e0r = longint'(a.re) * b.re - longint'(a.im) * b.im;
        e0i = longint'(a.re) * b.im + longint'(a.im) * b.re;
        e1r = longint'(a.re) * b.re + longint'(a.im) * b.im;
        e1i = longint'(a.im) * b.re - longint'(a.re) * b.im;
        have = 1'b1;
      end
      #1;
      if (have) begin
        check("plain.re", longint'(p0.re), e0r);
        check("plain.im", longint'(p0.im), e0i);
        check("conj.re",  longint'(p1.re), e1r);
        check("conj.im",  longint'(p1.im), e1i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
