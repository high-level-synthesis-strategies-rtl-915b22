// tb_recip: self-checking testbench of the pipelined reciprocal. A stream of
// divisors (one per cycle, with random stall cycles) is compared bit-exactly
// with round(2^28 / d) saturated to 32767. A reference pipeline of W+1 = 17
// stages, advanced only when en is high, checks the latency and the stall
// behaviour. Divisors cover the saturating range (d <= 0.5, d <= 0), the
// useful range around 1.0 and the extremes.
module tb_recip;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int LAT = 17;

  logic clk = 1'b0;
  logic en;
  fix_t d, q;
  int   checks = 0, failures = 0;
  int   sat_seen = 0;

  recip dut (.clk, .en, .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_pipe [LAT];
  bit val_pipe [LAT];

  initial begin
    for (int i = 0; i < LAT; i++) val_pipe[i] = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      int sel;
      @(negedge clk);
      sel = int'($urandom % 8);
      case (sel)
        0: d = rand_word();
        1: d = fix_t'(8192 + int'($urandom % 3));
        2: d = fix_t'(int'($urandom % 8194));
        default: d = rand_range(0.45, 1.999);
      endcase
      en = (n < 40) || ($urandom % 4 != 0);
      @(posedge clk);
      if (en) begin
        for (int i = LAT - 1; i > 0; i--) begin
          exp_pipe[i] = exp_pipe[i-1];
          val_pipe[i] = val_pipe[i-1];
        end
        exp_pipe[0] = ref_recip(int'(d));
        val_pipe[0] = 1'b1;
      end
      #1;
      if (val_pipe[LAT-1]) begin
        checks++;
        if (exp_pipe[LAT-1] == 32767) sat_seen++;
        if (int'(q) != exp_pipe[LAT-1]) begin
          failures++;
          if (failures < 10) $display("FAIL: q=%0d expected %0d", q, exp_pipe[LAT-1]);
        end
      end
    end
    if (sat_seen == 0) failures++;
    $display("saturated results checked: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
