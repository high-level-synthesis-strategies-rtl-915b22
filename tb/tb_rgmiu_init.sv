// tb_rgmiu_init: self-checking testbench of the starting stage B1 = 1/G11,
// for K = 3. Random matrices (valid or not) are streamed with random stalls
// after a reset. A reference pipeline of 17 stages that advances with en
// predicts out_valid in every cycle (checking reset, latency and stall), and
// for valid outputs B1 (bit-exact round(2^28/G11), saturated) and the
// delayed copy of G.
module tb_rgmiu_init;
  import rgmiu_pkg::*;
  import tb_cplx_pkg::*;

  localparam int K   = 3;
  localparam int LAT = 17;

  typedef cplx_t [K-1:0][K-1:0] gram_t;

  logic             clk = 1'b0;
  logic             rst_n, en, in_valid, out_valid;
  gram_t            g_i, g_o;
  cplx_t [0:0][0:0] b_o;
  int               checks = 0, failures = 0;

  gram_t exp_g [LAT];
  int    exp_b [LAT];
  bit    val_pipe [LAT];

  rgmiu_init #(.K(K)) dut (.clk, .rst_n, .en, .in_valid, .g_i(g_i), .out_valid,
                           .b_o(b_o), .g_o(g_o));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    int nvalid;
    nvalid = 0;
    rst_n    = 1'b0;
    en       = 1'b1;
    in_valid = 1'b0;
    for (int i = 0; i < LAT; i++) val_pipe[i] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          g_i[i][j].re = (i == j && $urandom % 4 != 0) ? rand_range(0.45, 1.99) : rand_word();
          g_i[i][j].im = rand_word();
        end
      in_valid = ($urandom % 4 != 0);
      en       = ($urandom % 5 != 0);
      @(posedge clk);
      if (en) begin
        for (int i = LAT - 1; i > 0; i--) begin
          exp_g[i]    = exp_g[i-1];
          exp_b[i]    = exp_b[i-1];
          val_pipe[i] = val_pipe[i-1];
        end
        exp_g[0]    = g_i;
        exp_b[0]    = ref_recip(int'(g_i[0][0].re));
        val_pipe[0] = in_valid;
      end
      #1;
      check("out_valid", out_valid == val_pipe[LAT-1]);
      if (val_pipe[LAT-1]) begin
        nvalid++;
        check("b1", int'(b_o[0][0].re) == exp_b[LAT-1] && b_o[0][0].im == '0);
        check("g",  g_o == exp_g[LAT-1]);
      end
    end
    if (nvalid < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
