// tb_rgmiu_workloads: runs the RGMIU core at the two user counts besides
// the default 8 that the evaluated configurations use: 4 users and
// 12 users, with a 128-antenna channel. Each size is an independent tb_rgmiu_run
// (own core instance, own clock); the counts are summed here. Every run must
// see input bubbles, output stalls and back-to-back outputs.
module tb_rgmiu_workloads;

  localparam int NRUN = 2;

  logic done     [NRUN];
  int   checks   [NRUN];
  int   failures [NRUN];
  int   n_bubble [NRUN];
  int   n_stall  [NRUN];
  int   n_b2b    [NRUN];

  tb_rgmiu_run #(.K(4))  u_k4  (.done(done[0]), .checks(checks[0]), .failures(failures[0]),
                                .n_bubble(n_bubble[0]), .n_stall(n_stall[0]), .n_b2b(n_b2b[0]));
  tb_rgmiu_run #(.K(12)) u_k12 (.done(done[1]), .checks(checks[1]), .failures(failures[1]),
                                .n_bubble(n_bubble[1]), .n_stall(n_stall[1]), .n_b2b(n_b2b[1]));

  int total_checks, total_failures;

  initial begin
    #200000;
    $display("watchdog expired");
    total_checks = 0;
    total_failures = 1;
    for (int r = 0; r < NRUN; r++) begin
      total_checks += checks[r];
      total_failures += failures[r];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1]);
    total_checks = 0;
    total_failures = 0;
    for (int r = 0; r < NRUN; r++) begin
      total_checks += checks[r] + 3;
      total_failures += failures[r];
      if (n_bubble[r] == 0) total_failures++;
      if (n_stall[r] == 0)  total_failures++;
      if (n_b2b[r] == 0)    total_failures++;
      $display("run %0d: bubbles %0d, stalls %0d, back-to-back outputs %0d", r, n_bubble[r], n_stall[r], n_b2b[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
