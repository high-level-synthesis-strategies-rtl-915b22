// pipe_delay: a DEPTH-stage shift register for any packed type T, used to
// keep side paths (matrices, vectors, valid flags) aligned with the
// arithmetic of the RGMIU pipeline.
//
// All stages advance together when en is high and hold when it is low, which
// is how the whole core stalls. With HAS_RESET set, the stages clear to zero
// while rst_n is low (used for valid flags); data stages carry no reset.
// DEPTH = 0 is a plain wire. Latency: DEPTH cycles of en.
module pipe_delay #(
  parameter type T         = logic,
  parameter int  DEPTH     = 1,
  parameter bit  HAS_RESET = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  T     d,
  output T     q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    T r [DEPTH];

    always_ff @(posedge clk) begin
      if (HAS_RESET && !rst_n) begin
        for (int i = 0; i < DEPTH; i++) r[i] <= T'(0);
      end else if (en) begin
        r[0] <= d;
        for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
      end
    end

    assign q = r[DEPTH-1];
  end

endmodule
