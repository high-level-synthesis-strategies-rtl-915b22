// recip: pipelined fixed-point reciprocal, q = 1 / d, with d and q in the
// core's word format (W bits, FRAC fractional bits).
//
// The RGMIU algorithm needs one real division per iteration (c in step 4)
// plus one for the starting value B1 = 1/G11; the divisor is always real and,
// for a positive definite Gram matrix, positive. This unit divides the
// constant 2^(2*FRAC) by the raw divisor with a restoring algorithm that
// produces one quotient bit per pipeline stage, so a new divisor is accepted
// every clock. The quotient is rounded to nearest.
//   - Stage 0 registers the divisor and decides saturation: the result does
//     not fit in W bits exactly when d <= 2^(2*FRAC-W+1) (d <= 0.5 for the
//     default format), which also covers d <= 0.
//   - Stages 1 .. W-1 each resolve one quotient bit, most significant first.
//   - The last stage rounds (adds one when twice the remainder is at least
//     the divisor) and saturates to FIX_MAX.
// The result is never negative, so the sign bit of q is constant zero.
// Timing: latency DIV_LAT = W + 1 cycles of en, initiation interval 1.
// The stage structure and its latency are this design's choice; the
// reference design uses a tool-generated divider of 26 cycles.
module recip
  import rgmiu_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fix_t d,
  output fix_t q
);

  localparam int QB  = W - 1;         // quotient bits
  localparam int NUM = 2 * FRAC;      // dividend is 2^NUM
  localparam int RW  = NUM + 2;       // remainder width
  localparam int DW  = W - 1;         // magnitude bits of a positive divisor
  localparam logic signed [W-1:0] SAT_LIMIT = fix_t'(1 << (NUM - QB));

  logic [RW-1:0] rem [QB+1];
  logic [DW-1:0] den [QB+1];
  logic [QB-1:0] quo [QB+1];
  logic          sat [QB+1];

  // Stage 0: load the dividend and classify the divisor.
  always_ff @(posedge clk) begin
    if (en) begin
      sat[0] <= (d <= SAT_LIMIT);
      den[0] <= d[DW-1:0];
      rem[0] <= RW'(1) << NUM;
      quo[0] <= '0;
    end
  end

  // Stages 1 .. QB: restoring division, one bit per stage.
  for (genvar s = 1; s <= QB; s++) begin : g_stage
    localparam int BIT = QB - s;
    logic [RW:0] trial;

    always_comb trial = {1'b0, rem[s-1]} - ({(RW + 1 - DW)'(0), den[s-1]} << BIT);

    always_ff @(posedge clk) begin
      if (en) begin
        den[s] <= den[s-1];
        sat[s] <= sat[s-1];
        if (!trial[RW]) begin
          rem[s] <= trial[RW-1:0];
          quo[s] <= quo[s-1] | (QB'(1) << BIT);
        end else begin
          rem[s] <= rem[s-1];
          quo[s] <= quo[s-1];
        end
      end
    end
  end

  // Output stage: round to nearest and saturate.
  logic [QB:0] rounded;
  always_comb begin
    rounded = {1'b0, quo[QB]};
    if ({rem[QB], 1'b0} >= {(RW + 1 - DW)'(0), den[QB]}) rounded = rounded + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (sat[QB] || rounded[QB]) q <= FIX_MAX;
      else                        q <= fix_t'({1'b0, rounded[QB-1:0]});
    end
  end

endmodule
