// rgmiu_pkg: number formats, types and latencies shared by the RGMIU
// (recursive Gram matrix inversion update) matrix-inversion core.
//
// Every value that travels between pipeline steps is a 16-bit signed
// two's-complement fixed-point number (the word length of the reference
// design). This implementation uses 14 fractional bits (range [-2, 2)) for
// all of them, because the diagonal of a normalised Gram matrix and of its
// inverse sit close to 1.0 and exceed it; that is a choice of this design.
// Complex values are a packed pair of such words. Products are kept at full
// precision (cprod_t) until a step rounds its result back to 16 bits, with
// round-half-up and saturation (round_sat).
//
// Latencies, in clock cycles, are fixed by construction and exported here so
// that the pipeline stages can align their side paths:
//   DIV_LAT  = W + 1   reciprocal (one quotient bit per stage, plus an input
//                      and an output register)
//   ITER_LAT = DIV_LAT + 8   one RGMIU iteration (steps 3 to 7)
package rgmiu_pkg;

  localparam int W    = 16;          // word length
  localparam int FRAC = 14;          // fractional bits of every word
  localparam int PW   = 2 * W + 1;   // width of a sum of two W x W products

  localparam int DIV_LAT  = W + 1;
  localparam int L_STEP3  = 2;
  localparam int L_STEP4  = 2 + DIV_LAT;
  localparam int L_STEP5  = 1;
  localparam int L_STEP6  = 2;
  localparam int L_STEP7  = 1;
  localparam int ITER_LAT = L_STEP3 + L_STEP4 + L_STEP5 + L_STEP6 + L_STEP7;

  typedef logic signed [W-1:0]  fix_t;
  typedef logic signed [PW-1:0] prod_t;

  typedef struct packed {
    fix_t re;
    fix_t im;
  } cplx_t;

  typedef struct packed {
    prod_t re;
    prod_t im;
  } cprod_t;

  localparam fix_t FIX_MAX = fix_t'({1'b0, {(W-1){1'b1}}});
  localparam fix_t FIX_MIN = fix_t'({1'b1, {(W-1){1'b0}}});

  // Round x / 2^sh to the nearest integer (ties upward) and saturate to a word.
  function automatic fix_t round_sat(input logic signed [63:0] x, input int sh);
    logic signed [63:0] r;
    r = (x + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > 64'(FIX_MAX))      return FIX_MAX;
    else if (r < 64'(FIX_MIN)) return FIX_MIN;
    else                       return r[W-1:0];
  endfunction

  // Two's-complement negation that maps the most negative word to FIX_MAX.
  function automatic fix_t neg_sat(input fix_t a);
    return (a == FIX_MIN) ? FIX_MAX : -a;
  endfunction

endpackage
