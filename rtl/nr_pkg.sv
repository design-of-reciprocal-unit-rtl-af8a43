// nr_pkg: shared number format and helpers of the Newton-Raphson reciprocal unit.
//
// Every internal quantity (d, R[j], R[j]*d, 2 - R[j]*d) is a signed fixed-point
// number with IB = 3 integer bits and FRAC = 29 fraction bits (FIX_W = 32). The
// 24-bit single-precision mantissa enters with 23 fraction bits and is padded.
// The 5 extra fraction bits beyond the mantissa are guard bits, so that the
// truncations done after every multiplier stay well below the error left by two
// Newton-Raphson iterations. Products are formed over PROD_W = 2*FIX_W bits and
// truncated back to FIX_W.
//
// A carry-save pair (s, c) stands for the signed value s + c. Truncation of
// a full-width pair leaves a pair that is right only modulo 2^IB; cs_norm
// restores the exact signed meaning, knowing that every value carried in this
// design lies in [-2, 2): if the two integer fields add up to something outside
// [-5, 2] the pair has wrapped by +-8, and flipping both sign bits undoes it.
// The mantissa width, the table size and the iteration count follow the
// document; the internal format and cs_norm are this design's own.
package nr_pkg;

  localparam int unsigned MANT_W  = 24;          // single-precision mantissa incl. hidden 1
  localparam int unsigned TBL_IN  = 5;           // table index bits
  localparam int unsigned TBL_OUT = 6;           // table output bits below the leading 1
  localparam int unsigned NR_ITER = 2;           // NR iterations for single precision
  localparam int unsigned IB      = 3;           // integer bits of the internal format
  localparam int unsigned FRAC    = 29;          // fraction bits of the internal format
  localparam int unsigned FIX_W   = IB + FRAC;   // 32
  localparam int unsigned PROD_W  = 2 * FIX_W;   // full product width
  localparam int unsigned NDIG    = FIX_W / 2;   // radix-4 digits of a FIX_W operand
  localparam int unsigned RES_W   = MANT_W + 1;  // result: 1 integer + 24 fraction bits

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic signed [2:0]       digit_t;      // radix-4 digit in -2..2

  typedef struct packed {
    fix_t s;
    fix_t c;
  } cs_t;

  // Mantissa 1.f (MANT_W bits, hidden one at the top) to the internal format.
  function automatic fix_t mant_to_fix(input logic [MANT_W-1:0] m);
    return fix_t'({{(IB-1){1'b0}}, m, {(FRAC-MANT_W+1){1'b0}}});
  endfunction

  // Internal format to the result mantissa: 1 integer bit and MANT_W fraction
  // bits, truncated.
  function automatic logic [RES_W-1:0] fix_to_res(input fix_t v);
    return v[FRAC -: RES_W];
  endfunction

  // Undo a +-8 wrap of a truncated carry-save pair whose value lies in [-2, 2).
  function automatic cs_t cs_norm(input cs_t a);
    logic signed [IB:0] f;
    cs_t r;
    f = $signed({a.s[FIX_W-1], a.s[FIX_W-1 -: IB]}) + $signed({a.c[FIX_W-1], a.c[FIX_W-1 -: IB]});
    r = a;
    if (f < -5 || f > 2) begin
      r.s[FIX_W-1] = ~a.s[FIX_W-1];
      r.c[FIX_W-1] = ~a.c[FIX_W-1];
    end
    return r;
  endfunction

endpackage
