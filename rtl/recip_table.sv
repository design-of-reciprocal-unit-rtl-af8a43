// recip_table: initial approximation R0 of 1/d for the Newton-Raphson iterations.
//
// The table is addressed by the TBL_IN = 5 fraction bits right below the hidden
// one of the mantissa d in [1, 2) and returns TBL_OUT = 6 bits that sit right below
// the leading one of R0 = 0.1xxxxxx in (0.5, 1). With 5 bits in and 6 bits out the
// first guess is good to about 6 bits, so that two iterations reach the 24 bits of
// a single-precision mantissa; these sizes follow the document.
//
// Each entry is the reciprocal of the midpoint of its input interval, rounded to
// the output grid:  entry(i) = round(2^(TBL_IN+TBL_OUT+2) / (2^(TBL_IN+1) + 2i + 1))
// - 2^TBL_OUT. The entry formula is this design's choice of such a table; the
// contents are computed by a constant function, not stored in a file.
//
// Purely combinational: d -> r0 in the same cycle. r0 is in the internal format
// of nr_pkg.
module recip_table
  import nr_pkg::*;
#(
  parameter int unsigned TIN  = TBL_IN,
  parameter int unsigned TOUT = TBL_OUT
) (
  input  logic [MANT_W-1:0] d,
  output fix_t              r0
);

  typedef logic [TOUT-1:0] entry_t;
  typedef entry_t          table_t [2**TIN];

  function automatic table_t build_table();
    table_t t;
    longint unsigned num, den;
    for (int i = 0; i < 2**TIN; i++) begin
      num  = 64'd1 << (TIN + TOUT + 2);
      den  = (64'd1 << (TIN + 1)) + 64'(2 * i + 1);
      // round to nearest: (2*num + den) / (2*den)
      t[i] = entry_t'(((2 * num + den) / (2 * den)) - (64'd1 << TOUT));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [TIN-1:0] idx;
  assign idx = d[MANT_W-2 -: TIN];

  // R0 = 0.1 e(TOUT-1) .. e(0): leading one has weight 1/2
  assign r0 = fix_t'({1'b1, TABLE[idx]}) <<< (FRAC - TOUT - 1);

endmodule
