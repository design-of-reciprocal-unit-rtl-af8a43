// inv_array: forms x = 2 - R*d with inverters instead of a subtractor.
//
// Because R*d is close to 1, 2 - R*d equals the bitwise inverse of R*d plus a
// constant, and the constant is not added here but handed on, so that the
// inverter array has one gate level.
//   REDUNDANT = 0: p_s is R*d in normal form (p_c is unused). x_s = ~p_s and
//     x_c = 2 + 1 ulp, so x_s + x_c = 2 - p exactly; the following cs/normal
//     multiplier recodes the pair, i.e. the "+1" is handled in that multiplier.
//     (In the 3-integer-bit format ~p = -p - ulp, hence the constant 2 + ulp.)
//   REDUNDANT = 1: p_s + p_c is R*d - (2 + 2 ulp) in carry-save form, the
//     constant having been added inside the previous multiplier's tree. Then
//     x_s = ~p_s and x_c = ~p_c give x_s + x_c = -(p_s + p_c) - 2 ulp = 2 - R*d.
// Handing the +1 to the second multiplier follows the document; the +2 term and
// the folding of the constant for the redundant case are this design's own.
// Combinational.
module inv_array
  import nr_pkg::*;
#(
  parameter bit REDUNDANT = 1'b0
) (
  input  fix_t p_s,
  input  fix_t p_c,
  output fix_t x_s,
  output fix_t x_c
);

  localparam fix_t PLUS_ONE = fix_t'((64'd2 << FRAC) + 64'd1);   // 2 + 1 ulp

  assign x_s = ~p_s;
  if (REDUNDANT) begin : g_cs
    assign x_c = ~p_c;
  end else begin : g_normal
    assign x_c = PLUS_ONE;
  end

endmodule
