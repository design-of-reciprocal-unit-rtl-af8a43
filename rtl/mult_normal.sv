// mult_normal: the carry-propagate ("normal") multiplier.
//
// Both operands and the product are in normal (two's complement) form. The full
// 2*W-bit product is formed with the language's multiply operator, as the
// document does with the built-in multiplier of its HDL, and truncated back to the
// internal fixed-point format: bits [FRAC +: W] of the product.
// Combinational.
module mult_normal
  import nr_pkg::*;
#(
  parameter int unsigned W = FIX_W,
  parameter int unsigned F = FRAC
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] p
);

  logic signed [2*W-1:0] full;
  assign full = (2*W)'(a) * (2*W)'(b);
  assign p    = full[F +: W];

endmodule
