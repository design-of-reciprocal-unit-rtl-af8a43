// cpa: carry-propagate adder that turns a carry-save pair into normal form.
//
// y = s + c modulo 2^W. The adder architecture is left to synthesis.
// Combinational.
module cpa
  import nr_pkg::*;
#(
  parameter int unsigned W = FIX_W
) (
  input  logic [W-1:0] s,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  assign y = s + c;

endmodule
