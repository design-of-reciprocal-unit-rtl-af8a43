// mult_csn: carry-save multiplier with one carry-save and one normal operand.
//
// The carry-save operand (a_s, a_c) goes through the radix-4 recoder, the normal
// operand m is the multiplicand of the partial product generator, and a 3:2 tree
// reduces the W/2 + 1 partial product rows plus one constant row K to a sum and a
// carry vector of 2W bits. Both vectors are truncated to the internal format
// (bits [F +: W]) and the pair is normalised with nr_pkg::cs_norm. The result is
// in carry-save form: p_s + p_c = a*m + K, truncated toward minus infinity by less
// than 2 ulp. The represented result must lie in [-2, 2).
//
// K (a full-width constant, default 0) lets the redundant SP unit add the
// correction of its inverter array inside the tree for free. The recoded digits
// are also brought out (dig_out) so that a following multiplier that recodes
// the same operand can reuse them. REDUCED_SE selects the reduced sign
// extension of pp_gen. The untruncated product is the same, but its split into
// two vectors differs, so the truncated pair may differ by 1 ulp.
// The recoder / generator / tree structure follows the document; K, the
// truncation of both vectors and cs_norm are this design's own.
// Combinational.
module mult_csn
  import nr_pkg::*;
#(
  parameter int unsigned           W = FIX_W,
  parameter int unsigned           F = FRAC,
  parameter logic [2*FIX_W-1:0]    K = '0,
  parameter bit                    REDUCED_SE = 1'b0   // see pp_gen
) (
  input  fix_t a_s,
  input  fix_t a_c,
  input  fix_t m,
  output fix_t p_s,
  output fix_t p_c,
  output logic [FIX_W/2-1:0][2:0] dig_out   // recoded digits of a_s + a_c
);

  localparam int unsigned ND = W / 2;
  localparam int unsigned PW = 2 * W;

  logic [ND-1:0][2:0]  dig;
  logic [ND:0][PW-1:0] pp;
  logic [PW-1:0]       sum, carry;
  cs_t                 tr, pn;

  recoder #(.W(W)) u_rec (.s(a_s), .c(a_c), .dig(dig));
  assign dig_out = dig;

  pp_gen #(.W(W), .PW(PW), .REDUCED_SE(REDUCED_SE)) u_ppg (.dig(dig), .m(m), .rows(pp));

  csa_tree #(.ROWS(ND + 2), .W(PW)) u_tree (
    .rows  ({PW'(K), pp}),
    .sum   (sum),
    .carry (carry)
  );

  always_comb begin
    tr.s = sum[F +: W];
    tr.c = carry[F +: W];
  end

  assign pn  = cs_norm(tr);
  assign p_s = pn.s;
  assign p_c = pn.c;

endmodule
