// mult_2cs: carry-save multiplier with both operands in carry-save form.
//
// It computes (r_s + r_c) * (x_s + x_c) as (r_s + r_c) * x_s + (r_s + r_c) * x_c,
// so that x_s and x_c never need to be added. The pair (r_s, r_c) is recoded once
// and drives two partial product generators, one with multiplicand x_s and one
// with x_c; each feeds its own 3:2 tree, and two more 3:2 levels (a 4:2 stage)
// merge the two trees' outputs. The result is truncated to the internal format
// and normalised like in mult_csn: p_s + p_c = r * x, less than 2 ulp low.
// With EXT_DIG = 1 the recoder is left out and the digits of R come in on
// dig_in, already recoded by another multiplier (r_s and r_c are then unused).
// REDUCED_SE selects the reduced sign extension of pp_gen; as in mult_csn the
// truncated result may then differ by 1 ulp.
// The represented result must lie in [-2, 2), and x_s + x_c must be the exact signed
// value of X (no wrap modulo 2^W), which every pair normalised by cs_norm is.
// The structure follows the document; truncation and cs_norm are this design's
// own. Combinational.
module mult_2cs
  import nr_pkg::*;
#(
  parameter int unsigned W = FIX_W,
  parameter int unsigned F = FRAC,
  parameter bit          EXT_DIG = 1'b0,  // 1: use dig_in instead of recoding r_s + r_c
  parameter bit          REDUCED_SE = 1'b0   // see pp_gen
) (
  input  fix_t r_s,
  input  fix_t r_c,
  input  fix_t x_s,
  input  fix_t x_c,
  input  logic [FIX_W/2-1:0][2:0] dig_in,   // digits of r_s + r_c, used when EXT_DIG
  output fix_t p_s,
  output fix_t p_c
);

  localparam int unsigned ND = W / 2;
  localparam int unsigned PW = 2 * W;

  logic [ND-1:0][2:0]  dig;
  logic [ND:0][PW-1:0] pp_s, pp_c;
  logic [PW-1:0]       ts_s, ts_c, tc_s, tc_c;   // tree outputs: (sum, carry) of each tree
  logic [PW-1:0]       m_s, m_c;
  cs_t                 tr, pn;

  if (EXT_DIG) begin : g_ext_dig
    assign dig = dig_in;
  end else begin : g_own_dig
    recoder #(.W(W)) u_rec (.s(r_s), .c(r_c), .dig(dig));
  end

  pp_gen #(.W(W), .PW(PW), .REDUCED_SE(REDUCED_SE)) u_ppg_s (.dig(dig), .m(x_s), .rows(pp_s));
  pp_gen #(.W(W), .PW(PW), .REDUCED_SE(REDUCED_SE)) u_ppg_c (.dig(dig), .m(x_c), .rows(pp_c));

  csa_tree #(.ROWS(ND + 1), .W(PW)) u_tree_s (.rows(pp_s), .sum(ts_s), .carry(ts_c));
  csa_tree #(.ROWS(ND + 1), .W(PW)) u_tree_c (.rows(pp_c), .sum(tc_s), .carry(tc_c));

  // 4:2 merge as two 3:2 levels
  csa_tree #(.ROWS(4), .W(PW)) u_merge (
    .rows  ({tc_c, tc_s, ts_c, ts_s}),
    .sum   (m_s),
    .carry (m_c)
  );

  always_comb begin
    tr.s = m_s[F +: W];
    tr.c = m_c[F +: W];
  end

  assign pn  = cs_norm(tr);
  assign p_s = pn.s;
  assign p_c = pn.c;

endmodule
