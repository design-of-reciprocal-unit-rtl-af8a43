// sp_unit_normal: one Newton-Raphson iteration R' = R (2 - R d), alternative 1.
//
// First half: the normal (carry-propagate) multiplier forms p = R*d and the
// inverter array turns it into the pair x_s = ~p, x_c = 2 + ulp, whose sum is
// 2 - p. A pipeline register then holds x, R, d and a valid bit. Second half:
// the cs/normal multiplier recodes the pair x (so the inverter's +1 is added
// there) and multiplies it with R; a CPA returns R' in normal form.
//
// Timing: one register, so r_next/d_out/out_valid belong to the operand that was
// at the inputs one clock edge earlier; a new operand can enter every cycle.
// Reset is synchronous and active high and clears the register.
// REDUCED_SE is passed to the cs/normal multiplier (see pp_gen). It changes only
// how the truncation error falls, not the accuracy.
// The datapath follows the document's figure of this unit; valid and reset are
// this design's own.
module sp_unit_normal
  import nr_pkg::*;
#(
  parameter bit REDUCED_SE = 1'b0   // reduced sign extension in the cs/normal multiplier
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fix_t d,
  input  fix_t r,
  output logic out_valid,
  output fix_t d_out,
  output fix_t r_next
);

  fix_t p, x_s, x_c;
  fix_t x_s_q, x_c_q, r_q, d_q;
  logic v_q;
  fix_t m_s, m_c;
  logic [NDIG-1:0][2:0] dig_unused;   // recoded digits, only needed by alternative 2

  mult_normal u_mul1 (.a(r), .b(d), .p(p));

  inv_array #(.REDUNDANT(1'b0)) u_inv (.p_s(p), .p_c('0), .x_s(x_s), .x_c(x_c));

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q   <= 1'b0;
      d_q   <= '0;
      r_q   <= '0;
      x_s_q <= '0;
      x_c_q <= '0;
    end else begin
      v_q   <= in_valid;
      d_q   <= d;
      r_q   <= r;
      x_s_q <= x_s;
      x_c_q <= x_c;
    end
  end

  mult_csn #(.REDUCED_SE(REDUCED_SE)) u_mul2 (.a_s(x_s_q), .a_c(x_c_q), .m(r_q), .p_s(m_s), .p_c(m_c), .dig_out(dig_unused));

  cpa u_cpa (.s(m_s), .c(m_c), .y(r_next));

  assign out_valid = v_q;
  assign d_out     = d_q;

endmodule
