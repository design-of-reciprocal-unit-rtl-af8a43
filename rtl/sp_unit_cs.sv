// sp_unit_cs: one Newton-Raphson iteration with R in carry-save form,
// alternative 2 (fully redundant).
//
// First half: the cs/normal multiplier recodes R = r_s + r_c and multiplies it
// with d, adding the constant -(2 + 2 ulp) in its tree; the inverter array then
// inverts both vectors, which gives a pair x_s + x_c = 2 - R*d exactly. The
// pipeline register holds R (both vectors), x (both vectors), d and a valid bit.
// Second half: the 2cs multiplier forms R*x with R recoded and x_s, x_c used as
// two multiplicands. R' leaves in carry-save form; no carry propagates anywhere
// in the unit.
//
// SHARE_RECODER = 1 is the variant with one recoder per unit instead of two:
// both multipliers recode the same R, so the digits of the first multiplier's
// recoder are registered (48 bits instead of the 64 bits of r_s, r_c) and the
// second multiplier takes them instead of recoding R again. The results are
// bit-identical to the default, which has a recoder in each multiplier.
// REDUCED_SE is passed to both multipliers (see pp_gen). It changes only how
// the truncation error falls, not the accuracy.
//
// Timing: one register; a new operand can enter every cycle and its result
// appears one clock edge later. Reset is synchronous and active high.
// The datapath and the shared-recoder variant follow the document; where the
// inverter's +1 is added, valid and reset are this design's own.
module sp_unit_cs
  import nr_pkg::*;
#(
  parameter bit SHARE_RECODER = 1'b0,
  parameter bit REDUCED_SE    = 1'b0   // reduced sign extension in both multipliers
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fix_t d,
  input  fix_t r_s,
  input  fix_t r_c,
  output logic out_valid,
  output fix_t d_out,
  output fix_t r_s_next,
  output fix_t r_c_next
);

  // -(2 + 2 ulp) at the scale of the full product (2*FRAC fraction bits)
  localparam logic [PROD_W-1:0] K_INV =
    PROD_W'(-((64'd2 << (2 * FRAC)) + (64'd2 << FRAC)));

  fix_t               p_s, p_c, x_s, x_c;
  fix_t               x_s_q, x_c_q, d_q;
  logic               v_q;
  logic [NDIG-1:0][2:0] dig;

  mult_csn #(.K(K_INV), .REDUCED_SE(REDUCED_SE)) u_mul1 (
    .a_s (r_s), .a_c (r_c), .m (d),
    .p_s (p_s), .p_c (p_c), .dig_out (dig)
  );

  inv_array #(.REDUNDANT(1'b1)) u_inv (.p_s(p_s), .p_c(p_c), .x_s(x_s), .x_c(x_c));

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q   <= 1'b0;
      d_q   <= '0;
      x_s_q <= '0;
      x_c_q <= '0;
    end else begin
      v_q   <= in_valid;
      d_q   <= d;
      x_s_q <= x_s;
      x_c_q <= x_c;
    end
  end

  if (SHARE_RECODER) begin : g_shared
    // register the recoded digits of R; the second multiplier has no recoder
    logic [NDIG-1:0][2:0] dig_q;
    always_ff @(posedge clk) begin
      if (rst) dig_q <= '0;
      else     dig_q <= dig;
    end
    mult_2cs #(.EXT_DIG(1'b1), .REDUCED_SE(REDUCED_SE)) u_mul2 (
      .r_s (x_s_q), .r_c (x_c_q),     // unused with EXT_DIG
      .x_s (x_s_q), .x_c (x_c_q),
      .dig_in (dig_q),
      .p_s (r_s_next), .p_c (r_c_next)
    );
  end else begin : g_two_recoders
    fix_t r_s_q, r_c_q;
    always_ff @(posedge clk) begin
      if (rst) begin
        r_s_q <= '0;
        r_c_q <= '0;
      end else begin
        r_s_q <= r_s;
        r_c_q <= r_c;
      end
    end
    mult_2cs #(.REDUCED_SE(REDUCED_SE)) u_mul2 (
      .r_s (r_s_q), .r_c (r_c_q),
      .x_s (x_s_q), .x_c (x_c_q),
      .dig_in ('0),
      .p_s (r_s_next), .p_c (r_c_next)
    );
  end

  assign out_valid = v_q;
  assign d_out     = d_q;

endmodule
