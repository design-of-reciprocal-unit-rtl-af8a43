// tb_mult_compare: cross-check of the three multipliers against each other.
//
// A tester drives two operands X and Y, each as a carry-save pair (Xs, Xc) and
// (Ys, Yc). The normal multiplier gets both operands through a CPA, the cs/normal
// multiplier gets X in carry-save form (recoded) and Y through a CPA, and the 2cs
// multiplier gets both pairs. The carry-save results go through a CPA. The normal
// multiplier, whose product is the exact truncated one, is the reference: each
// carry-save result may be at most one unit of 2^-29 below it. Operands are kept
// so that every product lies in [-2, 2), the range the unit works in.
module tb_mult_compare;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  fix_t xs, xc, ys, yc, x, y;
  fix_t p_norm, p1_s, p1_c, p2_s, p2_c, p1, p2;

  cpa u_cpa_x (.s(xs), .c(xc), .y(x));
  cpa u_cpa_y (.s(ys), .c(yc), .y(y));

  mult_normal u_norm (.a(x), .b(y), .p(p_norm));
  logic [FIX_W/2-1:0][2:0] dig_csn;
  mult_csn    u_csn  (.a_s(xs), .a_c(xc), .m(y), .p_s(p1_s), .p_c(p1_c), .dig_out(dig_csn));
  mult_2cs    u_2cs  (.r_s(xs), .r_c(xc), .x_s(ys), .x_c(yc), .dig_in('0), .p_s(p2_s), .p_c(p2_c));

  cpa u_cpa_1 (.s(p1_s), .c(p1_c), .y(p1));
  cpa u_cpa_2 (.s(p2_s), .c(p2_c), .y(p2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint one;
    int     worst1 = 0, worst2 = 0;
    one = 64'sd1 <<< FRAC_BITS;
    for (int n = 0; n < 20000; n++) begin
      longint xv, yv, e1, e2;
      xv = rand_range(-2 * one, 2 * one - 1);
      yv = rand_range(-one, one - 1);
      xs = $urandom;
      xc = 32'(xv - s32(xs));
      ys = fix_t'($signed($urandom) >>> 1);
      yc = 32'(yv - s32(ys));
      @(posedge clk);
      #1;
      e1 = s32(p_norm) - s32(p1);
      e2 = s32(p_norm) - s32(p2);
      if (int'(e1) > worst1) worst1 = int'(e1);
      if (int'(e2) > worst2) worst2 = int'(e2);
      checks += 2;
      if (e1 < 0 || e1 > 1) begin
        failures++;
        if (failures < 10) $display("FAIL cs/normal %h vs normal %h", p1, p_norm);
      end
      if (e2 < 0 || e2 > 1) begin
        failures++;
        if (failures < 10) $display("FAIL 2cs %h vs normal %h", p2, p_norm);
      end
    end
    $display("largest shortfall: cs/normal %0d ulp, 2cs %0d ulp", worst1, worst2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
