// tb_mult_2cs: checks the multiplier with both operands in carry-save form.
//
// R and X are random values (R in [0.5, 1), X in [0.9, 1.1) like in an NR step,
// and fully random ones with |R*X| < 2), each split into a random carry-save pair;
// the pair of X is split so that its two halves add up without wrapping.
// The result, read as the signed sum of its two vectors, must equal
// floor(R*X / 2^29) or one unit less.
module tb_mult_2cs;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fix_t r_s, r_c, x_s, x_c, p_s, p_c;

  mult_2cs dut (.r_s(r_s), .r_c(r_c), .x_s(x_s), .x_c(x_c), .dig_in('0), .p_s(p_s), .p_c(p_c));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint one;
    one = 64'sd1 <<< FRAC_BITS;
    for (int n = 0; n < 20000; n++) begin
      longint rv, xv, got, e;
      if (n % 2 == 0) begin
        rv = rand_range(one / 2, one - 1);
        xv = rand_range(one - one / 10, one + one / 10);
      end else begin
        rv = rand_range(-2 * one, 2 * one - 1);
        xv = rand_range(-one, one - 1);
      end
      r_s = $urandom;
      r_c = 32'(rv - s32(r_s));
      // the multiplicand pair must add up exactly (no 2^32 wrap), as the design's
      // pairs do after cs_norm: keep x_s within +-2^30
      x_s = fix_t'($signed($urandom) >>> 1);
      x_c = 32'(xv - s32(x_s));
      #1;
      got = s32(p_s) + s32(p_c);
      e   = floor_shift(rv * xv, FRAC_BITS) - got;
      checks++;
      if (e < 0 || e > 1) begin
        failures++;
        if (failures < 10) $display("FAIL r=%0d x=%0d got=%0d exp=%0d", rv, xv, got,
                                     floor_shift(rv * xv, FRAC_BITS));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
