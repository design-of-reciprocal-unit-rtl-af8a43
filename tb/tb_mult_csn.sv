// tb_mult_csn: checks the cs/normal carry-save multiplier.
//
// The carry-save operand is a random value A in [-2, 2) split into a random pair;
// the normal operand M is chosen so that A*M stays in [-2, 2). The exact product
// is formed in 64-bit integers. The result pair, read as the signed sum of two
// 32-bit numbers (no wrap allowed), must equal floor(A*M / 2^29) or be one unit
// below it (the two vectors are truncated separately). A second instance adds the
// constant row -(2 + 2 ulp) and is checked against A*M - 2 - 2 ulp the same way.
module tb_mult_csn;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam logic [63:0] KC = 64'(-((64'sd2 <<< 58) + (64'sd2 <<< 29)));

  int checks = 0, failures = 0, max_err = 0;
  fix_t a_s, a_c, m, p_s, p_c, q_s, q_c;

  logic [FIX_W/2-1:0][2:0] dig0, dig1;
  mult_csn dut  (.a_s(a_s), .a_c(a_c), .m(m), .p_s(p_s), .p_c(p_c), .dig_out(dig0));
  mult_csn #(.K(KC)) dutk (.a_s(a_s), .a_c(a_c), .m(m), .p_s(q_s), .p_c(q_c), .dig_out(dig1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input longint exact, input longint got, input string tag);
    longint e;
    e = floor_shift(exact, FRAC_BITS) - got;
    checks++;
    if (e > max_err) max_err = int'(e);
    if (e < 0 || e > 1) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h+%h m=%h got=%0d exp=%0d", tag, a_s, a_c, m, got,
                                   floor_shift(exact, FRAC_BITS));
    end
  endtask

  initial begin
    longint one;
    one = 64'sd1 <<< FRAC_BITS;
    for (int n = 0; n < 20000; n++) begin
      longint av, mv;
      av  = rand_range(-2 * one, 2 * one - 1);
      if (n % 2 == 0) begin
        // NR-like: A = R near 1/d, M = d in [1, 2)
        mv = rand_range(one, 2 * one - 1);
        av = rand_range(one / 2, one - 1);
      end else begin
        mv = rand_range(-one, one - 1);       // |A*M| < 2
      end
      a_s = $urandom;
      a_c = 32'(av - s32(a_s));
      m   = 32'(mv);
      #1;
      cmp(av * mv, s32(p_s) + s32(p_c), "K=0");
      if (n % 2 == 0)
        cmp(av * mv - ((64'sd2 <<< 58) + (64'sd2 <<< 29)), s32(q_s) + s32(q_c), "K");
    end
    $display("largest truncation error: %0d ulp", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
