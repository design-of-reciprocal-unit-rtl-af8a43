// tb_sp_unit_normal: checks one Newton-Raphson iteration of the alternative 1 (normal R) SP unit.
//
// Random mantissas d and first guesses R = (1/d)(1 + e), |e| < 2^-5, enter with a
// random valid pattern (often back to back). Every result must come out exactly
// one clock edge later, with its own d, and must match R(2 - R d) computed in
// real arithmetic to within 5 units of 2^-29 (truncations of the datapath).
// The testbench also checks that the error after the step is of the order e^2.
module tb_sp_unit_normal;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  logic rst, in_valid, out_valid;
  fix_t d_in, d_out;
  cs_t  r_in, r_out;

  sp_unit_normal dut (
    .clk, .rst, .in_valid, .d(d_in), .r(r_in.s), .r_next(r_out.s),
    .out_valid, .d_out
  );
  assign r_out.c = '0;

  // expected values of the operand in the register, captured at the clock edge
  logic exp_v;
  real  exp_r, exp_e0;
  fix_t exp_d;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst      = 1'b1;
    in_valid = 1'b0;
    d_in     = '0;
    r_in     = '0;
    exp_v    = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      longint rv;
      real    dv, e;
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      d_in     = mant_to_fix(rand_mant());
      dv       = fix_to_real(s32(d_in));
      e        = (real'($urandom_range(2000)) - 1000.0) / 1000.0 / 32.0;
      rv       = longint'((1.0 / dv) * (1.0 + e) * real'(64'd1 << FRAC_BITS));
      r_in.s = 32'(rv); r_in.c = '0;
      @(posedge clk);
      // values presented this cycle become the register contents
      exp_v  <= in_valid;
      exp_d  <= d_in;
      exp_r  <= fix_to_real(rv) * (2.0 - fix_to_real(rv) * dv);
      exp_e0 <= 1.0 - fix_to_real(rv) * dv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare in the middle of the cycle after the register has loaded
  always @(negedge clk) if (!rst) begin
    real got, e1;
    checks++;
    if (out_valid !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL valid out=%b exp=%b", out_valid, exp_v);
    end
    if (exp_v) begin
      got = fix_to_real(s32(r_out.s) + s32(r_out.c));
      e1  = 1.0 - got * fix_to_real(s32(exp_d));
      checks++;
      if (d_out !== exp_d || got - exp_r > 5.0 * 2.0 ** -29 || exp_r - got > 5.0 * 2.0 ** -29 ||
          e1 > exp_e0 * exp_e0 + 2.0 ** -26 || e1 < -(2.0 ** -26)) begin
        failures++;
        if (failures < 10) $display("FAIL r_next=%f exp=%f", got, exp_r);
      end
    end
  end
endmodule
