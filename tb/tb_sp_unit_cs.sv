// tb_sp_unit_cs: checks one Newton-Raphson iteration of the alternative 2 (R as a carry-save pair) SP unit.
//
// Random mantissas d and first guesses R = (1/d)(1 + e), |e| < 2^-5, enter with a
// random valid pattern (often back to back). Every result must come out exactly
// one clock edge later, with its own d, and must match R(2 - R d) computed in
// real arithmetic to within 5 units of 2^-29 (truncations of the datapath).
// The testbench also checks that the error after the step is of the order e^2.
// A second instance with SHARE_RECODER = 1 (one recoder, digits registered) runs
// on the same inputs and must give bit-identical outputs. A third with
// REDUCED_SE = 1 (reduced sign extension) must meet the same tolerance as the first.
module tb_sp_unit_cs;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  logic rst, in_valid, out_valid;
  fix_t d_in, d_out;
  cs_t  r_in, r_out;

  sp_unit_cs dut (
    .clk, .rst, .in_valid, .d(d_in), .r_s(r_in.s), .r_c(r_in.c), .r_s_next(r_out.s), .r_c_next(r_out.c),
    .out_valid, .d_out
  );

  logic sh_valid;
  fix_t sh_d;
  cs_t  sh_r;
  sp_unit_cs #(.SHARE_RECODER(1'b1)) dut_sh (
    .clk, .rst, .in_valid, .d(d_in), .r_s(r_in.s), .r_c(r_in.c), .r_s_next(sh_r.s), .r_c_next(sh_r.c),
    .out_valid(sh_valid), .d_out(sh_d)
  );

  logic rs_valid;
  fix_t rs_d;
  cs_t  rs_r;
  sp_unit_cs #(.REDUCED_SE(1'b1)) dut_rs (
    .clk, .rst, .in_valid, .d(d_in), .r_s(r_in.s), .r_c(r_in.c), .r_s_next(rs_r.s), .r_c_next(rs_r.c),
    .out_valid(rs_valid), .d_out(rs_d)
  );

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
      r_in.s = fix_t'($signed($urandom) >>> 1); r_in.c = 32'(rv - s32(r_in.s));
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
    checks++;
    if (sh_valid !== out_valid || (exp_v && (sh_r !== r_out || sh_d !== d_out))) begin
      failures++;
      if (failures < 10) $display("FAIL shared-recoder instance differs");
    end
    checks++;
    if (rs_valid !== exp_v || (exp_v && rs_d !== exp_d)) begin
      failures++;
      if (failures < 10) $display("FAIL reduced-sign instance valid/d");
    end
    if (exp_v) begin
      got = fix_to_real(s32(rs_r.s) + s32(rs_r.c));
      checks++;
      if (got - exp_r > 5.0 * 2.0 ** -29 || exp_r - got > 5.0 * 2.0 ** -29) begin
        failures++;
        if (failures < 10) $display("FAIL reduced-sign r_next=%f exp=%f", got, exp_r);
      end
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
