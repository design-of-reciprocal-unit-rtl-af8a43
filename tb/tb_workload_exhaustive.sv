// tb_workload_exhaustive: every single-precision mantissa through the unit.
//
// All 2^23 mantissas d = 1.f are streamed back to back through the default
// pipelined unit (alternative 2, two iterations). For each iteration j the
// testbench reads R_j inside the pipeline and counts the operands whose relative
// error |1 - R_j d| exceeds the nominal precision of that iteration, 2^-6, 2^-12
// and 2^-24 (6 bits from the table, doubled by each iteration). For the final
// result it also counts how many differ from the exactly truncated reciprocal
// floor(2^47/D) and by how much. A failure is counted if the final result is
// ever more than 2^-23 away from 1/d or if an iteration does not improve the
// worst error by at least a factor 2^5.
// STRIDE > 1 tests every STRIDE-th mantissa only.
module tb_workload_exhaustive;
  import nr_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned STRIDE = 1;
  localparam int unsigned NTEST  = (1 << 23) / STRIDE;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  logic rst, in_valid, out_valid;
  logic [MANT_W-1:0] d;
  logic [RES_W-1:0]  r;

  nr_unrolled dut (.clk, .rst, .in_valid, .d, .out_valid, .r);

  longint unsigned n_err [3];
  real             worst [3];
  longint unsigned n_res, hist [-2:3];

  initial begin
    repeat (NTEST + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // relative error of a fixed-point R against mantissa m
  function automatic real rel_err(input longint rv, input logic [MANT_W-1:0] m);
    real e;
    e = 1.0 - fix_to_real(rv) * (real'(m) / real'(1 << 23));
    return (e < 0.0) ? -e : e;
  endfunction

  task automatic tally(input int j, input real e);
    real lim;
    lim = (j == 0) ? 2.0 ** -6 : (j == 1) ? 2.0 ** -12 : 2.0 ** -24;
    if (e > lim) n_err[j]++;
    if (e > worst[j]) worst[j] = e;
  endtask

  // R0 at the table output, R1 at the first SP unit's output, R2 before the
  // final truncation (the last SP unit's output through the CPA)
  always @(negedge clk) if (!rst) begin
    if (in_valid)
      tally(0, rel_err(s32(dut.sp_in_r[0].s) + s32(dut.sp_in_r[0].c), d));
    if (dut.sp_out_v[0])
      tally(1, rel_err(s32(dut.sp_out_r[0].s) + s32(dut.sp_out_r[0].c),
                       dut.sp_out_d[0][FRAC-MANT_W+1 +: MANT_W]));
    if (dut.sp_out_v[1]) begin
      logic [MANT_W-1:0] m;
      longint            diff;
      m = dut.sp_out_d[1][FRAC-MANT_W+1 +: MANT_W];
      tally(2, rel_err(s32(dut.r_fix), m));
      n_res++;
      diff = recip_floor(m) - longint'({39'd0, r});
      checks++;
      if (diff < -1 || diff > 2) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h r=%h", m, r);
      end
      if (diff >= -2 && diff <= 3) hist[diff]++;
    end
  end

  initial begin
    foreach (n_err[j]) begin
      n_err[j] = 0;
      worst[j] = 0.0;
    end
    foreach (hist[k]) hist[k] = 0;
    n_res    = 0;
    rst      = 1'b1;
    in_valid = 1'b0;
    d        = '0;
    repeat (3) @(posedge clk);
    @(posedge clk);
    #1;
    rst = 1'b0;
    for (int unsigned n = 0; n < NTEST; n++) begin
      in_valid = 1'b1;
      d        = {1'b1, 23'(n * STRIDE)};
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    for (int j = 0; j < 3; j++)
      $display("iteration %0d: %0d of %0d above 2^-%0d (%0.2f%%), worst relative error 2^%0.2f",
               j, n_err[j], NTEST, (j == 0) ? 6 : (j == 1) ? 12 : 24,
               100.0 * real'(n_err[j]) / real'(NTEST), $ln(worst[j]) / $ln(2.0));
    for (int k = -2; k <= 3; k++)
      if (hist[k] != 0) $display("floor(2^47/D) - r = %0d: %0d results", k, hist[k]);
    checks += 3;
    if (n_res != NTEST) failures++;
    if (worst[1] > worst[0] * 2.0 ** -5) failures++;
    if (worst[2] > worst[1] * 2.0 ** -5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
