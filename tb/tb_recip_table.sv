// tb_recip_table: checks every entry of the initial reciprocal table.
//
// The expected R0 of each of the 32 input intervals is computed in real arithmetic
// as 1/midpoint rounded to 7 fraction bits, and compared with the table output for
// random mantissas from that interval. It also checks that R0 approximates 1/d
// to better than 2^-5.8 relative error over many random mantissas.
module tb_recip_table;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [MANT_W-1:0] d;
  fix_t              r0;
  real               worst = 0.0;

  recip_table dut (.d(d), .r0(r0));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int k = 0; k < 20; k++) begin
        real    mid, expr;
        longint expfix;
        d = {1'b1, 5'(i), 18'($urandom)};
        if (k == 0) d[17:0] = '0;
        if (k == 1) d[17:0] = '1;
        #1;
        mid    = 1.0 + (2.0 * i + 1.0) / 64.0;
        expr   = $floor(128.0 / mid + 0.5);            // 7 fraction bits
        expfix = longint'(expr) <<< (FRAC_BITS - 7);
        checks++;
        if (s32(r0) != expfix) begin
          failures++;
          $display("FAIL idx=%0d r0=%h expected=%h", i, r0, expfix);
        end
      end
    end
    for (int n = 0; n < 5000; n++) begin
      real dv, err;
      d = rand_mant();
      #1;
      dv  = real'(d) / real'(1 << 23);
      err = 1.0 - fix_to_real(s32(r0)) * dv;
      if (err < 0) err = -err;
      if (err > worst) worst = err;
    end
    checks++;
    if (worst > 2.0 ** -5.8) begin
      failures++;
      $display("FAIL worst relative error %g", worst);
    end
    $display("worst relative error of R0: %g (2^%0.2f)", worst, $ln(worst) / $ln(2.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
