// tb_inv_array: checks both forms of the inverter array.
//
// Normal form: for random p, x_s + x_c must be 2 - p exactly (as a signed sum);
// a worked example with 23 fraction bits is checked bit for bit.
// Redundant form: for a random pair p_s + p_c = q, x_s + x_c must be -q - 2 ulp,
// which is 2 - R*d when q = R*d - (2 + 2 ulp) comes from the preceding multiplier.
module tb_inv_array;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fix_t p_s, p_c, xn_s, xn_c, xr_s, xr_c;

  inv_array #(.REDUNDANT(1'b0)) dut_n (.p_s(p_s), .p_c(p_c), .x_s(xn_s), .x_c(xn_c));
  inv_array #(.REDUNDANT(1'b1)) dut_r (.p_s(p_s), .p_c(p_c), .x_s(xr_s), .x_c(xr_c));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint one;
    one = 64'sd1 <<< FRAC_BITS;
    // worked example: 10.000...0 - 00.11010101101011100011100 = 01.00101010010100011100100
    p_s = fix_t'(32'b0_0110_1010_1101_0111_0001_1100) <<< 6;
    p_c = '0;
    #1;
    checks++;
    if (32'(s32(xn_s) + s32(xn_c)) != (32'b1_0010_1010_0101_0001_1100_100 <<< 6)) begin
      failures++;
      $display("FAIL worked example: %h", 32'(s32(xn_s) + s32(xn_c)));
    end
    for (int n = 0; n < 5000; n++) begin
      longint pv, qv;
      pv  = rand_range(0, 2 * one - 1);
      qv  = rand_range(-2 * one, 2 * one - 1);
      p_s = 32'(pv);
      p_c = $urandom;
      #1;
      checks++;
      if (s32(xn_s) + s32(xn_c) != 2 * one - pv) begin
        failures++;
        if (failures < 10) $display("FAIL normal p=%0d", pv);
      end
      p_s = $urandom;
      p_c = 32'(qv - s32(p_s));
      #1;
      checks++;
      if (32'(s32(xr_s) + s32(xr_c)) != 32'(-qv - 2)) begin
        failures++;
        if (failures < 10) $display("FAIL redundant q=%0d", qv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
