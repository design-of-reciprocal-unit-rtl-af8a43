// tb_mult_normal: checks the carry-propagate multiplier.
//
// Random signed operands (full 32-bit range and values near 1) are multiplied in
// 64-bit integer arithmetic; the output must be bits [29 +: 32] of that product,
// i.e. floor(a*b / 2^29) modulo 2^32.
module tb_mult_normal;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [31:0] a, b, p;

  mult_normal dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      longint e;
      if (n % 2 == 0) begin
        a = $urandom;
        b = $urandom;
      end else begin
        a = 32'(rand_range(-(64'sd2 <<< FRAC_BITS), (64'sd2 <<< FRAC_BITS) - 1));
        b = 32'(rand_range(64'sd1 <<< FRAC_BITS, (64'sd2 <<< FRAC_BITS) - 1));
      end
      #1;
      e = floor_shift(s32(a) * s32(b), FRAC_BITS);
      checks++;
      if (p !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h p=%h exp=%h", a, b, p, 32'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
