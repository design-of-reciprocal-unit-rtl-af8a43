// tb_recoder: checks the radix-4 recoding of carry-save operands.
//
// A random target value T in [-2, 2) (internal scaling) is split into a random
// carry-save pair s + c = T (mod 2^32). The testbench sums dig[i] * 4^i in 64-bit
// integer arithmetic and requires exactly T, with every digit in -2..2. Corner
// pairs (all ones, zero, extremes of the range) are included.
module tb_recoder;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0]       s, c;
  logic [15:0][2:0]  dig;

  recoder dut (.s(s), .c(c), .dig(dig));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint t);
    longint acc;
    logic   bad_digit;
    #1;
    acc = 0;
    bad_digit = 1'b0;
    for (int i = 15; i >= 0; i--) begin
      longint z;
      z = longint'($signed(dig[i]));
      if (z < -2 || z > 2) bad_digit = 1'b1;
      acc = acc * 4 + z;
    end
    checks++;
    if (acc != t || bad_digit) begin
      failures++;
      if (failures < 10) $display("FAIL s=%h c=%h T=%0d got=%0d", s, c, t, acc);
    end
  endtask

  initial begin
    longint t;
    longint lo, hi;
    lo = -(64'sd2 <<< FRAC_BITS);
    hi = (64'sd2 <<< FRAC_BITS) - 1;
    // corners
    for (int k = 0; k < 6; k++) begin
      case (k)
        0: t = 0;
        1: t = lo;
        2: t = hi;
        3: t = 64'sd1 <<< FRAC_BITS;
        4: t = -1;
        default: t = 1;
      endcase
      s = 32'hffff_ffff;
      c = 32'(t - s32(s));
      check(t);
      s = 32'h5555_5555;
      c = 32'(t - s32(s));
      check(t);
    end
    for (int n = 0; n < 20000; n++) begin
      t = rand_range(lo, hi);
      s = $urandom;
      c = 32'(t - s32(s));
      check(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
