// tb_cpa: checks the carry-propagate adder against 64-bit integer addition,
// including all-ones operands that carry across the whole word.
module tb_cpa;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] s, c, y;

  cpa dut (.s(s), .c(c), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint unsigned e;
      s = (n == 0) ? 32'hffff_ffff : $urandom;
      c = (n == 0) ? 32'h1 : $urandom;
      #1;
      e = longint'(s) + longint'(c);
      checks++;
      if (y !== e[31:0]) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h = %h", s, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
