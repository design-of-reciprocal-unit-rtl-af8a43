// tb_pp_gen: checks the partial product generator.
//
// Random digit strings in -2..2 and random 32-bit multiplicands are applied; the
// sum of all 17 output rows modulo 2^64 must equal m * sum(z_i * 4^i) modulo 2^64,
// computed in 64-bit integer arithmetic. All-negative and all-(+2) digit strings
// and extreme multiplicands are included.
// A second instance with REDUCED_SE = 1 must give the same sum, and each of its
// rows i < 16 must be zero above bit 32 + 2i (no sign extension left).
module tb_pp_gen;
  import nr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0][2:0]  dig;
  logic [31:0]       m;
  logic [16:0][63:0] rows;

  pp_gen dut (.dig(dig), .m(m), .rows(rows));
  logic [16:0][63:0] rows_r;
  pp_gen #(.REDUCED_SE(1'b1)) dut_r (.dig(dig), .m(m), .rows(rows_r));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [63:0] sum, expv;
    longint      zval;
    #1;
    sum = '0;
    for (int i = 0; i <= 16; i++) sum += rows[i];
    zval = 0;
    for (int i = 15; i >= 0; i--) zval = zval * 4 + longint'($signed(dig[i]));
    expv = 64'(zval * s32(m));
    checks++;
    if (sum !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL m=%h sum=%h exp=%h", m, sum, expv);
    end
    sum = '0;
    for (int i = 0; i <= 16; i++) sum += rows_r[i];
    checks++;
    if (sum !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL reduced m=%h sum=%h exp=%h", m, sum, expv);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if ((rows_r[i] >> (33 + 2 * i)) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL reduced row %0d not trimmed: %h", i, rows_r[i]);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 16; i++) dig[i] = 3'(int'($urandom_range(4)) - 2);
      case (n)
        0: for (int i = 0; i < 16; i++) dig[i] = 3'b110;   // -2
        1: for (int i = 0; i < 16; i++) dig[i] = 3'b010;   // +2
        2: for (int i = 0; i < 16; i++) dig[i] = 3'b111;   // -1
        default: ;
      endcase
      m = (n % 3 == 0) ? 32'h8000_0000 : (n % 3 == 1) ? 32'h7fff_ffff : $urandom;
      if (n > 10) m = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
