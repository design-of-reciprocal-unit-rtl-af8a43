// tb_csa_tree: checks the 3:2 reduction tree.
//
// Two instances are tested with random rows: the 18-row, 64-bit tree of the
// cs/normal multiplier and a 4-row tree (the 4:2 merge). sum + carry must equal
// the sum of all rows modulo 2^64.
module tb_csa_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [17:0][63:0] rows18;
  logic [3:0][63:0]  rows4;
  logic [63:0]       s18, c18, s4, c4;

  csa_tree #(.ROWS(18), .W(64)) dut18 (.rows(rows18), .sum(s18), .carry(c18));
  csa_tree #(.ROWS(4),  .W(64)) dut4  (.rows(rows4),  .sum(s4),  .carry(c4));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10000; n++) begin
      logic [63:0] e18, e4;
      e18 = '0;
      e4  = '0;
      for (int i = 0; i < 18; i++) begin
        rows18[i] = (n == 0) ? '1 : {$urandom, $urandom};
        e18 += rows18[i];
      end
      for (int i = 0; i < 4; i++) begin
        rows4[i] = (n == 0) ? '1 : {$urandom, $urandom};
        e4 += rows4[i];
      end
      #1;
      checks += 2;
      if (s18 + c18 !== e18) begin
        failures++;
        if (failures < 10) $display("FAIL 18-row tree");
      end
      if (s4 + c4 !== e4) begin
        failures++;
        if (failures < 10) $display("FAIL 4-row tree");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
