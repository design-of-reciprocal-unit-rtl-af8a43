// tb_nr_unrolled: checks the pipelined reciprocal unit in both alternatives.
//
// The same stream of mantissas drives an ALT=1 and an ALT=2 instance: random
// mantissas, 1.0, the largest mantissa, and both ends of every table interval,
// with a random valid pattern that includes long back-to-back runs. Each result
// must appear exactly 3 clock edges after its operand (2*ITER - 1) and must
// satisfy floor(2^47/D) - 2 <= r <= floor(2^47/D) + 1, i.e. lie within 2^-23 of
// 1/d. The testbench also reports how many results are off by how much.
// A third instance, ALT=2 with SHARE_RECODER=1, must match the ALT=2 one bit for
// bit on every cycle. Two more, ALT=1 and ALT=2 with REDUCED_SE=1, are held to the
// same timing and error bounds as the first two.
module tb_nr_unrolled;
  import nr_pkg::*;
  import tb_util_pkg::*;

  localparam int LAT = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  int   hist [-4:4];
  logic rst, in_valid;
  logic [MANT_W-1:0] d;
  logic              ov1, ov2;
  logic [RES_W-1:0]  r1, r2;

  nr_unrolled #(.ALT(1)) dut1 (.clk, .rst, .in_valid, .d, .out_valid(ov1), .r(r1));
  nr_unrolled #(.ALT(2)) dut2 (.clk, .rst, .in_valid, .d, .out_valid(ov2), .r(r2));
  logic             ov3;
  logic [RES_W-1:0] r3;
  nr_unrolled #(.ALT(2), .SHARE_RECODER(1'b1)) dut3 (.clk, .rst, .in_valid, .d, .out_valid(ov3), .r(r3));
  logic             ov4;
  logic [RES_W-1:0] r4;
  nr_unrolled #(.ALT(1), .REDUCED_SE(1'b1)) dut4 (.clk, .rst, .in_valid, .d, .out_valid(ov4), .r(r4));
  logic             ov5;
  logic [RES_W-1:0] r5;
  nr_unrolled #(.ALT(2), .REDUCED_SE(1'b1)) dut5 (.clk, .rst, .in_valid, .d, .out_valid(ov5), .r(r5));

  logic              pv [LAT+1];
  logic [MANT_W-1:0] pd [LAT+1];

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MANT_W-1:0] pick(input int n);
    if (n == 0) return 24'h80_0000;
    if (n == 1) return 24'hff_ffff;
    if (n < 66) return {1'b1, 5'((n - 2) / 2), ((n % 2) ? 18'h3ffff : 18'h0)};
    return rand_mant();
  endfunction

  initial begin
    foreach (hist[k]) hist[k] = 0;
    rst      = 1'b1;
    in_valid = 1'b0;
    d        = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      in_valid = (n < 200) ? 1'b1 : ($urandom_range(4) != 0);
      d        = pick(n);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    for (int k = -4; k <= 4; k++) if (hist[k] != 0) $display("ref - r = %0d : %0d results", k, hist[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference delay line, sampled at each rising edge
  always @(posedge clk) begin
    pv[0] <= rst ? 1'b0 : in_valid;
    pd[0] <= d;
    for (int k = 1; k <= LAT; k++) begin
      pv[k] <= pv[k-1];
      pd[k] <= pd[k-1];
    end
  end

  task automatic check_res(input logic ov, input logic [RES_W-1:0] r, input int alt);
    longint diff;
    checks++;
    if (ov !== pv[LAT-1]) begin
      failures++;
      if (failures < 10) $display("FAIL alt%0d valid=%b exp=%b", alt, ov, pv[LAT-1]);
    end
    if (pv[LAT-1]) begin
      diff = recip_floor(pd[LAT-1]) - longint'({39'd0, r});
      if (diff >= -4 && diff <= 4) hist[diff]++;
      checks++;
      if (diff < -1 || diff > 2) begin
        failures++;
        if (failures < 10) $display("FAIL alt%0d d=%h r=%h ref=%h", alt, pd[LAT-1], r, recip_floor(pd[LAT-1]));
      end
    end
  endtask

  always @(negedge clk) if (!rst) begin
    check_res(ov1, r1, 1);
    check_res(ov2, r2, 2);
    checks++;
    if (ov3 !== ov2 || (ov2 && r3 !== r2)) begin
      failures++;
      if (failures < 10) $display("FAIL shared-recoder instance r=%h exp=%h", r3, r2);
    end
    check_res(ov4, r4, 1);
    check_res(ov5, r5, 2);
  end
endmodule
