// tb_nr_iterative: checks the iterative reciprocal unit in both alternatives.
//
// Operations are started with random gaps; start pulses while busy must be
// ignored. done must pulse exactly 2*ITER = 4 clock edges after the edge that
// took start, for one cycle, and r must then lie within 2^-23 of 1/d
// (floor(2^47/D) - 2 <= r <= floor(2^47/D) + 1).
// A third instance, ALT=2 with SHARE_RECODER=1, must match the ALT=2 one bit for
// bit (busy, done, and r when done) on every cycle.
module tb_nr_iterative;
  import nr_pkg::*;
  import tb_util_pkg::*;

  localparam int LAT = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  int   ignored_starts = 0;
  logic rst, start;
  logic [MANT_W-1:0] d;
  logic busy1, busy2, done1, done2;
  logic [RES_W-1:0] r1, r2;

  nr_iterative #(.ALT(1)) dut1 (.clk, .rst, .start, .d, .busy(busy1), .done(done1), .r(r1));
  nr_iterative #(.ALT(2)) dut2 (.clk, .rst, .start, .d, .busy(busy2), .done(done2), .r(r2));
  logic             busy3, done3;
  logic [RES_W-1:0] r3;
  nr_iterative #(.ALT(2), .SHARE_RECODER(1'b1)) dut3 (.clk, .rst, .start, .d, .busy(busy3), .done(done3), .r(r3));

  always @(negedge clk) if (!rst) begin
    checks++;
    if (busy3 !== busy2 || done3 !== done2 || (done2 && r3 !== r2)) begin
      failures++;
      if (failures < 10) $display("FAIL shared-recoder instance r=%h exp=%h", r3, r2);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_r(input logic [RES_W-1:0] r, input logic [MANT_W-1:0] dv, input int alt);
    longint diff;
    diff = recip_floor(dv) - longint'({39'd0, r});
    checks++;
    if (diff < -1 || diff > 2) begin
      failures++;
      if (failures < 10) $display("FAIL alt%0d d=%h r=%h ref=%h", alt, dv, r, recip_floor(dv));
    end
  endtask

  initial begin
    rst   = 1'b1;
    start = 1'b0;
    d     = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      logic [MANT_W-1:0] dv;
      int                seen;
      dv    = (n == 0) ? 24'h80_0000 : (n == 1) ? 24'hff_ffff : rand_mant();
      d     = dv;
      start = 1'b1;
      @(negedge clk);
      // keep start high with a different d for a while: must be ignored
      d = rand_mant();
      start = ($urandom_range(1) == 1);
      seen = 0;
      for (int k = 1; k <= LAT + 1; k++) begin
        if (k < LAT) begin
          checks++;
          if (!busy1 || !busy2 || done1 || done2) begin
            failures++;
            if (failures < 10) $display("FAIL busy/done early at %0d", k);
          end
          if (start) ignored_starts++;
        end
        if (k == LAT) start = 1'b0;
        @(posedge clk);
        #1;
        if (done1 || done2) begin
          checks++;
          if (!(done1 && done2) || k != LAT || seen != 0) begin
            failures++;
            if (failures < 10) $display("FAIL done at edge %0d (exp %0d)", k, LAT);
          end
          seen++;
          check_r(r1, dv, 1);
          check_r(r2, dv, 2);
        end
        @(negedge clk);
        if (k < LAT) start = ($urandom_range(1) == 1);
      end
      checks++;
      if (seen != 1 || busy1 || busy2) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d done seen %0d times", n, seen);
      end
      repeat ($urandom_range(2)) @(negedge clk);
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("start pulses ignored while busy: %0d", ignored_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
