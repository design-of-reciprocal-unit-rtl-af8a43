// tb_nr_recip_top: end-to-end test of the whole reciprocal unit at its default
// parameters (two iterations, 24-bit mantissa, 5-in/6-out table).
//
// All four units run at once on independent random operand streams:
//  - both unrolled pipelines get operands with a random valid pattern, including
//    back-to-back runs, and every result is checked 3 edges later;
//  - both iterative units get start pulses, also while they are busy, and every
//    done is checked 4 edges after the accepted start.
// Every result must lie within 2^-23 of 1/d (floor(2^47/D) - 2 <= r <=
// floor(2^47/D) + 1), and results must match between the two alternatives'
// units within that bound. A reset in the middle of a stream must cancel all
// operations in flight. The testbench counts, and requires at least once:
// back-to-back issue, pipeline bubbles, the iterative multiplexer choosing the
// table and the loop register, a start ignored while busy, a carry-save pair
// corrected for wrap-around, and the mid-stream reset.
module tb_nr_recip_top;
  import nr_pkg::*;
  import tb_util_pkg::*;

  localparam int LAT_U = 3;
  localparam int LAT_I = 4;
  localparam int NOPS  = 30000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              rst;
  logic              u2_in_valid, u1_in_valid, u2_out_valid, u1_out_valid;
  logic [MANT_W-1:0] u2_d, u1_d, i2_d, i1_d;
  logic [RES_W-1:0]  u2_r, u1_r, i2_r, i1_r;
  logic              i2_start, i1_start, i2_busy, i1_busy, i2_done, i1_done;

  nr_recip_top dut (.*);

  // ---------------------------------------------------------------- counters
  int n_back_to_back = 0, n_bubble = 0, n_sel_table = 0, n_sel_loop = 0;
  int n_start_ignored = 0, n_cs_wrap = 0, n_reset = 0;
  int n_u2 = 0, n_u1 = 0, n_i2 = 0, n_i1 = 0;

  initial begin
    repeat (NOPS * 8) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic in_bound(input logic [MANT_W-1:0] dv, input logic [RES_W-1:0] r);
    longint diff;
    diff = recip_floor(dv) - longint'({39'd0, r});
    return diff >= -1 && diff <= 2;
  endfunction

  // ---------------------------------------------------------------- stimulus
  logic prev_u2_v;
  logic stop;

  initial begin
    stop        = 1'b0;
    rst         = 1'b1;
    {u2_in_valid, u1_in_valid, i2_start, i1_start} = '0;
    {u2_d, u1_d, i2_d, i1_d} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NOPS; n++) begin
      if (n == NOPS / 2) begin
        // mid-stream reset with everything busy
        u2_in_valid = 1'b1;
        u1_in_valid = 1'b1;
        @(negedge clk);
        rst = 1'b1;
        n_reset++;
        @(negedge clk);
        rst = 1'b0;
      end
      u2_in_valid = (n < 100) || ($urandom_range(3) != 0);
      u1_in_valid = ($urandom_range(3) != 0);
      u2_d        = (n == 0) ? 24'h80_0000 : (n == 1) ? 24'hff_ffff : rand_mant();
      u1_d        = rand_mant();
      i2_start    = ($urandom_range(1) == 1);
      i1_start    = ($urandom_range(2) == 0);
      i2_d        = rand_mant();
      i1_d        = rand_mant();
      @(negedge clk);
    end
    {u2_in_valid, u1_in_valid, i2_start, i1_start} = '0;
    repeat (10) @(negedge clk);
    stop = 1'b1;
  end

  // ---------------------------------------------------------------- unrolled reference
  logic              v2 [LAT_U], v1 [LAT_U];
  logic [MANT_W-1:0] d2 [LAT_U], d1 [LAT_U];

  always @(posedge clk) begin
    v2[0] <= rst ? 1'b0 : u2_in_valid;
    v1[0] <= rst ? 1'b0 : u1_in_valid;
    d2[0] <= u2_d;
    d1[0] <= u1_d;
    for (int k = 1; k < LAT_U; k++) begin
      v2[k] <= rst ? 1'b0 : v2[k-1];
      v1[k] <= rst ? 1'b0 : v1[k-1];
      d2[k] <= d2[k-1];
      d1[k] <= d1[k-1];
    end
    prev_u2_v <= rst ? 1'b0 : u2_in_valid;
    if (!rst && u2_in_valid && prev_u2_v) n_back_to_back++;
    if (!rst && !u2_in_valid && prev_u2_v) n_bubble++;
  end

  // ---------------------------------------------------------------- iterative reference
  logic [MANT_W-1:0] id2, id1;
  int                cnt2, cnt1;   // edges since the accepted start, -1 when idle;
                                   // done is due when the count reaches LAT_I

  always @(posedge clk) begin
    if (rst) begin
      cnt2 <= -1;
      cnt1 <= -1;
    end else begin
      if (!i2_busy && i2_start) begin
        id2  <= i2_d;
        cnt2 <= 0;
      end else if (cnt2 >= 0) begin
        cnt2 <= (cnt2 == LAT_I) ? -1 : cnt2 + 1;
      end
      if (!i1_busy && i1_start) begin
        id1  <= i1_d;
        cnt1 <= 0;
      end else if (cnt1 >= 0) begin
        cnt1 <= (cnt1 == LAT_I) ? -1 : cnt1 + 1;
      end
      if (i2_busy && i2_start) n_start_ignored++;
    end
  end

  // ---------------------------------------------------------------- mechanism probes
  always @(posedge clk) if (!rst) begin
    if (dut.u_iterative2.state == dut.u_iterative2.S_HALF1) begin
      if (dut.u_iterative2.sel_table) n_sel_table++;
      else                            n_sel_loop++;
    end
    if (dut.u_unrolled2.g_stage[0].g_alt2.u_sp.u_mul1.tr != dut.u_unrolled2.g_stage[0].g_alt2.u_sp.u_mul1.pn ||
        dut.u_unrolled2.g_stage[0].g_alt2.u_sp.g_two_recoders.u_mul2.tr != dut.u_unrolled2.g_stage[0].g_alt2.u_sp.g_two_recoders.u_mul2.pn ||
        dut.u_unrolled2.g_stage[1].g_alt2.u_sp.u_mul1.tr != dut.u_unrolled2.g_stage[1].g_alt2.u_sp.u_mul1.pn ||
        dut.u_unrolled2.g_stage[1].g_alt2.u_sp.g_two_recoders.u_mul2.tr != dut.u_unrolled2.g_stage[1].g_alt2.u_sp.g_two_recoders.u_mul2.pn)
      n_cs_wrap++;
  end

  // ---------------------------------------------------------------- checks
  always @(negedge clk) if (!rst) begin
    checks += 2;
    if (u2_out_valid !== v2[LAT_U-1]) begin
      failures++;
      if (failures < 10) $display("FAIL u2 valid %b exp %b", u2_out_valid, v2[LAT_U-1]);
    end
    if (u1_out_valid !== v1[LAT_U-1]) begin
      failures++;
      if (failures < 10) $display("FAIL u1 valid %b exp %b", u1_out_valid, v1[LAT_U-1]);
    end
    if (v2[LAT_U-1]) begin
      n_u2++;
      checks++;
      if (!in_bound(d2[LAT_U-1], u2_r)) begin
        failures++;
        if (failures < 10) $display("FAIL u2 d=%h r=%h", d2[LAT_U-1], u2_r);
      end
    end
    if (v1[LAT_U-1]) begin
      n_u1++;
      checks++;
      if (!in_bound(d1[LAT_U-1], u1_r)) begin
        failures++;
        if (failures < 10) $display("FAIL u1 d=%h r=%h", d1[LAT_U-1], u1_r);
      end
    end
    checks += 2;
    if (i2_done !== (cnt2 == LAT_I)) begin
      failures++;
      if (failures < 10) $display("FAIL i2 done=%b at count %0d", i2_done, cnt2);
    end
    if (i1_done !== (cnt1 == LAT_I)) begin
      failures++;
      if (failures < 10) $display("FAIL i1 done=%b at count %0d", i1_done, cnt1);
    end
    if (i2_done) begin
      n_i2++;
      if (!in_bound(id2, i2_r)) begin
        failures++;
        if (failures < 10) $display("FAIL i2 d=%h r=%h", id2, i2_r);
      end
    end
    if (i1_done) begin
      n_i1++;
      if (!in_bound(id1, i1_r)) begin
        failures++;
        if (failures < 10) $display("FAIL i1 d=%h r=%h", id1, i1_r);
      end
    end
    if (stop) finish_report();
  end

  task automatic finish_report();
    $display("results: unrolled2=%0d unrolled1=%0d iterative2=%0d iterative1=%0d", n_u2, n_u1, n_i2, n_i1);
    $display("back-to-back issues=%0d bubbles=%0d table selects=%0d loop selects=%0d",
             n_back_to_back, n_bubble, n_sel_table, n_sel_loop);
    $display("starts ignored while busy=%0d carry-save wrap corrections=%0d mid-stream resets=%0d",
             n_start_ignored, n_cs_wrap, n_reset);
    checks += 7;
    if (n_back_to_back == 0) failures++;
    if (n_bubble == 0) failures++;
    if (n_sel_table == 0) failures++;
    if (n_sel_loop == 0) failures++;
    if (n_start_ignored == 0) failures++;
    if (n_cs_wrap == 0) failures++;
    if (n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
