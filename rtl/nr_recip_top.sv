// nr_recip_top: the Newton-Raphson reciprocal unit in its four configurations.
//
// The design computes 1/d for a single-precision mantissa d in [1, 2) with a
// 5-in/6-out initial table and two Newton-Raphson iterations. It was built in two
// arithmetic alternatives (1: normal + cs/normal multiplier; 2: fully redundant,
// cs/normal + 2cs multiplier), each as an unrolled pipeline and as an iterative
// unit. All four stand side by side here with their own ports and share only
// clock and reset; alternative 2 unrolled is the fastest one (3 cycles latency,
// one result per cycle).
//   u2_* : nr_unrolled  ALT=2      u1_* : nr_unrolled  ALT=1
//   i2_* : nr_iterative ALT=2      i1_* : nr_iterative ALT=1
// Ports and timing are those of nr_unrolled and nr_iterative.
module nr_recip_top
  import nr_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // alternative 2, unrolled
  input  logic              u2_in_valid,
  input  logic [MANT_W-1:0] u2_d,
  output logic              u2_out_valid,
  output logic [RES_W-1:0]  u2_r,
  // alternative 1, unrolled
  input  logic              u1_in_valid,
  input  logic [MANT_W-1:0] u1_d,
  output logic              u1_out_valid,
  output logic [RES_W-1:0]  u1_r,
  // alternative 2, iterative
  input  logic              i2_start,
  input  logic [MANT_W-1:0] i2_d,
  output logic              i2_busy,
  output logic              i2_done,
  output logic [RES_W-1:0]  i2_r,
  // alternative 1, iterative
  input  logic              i1_start,
  input  logic [MANT_W-1:0] i1_d,
  output logic              i1_busy,
  output logic              i1_done,
  output logic [RES_W-1:0]  i1_r
);

  nr_unrolled #(.ALT(2)) u_unrolled2 (
    .clk, .rst, .in_valid(u2_in_valid), .d(u2_d), .out_valid(u2_out_valid), .r(u2_r));

  nr_unrolled #(.ALT(1)) u_unrolled1 (
    .clk, .rst, .in_valid(u1_in_valid), .d(u1_d), .out_valid(u1_out_valid), .r(u1_r));

  nr_iterative #(.ALT(2)) u_iterative2 (
    .clk, .rst, .start(i2_start), .d(i2_d), .busy(i2_busy), .done(i2_done), .r(i2_r));

  nr_iterative #(.ALT(1)) u_iterative1 (
    .clk, .rst, .start(i1_start), .d(i1_d), .busy(i1_busy), .done(i1_done), .r(i1_r));

endmodule
