// nr_unrolled: pipelined single-precision reciprocal unit (unrolled version).
//
// A mantissa d in [1, 2) (24 bits, hidden one included) is looked up in the
// 5-in/6-out table for R0, then ITER = 2 SP units, each performing one
// Newton-Raphson iteration, refine it; a register separates consecutive SP units.
// ALT selects the SP unit: 1 = normal multiplier + cs/normal multiplier (R in
// normal form between units), 2 = fully redundant (R in carry-save form between
// units, a CPA after the last unit). The result r is 1/d with 1 integer and 24
// fraction bits, truncated; it is below 1/d by less than 2^-23.
// SHARE_RECODER (ALT=2 only) is passed to the SP units: 1 gives one recoder per
// unit instead of two, with bit-identical results. REDUCED_SE is passed to all
// carry-save multipliers (see pp_gen). Results stay within the same bounds but
// can differ from the default in the last bit.
//
// Timing: one operand per cycle (in_valid), result 2*ITER-1 = 3 clock edges
// later with out_valid. No stall: the pipeline always advances. Reset is
// synchronous, active high, and clears all valid bits.
// The table, the two iterations and the register layout follow the document;
// the valid pipeline and the final CPA of alternative 2 are this design's own.
module nr_unrolled
  import nr_pkg::*;
#(
  parameter int unsigned ALT  = 2,
  parameter int unsigned ITER = NR_ITER,
  parameter bit          SHARE_RECODER = 1'b0,  // ALT=2 only: one recoder per SP unit
  parameter bit          REDUCED_SE = 1'b0      // reduced sign extension of the partial products
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [MANT_W-1:0] d,
  output logic              out_valid,
  output logic [RES_W-1:0]  r
);

  // per-stage values at the SP unit inputs (index k) and outputs (k)
  logic [ITER-1:0] sp_in_v, sp_out_v;
  fix_t            sp_in_d  [ITER];
  cs_t             sp_in_r  [ITER];
  fix_t            sp_out_d [ITER];
  cs_t             sp_out_r [ITER];

  fix_t r0;
  recip_table u_table (.d(d), .r0(r0));

  assign sp_in_v[0]   = in_valid;
  assign sp_in_d[0]   = mant_to_fix(d);
  assign sp_in_r[0].s = r0;
  assign sp_in_r[0].c = '0;

  for (genvar k = 0; k < ITER; k++) begin : g_stage
    if (ALT == 1) begin : g_alt1
      sp_unit_normal #(.REDUCED_SE(REDUCED_SE)) u_sp (
        .clk, .rst,
        .in_valid  (sp_in_v[k]),
        .d         (sp_in_d[k]),
        .r         (sp_in_r[k].s),
        .out_valid (sp_out_v[k]),
        .d_out     (sp_out_d[k]),
        .r_next    (sp_out_r[k].s)
      );
      assign sp_out_r[k].c = '0;
    end else begin : g_alt2
      sp_unit_cs #(.SHARE_RECODER(SHARE_RECODER), .REDUCED_SE(REDUCED_SE)) u_sp (
        .clk, .rst,
        .in_valid  (sp_in_v[k]),
        .d         (sp_in_d[k]),
        .r_s       (sp_in_r[k].s),
        .r_c       (sp_in_r[k].c),
        .out_valid (sp_out_v[k]),
        .d_out     (sp_out_d[k]),
        .r_s_next  (sp_out_r[k].s),
        .r_c_next  (sp_out_r[k].c)
      );
    end

    if (k + 1 < ITER) begin : g_reg
      always_ff @(posedge clk) begin
        if (rst) begin
          sp_in_v[k+1] <= 1'b0;
          sp_in_d[k+1] <= '0;
          sp_in_r[k+1] <= '0;
        end else begin
          sp_in_v[k+1] <= sp_out_v[k];
          sp_in_d[k+1] <= sp_out_d[k];
          sp_in_r[k+1] <= sp_out_r[k];
        end
      end
    end
  end

  fix_t r_fix;
  cpa u_cpa (.s(sp_out_r[ITER-1].s), .c(sp_out_r[ITER-1].c), .y(r_fix));

  assign out_valid = sp_out_v[ITER-1];
  assign r         = fix_to_res(r_fix);

endmodule
