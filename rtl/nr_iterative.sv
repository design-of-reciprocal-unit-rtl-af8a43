// nr_iterative: iterative single-precision reciprocal unit.
//
// One SP unit is reused for all ITER = 2 Newton-Raphson iterations. A multiplexer
// in front of it selects the table value R0 on the first pass and the loop
// register (the previous R[j+1]) afterwards; the result is read from the loop
// register. ALT selects the SP unit as in nr_unrolled (1 = normal + cs/normal,
// 2 = fully redundant, with a CPA at the output). SHARE_RECODER (ALT=2 only) is
// passed to the SP unit: 1 gives one recoder instead of two, same results.
// REDUCED_SE is passed to the carry-save multipliers (see pp_gen). Results stay
// within the same bounds but can differ from the default in the last bit.
//
// Control: a small FSM (IDLE, HALF1, HALF2, DONE). start is taken when busy is
// low, which includes the DONE cycle, so operations can follow each other every
// 2*ITER+1 cycles; d is held in a register for the whole operation. Each pass
// takes two cycles (the SP unit's pipeline register, then the loop register), so
// done pulses for one cycle 2*ITER clock edges after the edge that took start,
// with r valid in that cycle; r holds its value until the next operation ends.
// Reset is synchronous and active high.
// The multiplexer/loop structure follows the document; the controller is not
// described there and is this design's own.
module nr_iterative
  import nr_pkg::*;
#(
  parameter int unsigned ALT  = 2,
  parameter int unsigned ITER = NR_ITER,
  parameter bit          SHARE_RECODER = 1'b0,  // ALT=2 only: one recoder per SP unit
  parameter bit          REDUCED_SE = 1'b0      // reduced sign extension of the partial products
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [MANT_W-1:0] d,
  output logic              busy,
  output logic              done,
  output logic [RES_W-1:0]  r
);

  typedef enum logic [1:0] {S_IDLE, S_HALF1, S_HALF2, S_DONE} state_t;

  state_t                   state;
  logic [$clog2(ITER+1)-1:0] pass;
  logic [MANT_W-1:0]        d_q;
  cs_t                      loop_q;

  fix_t r0, d_fix, sp_d_out;
  cs_t  r_mux, r_next;
  logic sel_table, sp_in_v, sp_out_v;

  recip_table u_table (.d(d_q), .r0(r0));

  assign d_fix     = mant_to_fix(d_q);
  assign sel_table = (pass == '0);
  assign r_mux     = sel_table ? cs_t'{s: r0, c: '0} : loop_q;
  assign sp_in_v   = (state == S_HALF1);

  if (ALT == 1) begin : g_alt1
    sp_unit_normal #(.REDUCED_SE(REDUCED_SE)) u_sp (
      .clk, .rst,
      .in_valid  (sp_in_v),
      .d         (d_fix),
      .r         (r_mux.s),
      .out_valid (sp_out_v),
      .d_out     (sp_d_out),
      .r_next    (r_next.s)
    );
    assign r_next.c = '0;
  end else begin : g_alt2
    sp_unit_cs #(.SHARE_RECODER(SHARE_RECODER), .REDUCED_SE(REDUCED_SE)) u_sp (
      .clk, .rst,
      .in_valid  (sp_in_v),
      .d         (d_fix),
      .r_s       (r_mux.s),
      .r_c       (r_mux.c),
      .out_valid (sp_out_v),
      .d_out     (sp_d_out),
      .r_s_next  (r_next.s),
      .r_c_next  (r_next.c)
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      pass   <= '0;
      d_q    <= '0;
      loop_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          d_q   <= d;
          pass  <= '0;
          state <= S_HALF1;
        end
        S_HALF1: state <= S_HALF2;
        S_HALF2: begin
          loop_q <= r_next;
          if (pass == ($bits(pass))'(ITER - 1)) begin
            state <= S_DONE;
          end else begin
            pass  <= pass + 1'b1;
            state <= S_HALF1;
          end
        end
        S_DONE: if (start) begin
          d_q   <= d;
          pass  <= '0;
          state <= S_HALF1;
        end else begin
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  fix_t r_fix;
  cpa u_cpa (.s(loop_q.s), .c(loop_q.c), .y(r_fix));

  assign busy = (state == S_HALF1) || (state == S_HALF2);
  assign done = (state == S_DONE);
  assign r    = fix_to_res(r_fix);

  // the SP unit's output is taken exactly when it is valid
  a_sp_valid: assert property (@(posedge clk) disable iff (rst)
                               (state == S_HALF2) |-> sp_out_v);

endmodule
