// recoder: radix-4 recoding of an operand held in carry-save form.
//
// The operand is the signed sum s + c of two W-bit vectors. It is turned into W/2
// radix-4 digits in {-2,-1,0,1,2} with sum(dig[i] * 4^i) = s + c, without ever
// adding s and c: each 2-bit group of s and c adds to v in [0,6]; a first transfer
// t1 = (v >= 4) leaves w = v - 4*t1 in [0,3]; w plus the transfer from below gives
// u in [0,4]; a second transfer t2 = (u >= 2) leaves u - 4*t2 in [-2,1], and with
// the incoming t2 the digit is in [-2,2]. Each digit depends only on its own group
// and the two groups below it, so the delay does not grow with W.
//
// The transfer out of the top group is dropped. That is exact when |s + c| is
// below 2^W / 3, which the internal format guarantees (values in [-2, 2) out of
// a [-4, 4) range).
//
// The document only says the recoding of its reference is used; this transfer
// scheme is this design's own. Combinational; W must be even.
module recoder
  import nr_pkg::*;
#(
  parameter int unsigned W = FIX_W
) (
  input  logic [W-1:0]             s,
  input  logic [W-1:0]             c,
  output logic [W/2-1:0][2:0]      dig   // signed digits, least significant first
);

  localparam int unsigned ND = W / 2;

  logic [ND:0]        t1, t2;
  logic [ND-1:0][2:0] u;

  assign t1[0] = 1'b0;
  assign t2[0] = 1'b0;

  for (genvar i = 0; i < ND; i++) begin : g_dig
    logic [2:0] v;
    logic [1:0] w;
    assign v         = {1'b0, s[2*i +: 2]} + {1'b0, c[2*i +: 2]};
    assign t1[i+1]   = v[2];                         // v >= 4
    assign w         = v[1:0];                       // v - 4*t1
    assign u[i]      = {1'b0, w} + {2'b00, t1[i]};   // 0..4
    assign t2[i+1]   = (u[i] >= 3'd2);
    // digit = u - 4*t2 + t2_in, as a 3-bit two's complement number
    assign dig[i]    = u[i] - {t2[i+1], 2'b00} + {2'b00, t2[i]};
  end

endmodule
