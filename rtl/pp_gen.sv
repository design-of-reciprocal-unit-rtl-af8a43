// pp_gen: partial product generator of the radix-4 carry-save multipliers.
//
// For every radix-4 digit z_i in {-2..2} it selects 0, M or 2M and, for a negative
// digit, inverts the selection. Each row is sign extended over the full product
// width PW and shifted by 2i. The +1 that completes the two's complement of an
// inverted row is not added here: it is placed as a single bit at position 2i of
// an extra last row (the "offset" bits). The sum of all ND+1 rows modulo 2^PW is
// therefore exactly M * sum(z_i * 4^i).
//
// REDUCED_SE = 0 (default) extends the sign of every row over the full width,
// as in the design that was built and measured. REDUCED_SE = 1 is the proposed
// smaller tree: a row keeps its W low bits and, one place higher, its inverted
// sign bit; everything above is zero. Since -s*2^W = (1-s)*2^W - 2^W, the rows
// then add up to the same sum once the constant -sum(2^(W+2i)) is added. That
// constant has bits only at W and above, while the +1 bits sit at 2i < W, so it
// shares the extra last row. The rows add up to the same value mod 2^PW in
// both cases, but the tree then splits it differently between its sum and carry
// vectors. The bit layout of the reduced rows is this design's own.
// Combinational.
module pp_gen
  import nr_pkg::*;
#(
  parameter int unsigned W  = FIX_W,
  parameter int unsigned PW = 2 * W,
  parameter bit          REDUCED_SE = 1'b0
) (
  input  logic [W/2-1:0][2:0] dig,
  input  logic [W-1:0]        m,      // signed multiplicand
  output logic [W/2:0][PW-1:0] rows   // rows[W/2] holds the +1 bits
);

  localparam int unsigned ND = W / 2;

  // -(sum of 2^(W+2i)) mod 2^PW: the sign-extension constant of the reduced rows
  function automatic logic [PW-1:0] se_const();
    logic [PW-1:0] acc = '0;
    for (int i = 0; i < ND; i++) acc += PW'(1) << (W + 2 * i);
    return -acc;
  endfunction
  localparam logic [PW-1:0] SE_CONST = REDUCED_SE ? se_const() : '0;

  logic signed [PW-1:0] m_ext;
  assign m_ext = PW'($signed(m));

  for (genvar i = 0; i < ND; i++) begin : g_row
    logic signed [2:0]    z;
    logic                 neg;
    logic [PW-1:0]        mag;
    assign z   = $signed(dig[i]);
    assign neg = z[2];
    always_comb begin
      unique case (z)
        3'sd1, -3'sd1: mag = m_ext;
        3'sd2, -3'sd2: mag = m_ext << 1;
        default:       mag = '0;
      endcase
    end
    logic [PW-1:0] full;
    assign full = neg ? ~mag : mag;
    if (REDUCED_SE) begin : g_reduced
      // W low bits, then the inverted sign of the (W+1)-bit row value
      assign rows[i] = PW'({~full[W], full[W-1:0]}) << (2 * i);
    end else begin : g_full
      assign rows[i] = full << (2 * i);
    end
  end

  always_comb begin
    rows[ND] = SE_CONST;
    for (int i = 0; i < ND; i++) rows[ND][2*i] = dig[i][2];
  end

endmodule
