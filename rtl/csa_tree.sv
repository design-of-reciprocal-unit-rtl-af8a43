// csa_tree: reduces ROWS operands to a sum and a carry vector with 3:2 adders.
//
// Every level groups its rows in threes and replaces each group by the sum and
// the (left-shifted) carry of a row of full adders; rows left over pass to the
// next level unchanged. Levels are added until two rows remain, so a tree of
// ROWS rows has about log1.5(ROWS/2) levels and no carry propagates along a row.
// sum + carry equals the sum of all rows modulo 2^W. The per-level row counts
// are worked out by constant functions; level l uses the first rows_at(l)
// entries of lv[l]. Combinational.
module csa_tree #(
  parameter int unsigned ROWS = 3,
  parameter int unsigned W    = 64
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  function automatic int unsigned next_rows(input int unsigned n);
    return 2 * (n / 3) + n % 3;
  endfunction

  function automatic int unsigned rows_at(input int unsigned lvl);
    int unsigned n;
    n = ROWS;
    for (int unsigned i = 0; i < lvl; i++) n = next_rows(n);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n, l;
    n = ROWS;
    l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned L = num_levels();

  logic [L:0][ROWS-1:0][W-1:0] lv;

  assign lv[0] = rows;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned N    = rows_at(l);
    localparam int unsigned G    = N / 3;
    localparam int unsigned REST = N % 3;
    localparam int unsigned NXT  = 2 * G + REST;

    for (genvar g = 0; g < G; g++) begin : g_fa
      logic [W-1:0] a, b, c;
      assign a               = lv[l][3*g];
      assign b               = lv[l][3*g+1];
      assign c               = lv[l][3*g+2];
      assign lv[l+1][2*g]    = a ^ b ^ c;
      assign lv[l+1][2*g+1]  = ((a & b) | (a & c) | (b & c)) << 1;
    end
    for (genvar r = 0; r < REST; r++) begin : g_pass
      assign lv[l+1][2*G+r] = lv[l][3*G+r];
    end
    for (genvar k = NXT; k < ROWS; k++) begin : g_unused
      assign lv[l+1][k] = '0;
    end
  end

  assign sum = lv[L][0];
  if (rows_at(L) >= 2) begin : g_carry
    assign carry = lv[L][1];
  end else begin : g_single
    assign carry = '0;
  end

endmodule
