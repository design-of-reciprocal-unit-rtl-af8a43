// tb_util_pkg: reference arithmetic shared by the testbenches.
//
// Everything here is computed with plain integer or real arithmetic, independently
// of the design's datapath: exact products, the exact reciprocal of a mantissa and
// random operand generators. Fixed-point values use the design's internal scaling
// of 2^29 per unit.
package tb_util_pkg;

  localparam int FRAC_BITS = 29;

  // random 24-bit mantissa 1.f (hidden one set)
  function automatic logic [23:0] rand_mant();
    return {1'b1, 23'($urandom)};
  endfunction

  // floor(2^47 / D): the exact reciprocal of d = D / 2^23 with 24 fraction bits
  function automatic longint recip_floor(input logic [23:0] mant);
    return (64'sd1 <<< 47) / longint'({40'd0, mant});
  endfunction

  // random signed integer in [lo, hi]
  function automatic longint rand_range(input longint lo, input longint hi);
    longint span;
    longint r;
    span = hi - lo + 1;
    r = longint'({$urandom, $urandom} & 64'h7fff_ffff_ffff_ffff);
    return lo + (r % span);
  endfunction

  // floor division by 2^n of a signed value
  function automatic longint floor_shift(input longint v, input int n);
    return v >>> n;
  endfunction

  // 32-bit pattern as a signed number
  function automatic longint s32(input logic [31:0] v);
    return longint'($signed(v));
  endfunction

  function automatic real fix_to_real(input longint v);
    return real'(v) / real'(64'd1 << FRAC_BITS);
  endfunction

endpackage
