// shlModP: multiply by a fixed power of two, y = x * 2^SHIFT mod p.
// This replaces a twiddle multiplication inside the 4-point transform
// (the article uses SHIFT = 48, 96 and 144). The input is shifted into a
// 128-bit word and folded with the Solinas identity
// a*2^96 + b*2^64 + c*2^32 + d = 2^32(b + c) - a - b + d (mod p);
// since 2^96 = -1, SHIFT >= 96 is a shift by SHIFT-96 followed by a
// negation, so 96 itself is just p - x. Combinational, 0 <= SHIFT < 192.
module shl_mod_p #(
  parameter int SHIFT = 96
) (
  input  logic [63:0] x,
  output logic [63:0] y
);
  import gl_pkg::*;
  always_comb y = shl_mod(x, SHIFT);
endmodule
