// Twiddle-factor ROM: w = OMEGA^e mod p for an 8-bit exponent e.
// OMEGA is a primitive 256th root of unity modulo p = 2^64 - 2^32 + 1,
// chosen so that OMEGA^16 = 2^12 and OMEGA^64 = 2^48, the article's 16- and
// 4-point roots; the radix-4 butterflies and this table therefore use the
// same root. The 256 entries are computed at elaboration by square-and-
// multiply. Combinational lookup; one copy sits beside each multiplier.
module twiddle_rom (
  input  logic [7:0]  e,
  output logic [63:0] w
);
  import gl_pkg::*;
  logic [63:0] rom [256];
  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam logic [63:0] V = pow_omega(i);
    assign rom[i] = V;
  end
  assign w = rom[e];
endmodule
