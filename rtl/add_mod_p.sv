// addModP: modular addition y = (a + b) mod p, p = 2^64 - 2^32 + 1.
// Both inputs must already be reduced (< p). A 65-bit add is followed by
// one conditional subtraction of p. Purely combinational; the block name and
// its role in the butterflies follow the article, the circuit is the plain
// add-and-correct form.
module add_mod_p (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  import gl_pkg::*;
  always_comb y = add_mod(a, b);
endmodule
