// subModP: modular subtraction y = (a - b) mod p, p = 2^64 - 2^32 + 1.
// Both inputs must be reduced (< p). A 65-bit subtract is followed by one
// conditional addition of p when the difference is negative. Purely
// combinational; named after the article's subModP, circuit is this
// design's plain subtract-and-correct form.
module sub_mod_p (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  import gl_pkg::*;
  always_comb y = sub_mod(a, b);
endmodule
