// mulModP / "Multiplier": y = a * b mod p, p = 2^64 - 2^32 + 1.
// Stage 1 forms the 128-bit product with one Karatsuba step on 32-bit halves
// (a = a1 2^32 + a0, b = b1 2^32 + b0):
//   hh = a1 b1,  ll = a0 b0,  mm = (a1 + a0)(b1 + b0)
// and registers the three partial products. Stage 2 recombines
//   a b = hh 2^64 + (mm - hh - ll) 2^32 + ll
// and folds the 128-bit result with the Solinas identity
// 2^32(b + c) - a - b + d (32-bit limbs a..d), registering the reduced value.
// Latency 2 cycles, one result per cycle, no stall. Karatsuba and the fold
// follow the article; the split into two register stages is this design's.
module mul_mod_p (
  input  logic        clk,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  import gl_pkg::*;
  logic [63:0]  hh_q, ll_q;
  logic [65:0]  mm_q;
  logic [127:0] prod;

  always_comb begin
    logic [65:0] mid;
    mid  = mm_q - {2'b00, hh_q} - {2'b00, ll_q};
    prod = {hh_q, ll_q} + ({62'd0, mid} << 32);
  end

  always_ff @(posedge clk) begin
    hh_q <= {32'd0, a[63:32]} * {32'd0, b[63:32]};
    ll_q <= {32'd0, a[31:0]}  * {32'd0, b[31:0]};
    mm_q <= ({33'd0, a[63:32]} + {33'd0, a[31:0]}) * ({33'd0, b[63:32]} + {33'd0, b[31:0]});
    y    <= reduce128(prod);
  end
endmodule
