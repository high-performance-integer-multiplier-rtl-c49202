// Shared arithmetic and index arithmetic for the 3072-bit NTT multiplier.
//
// All transform arithmetic is done modulo the 64-bit Solinas prime
// p = 2^64 - 2^32 + 1. Because 2^64 = 2^32 - 1 and 2^96 = -1 (mod p), a
// 128-bit value a*2^96 + b*2^64 + c*2^32 + d (32-bit limbs) folds to
// 2^32*(b + c) - a - b + d, which reduce128() brings into [0, p) with at
// most three conditional subtractions. Multiplying by a power of two is a
// shift followed by the same fold, and 2^96 = -1 turns shifts by 96 or more
// into negations.
//
// The 256-point transform is computed in place as four radix-4 passes, one
// per base-4 digit of the point index p = 64*d3 + 16*d2 + 4*d1 + d0. The
// helpers below give, for a pass on digit q, the index handled by unit u,
// lane j in cycle c, the bank and address where that index lives, and the
// twiddle exponent applied after the butterfly. The modulus and the roots
// 2^48 (4-point) and 2^12 (16-point) are the article's; the pass order,
// bank mapping and twiddle placement are this design's own.
package gl_pkg;

  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  // Primitive 256th root of unity with OMEGA^16 = 2^12 and OMEGA^64 = 2^48.
  localparam logic [63:0] OMEGA = 64'hC2DE_D172_4375_E12E;
  // 256^-1 mod p, applied at the end of the inverse transform.
  localparam logic [63:0] N_INV = 64'hFEFF_FFFF_0100_0001;

  localparam int N_POINTS   = 256;
  localparam int DIGIT_BITS = 24;
  localparam int N_BANKS    = 16;
  localparam int N_UNITS    = 4;

  // One issued operation as it travels down the pipeline.
  typedef struct packed {
    logic       valid;
    logic [3:0] pass;     // pass number 0..12 in issue order
    logic       eval;     // evaluation read (not a butterfly)
    logic [1:0] k;        // pass number within its transform, 0..3
    logic       inv;      // inverse transform
    logic       region;   // 0: X memory region, 1: Y/Z region
    logic       first;    // read operand digits instead of the banks
    logic       conv;     // fuse the point-wise product into the multipliers
    logic [3:0] c;        // cycle within the pass
  } op_t;

  function automatic logic [63:0] add_mod(input logic [63:0] a, input logic [63:0] b);
    logic [64:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, P}) s = s - {1'b0, P};
    return s[63:0];
  endfunction

  function automatic logic [63:0] sub_mod(input logic [63:0] a, input logic [63:0] b);
    logic [64:0] s;
    s = {1'b0, a} - {1'b0, b};
    if (s[64]) s = s + {1'b0, P};
    return s[63:0];
  endfunction

  function automatic logic [63:0] neg_mod(input logic [63:0] a);
    return (a == 64'd0) ? 64'd0 : P - a;
  endfunction

  function automatic logic [63:0] reduce128(input logic [127:0] v);
    logic [67:0] p68, t0, t1, t2, t3;
    p68 = {4'd0, P};
    // 2^32*(b+c) + d + p - a - b, never negative since a + b < 2^33 < p,
    // and below 4p, so three conditional subtractions finish the job
    t0 = (({36'd0, v[95:64]} + {36'd0, v[63:32]}) << 32) + {36'd0, v[31:0]} + p68
         - {36'd0, v[127:96]} - {36'd0, v[95:64]};
    t1 = (t0 >= (p68 << 1)) ? t0 - (p68 << 1) : t0;
    t2 = (t1 >= p68) ? t1 - p68 : t1;
    t3 = (t2 >= p68) ? t2 - p68 : t2;
    return t3[63:0];
  endfunction

  function automatic logic [63:0] mul_mod(input logic [63:0] a, input logic [63:0] b);
    return reduce128({64'd0, a} * {64'd0, b});
  endfunction

  // x * 2^s mod p for 0 <= s < 192
  function automatic logic [63:0] shl_mod(input logic [63:0] x, input int s);
    logic [127:0] w;
    logic [63:0]  r;
    int           t;
    t = (s >= 96) ? s - 96 : s;
    if (t < 64) begin
      w = {64'd0, x} << t;
      r = reduce128(w);
    end else begin
      r = reduce128({x, 64'd0});
      w = {64'd0, r} << (t - 64);
      r = reduce128(w);
    end
    return (s >= 96) ? neg_mod(r) : r;
  endfunction

  function automatic logic [63:0] pow_omega(input int e);
    logic [63:0] acc, base;
    acc  = 64'd1;
    base = OMEGA;
    for (int i = 0; i < 8; i++) begin
      if (e[i]) acc = mul_mod(acc, base);
      base = mul_mod(base, base);
    end
    return acc;
  endfunction

  // Point index handled by unit u, lane j, in cycle c of a pass on digit q.
  // Lane j sets digit q; unit u sets digit r, whose bank weight has the
  // other parity (r = 2, 3, 0, 1 for q = 3, 2, 1, 0); c[1:0] and c[3:2] set
  // the two remaining digits, lower one first. Passes on digits 3 and 2, and
  // on digits 1 and 0, therefore cover the same 16 points in the same cycle
  // number, so the second of such a pair only needs the results of the same
  // cycle of the first.
  function automatic logic [7:0] pass_pos(input logic [1:0] q, input logic [3:0] c,
                                          input logic [1:0] u, input logic [1:0] j);
    case (q)
      2'd3:    return {j, u, c[3:2], c[1:0]};
      2'd2:    return {u, j, c[3:2], c[1:0]};
      2'd1:    return {c[3:2], c[1:0], j, u};
      default: return {c[3:2], c[1:0], u, j};
    endcase
  endfunction

  // Passes that need every result of the previous pass on their region
  // (digit pair changes, or the evaluation reads in natural order) and so
  // must wait for the pipeline to drain: X and Y forward pass 2 (issue
  // order 4, 5), inverse pass 2 (10) and the evaluation (12).
  function automatic logic needs_drain(input logic [3:0] pass);
    return pass == 4'd4 || pass == 4'd5 || pass == 4'd10 || pass == 4'd12;
  endfunction

  function automatic logic [3:0] bank_of(input logic [7:0] p);
    logic [1:0] g, h;
    g = p[3:2] + p[7:6];
    h = p[1:0] + p[3:2] + p[5:4] + p[7:6];
    return {g, h};
  endfunction

  // Exponent of the forward-transform twiddle applied to index p after
  // forward pass s (s = 0..2): 4^s * (p mod 4^(3-s)) * digit_(3-s)(p).
  function automatic logic [7:0] fwd_tw_exp(input int s, input logic [7:0] p);
    int q, low, m;
    q   = 3 - s;
    low = int'(p) % (1 << (2 * q));
    m   = (int'(p) >> (2 * q)) & 3;
    return 8'(((1 << (2 * s)) * low * m) % 256);
  endfunction

  // Digit combined by pass k of the forward (3,2,1,0) or inverse (0,1,2,3) transform.
  function automatic logic [1:0] pass_digit(input logic inv, input logic [1:0] k);
    return inv ? k : 2'd3 - k;
  endfunction

endpackage
