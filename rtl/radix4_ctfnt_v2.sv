// Radix-4 Cooley-Tukey butterfly (improved version): a 4-point NTT modulo
// p = 2^64 - 2^32 + 1 built only from modular adders, subtractors and fixed
// shifts. With w = 2^48 (forward) or w = 2^144 = 2^-48 (inverse) and
// w^2 = 2^96 = -1 it computes
//   y0 = (x0 + x2) + (x1 + x3)        y2 = (x0 + x2) - (x1 + x3)
//   y1 = (x0 - x2) + w (x1 - x3)      y3 = (x0 - x2) - w (x1 - x3)
// Stage 1: x0+x2, x0+2^96*x2 (= x0-x2), x1+x3, x1-x3.
// Stage 2: y0, 2^96*(x1+x3), and w*(x1-x3) with the 2^48 / 2^144 shift
//          picked by fw_iv_n.
// Stage 3: y2, y1 and y3.
// Each stage ends in a register, so outputs appear 3 cycles after the
// inputs, one transform per cycle. The operator set, the shift amounts, the
// fw_iv_n select and the three register stages follow the article's
// block diagram; the exact operator-to-stage assignment and the natural
// output order are this design's reading of it.
module radix4_ctfnt_v2 (
  input  logic        clk,
  input  logic        fw_iv_n,
  input  logic [63:0] x [4],
  output logic [63:0] y [4]
);
  // stage 1
  logic [63:0] c_shl96, s1_ac, s1_amc, s1_bd, s1_bmd;
  logic [63:0] r1_ac, r1_amc, r1_bd, r1_bmd;
  logic        r1_fw;
  shl_mod_p #(.SHIFT(96)) u_shl_c  (.x(x[2]), .y(c_shl96));
  add_mod_p               u_add_ac (.a(x[0]), .b(x[2]),   .y(s1_ac));
  add_mod_p               u_add_amc(.a(x[0]), .b(c_shl96), .y(s1_amc));
  add_mod_p               u_add_bd (.a(x[1]), .b(x[3]),   .y(s1_bd));
  sub_mod_p               u_sub_bd (.a(x[1]), .b(x[3]),   .y(s1_bmd));
  always_ff @(posedge clk) begin
    r1_ac <= s1_ac; r1_amc <= s1_amc; r1_bd <= s1_bd; r1_bmd <= s1_bmd;
    r1_fw <= fw_iv_n;
  end

  // stage 2
  logic [63:0] s2_y0, s2_nbd, s2_t48, s2_t144;
  logic [63:0] r2_y0, r2_nbd, r2_t, r2_ac, r2_amc;
  add_mod_p               u_add_y0 (.a(r1_ac), .b(r1_bd), .y(s2_y0));
  shl_mod_p #(.SHIFT(96)) u_shl_bd (.x(r1_bd),  .y(s2_nbd));
  shl_mod_p #(.SHIFT(48)) u_shl48  (.x(r1_bmd), .y(s2_t48));
  shl_mod_p #(.SHIFT(144)) u_shl144(.x(r1_bmd), .y(s2_t144));
  always_ff @(posedge clk) begin
    r2_y0  <= s2_y0;
    r2_nbd <= s2_nbd;
    r2_t   <= r1_fw ? s2_t48 : s2_t144;
    r2_ac  <= r1_ac;
    r2_amc <= r1_amc;
  end

  // stage 3
  logic [63:0] s3_y1, s3_y2, s3_y3;
  add_mod_p u_add_y2(.a(r2_ac),  .b(r2_nbd), .y(s3_y2));
  add_mod_p u_add_y1(.a(r2_amc), .b(r2_t),   .y(s3_y1));
  sub_mod_p u_sub_y3(.a(r2_amc), .b(r2_t),   .y(s3_y3));
  always_ff @(posedge clk) begin
    y[0] <= r2_y0;
    y[1] <= s3_y1;
    y[2] <= s3_y2;
    y[3] <= s3_y3;
  end
endmodule
