// 3072-bit integer multiplier using a 256-point number theoretic transform
// (Schonhage-Strassen style) modulo p = 2^64 - 2^32 + 1. The architecture
// follows B.-C. Chang, W.-K. Lee, B.-M. Goi and S. O. Hwang, "High
// Performance Integer Multiplier on FPGA with Radix-4 Number Theoretic
// Transform" (2022), called "the article" in these comments.
//
// Each operand is cut into 128 digits of 24 bits and zero-padded to 256
// points. Both are transformed, multiplied point by point, transformed back
// and the 256 coefficients (each < 2^56) are carry-propagated into the
// 6144-bit product. The transforms run on four radix-4 rows (ntt_unit: a
// radix-4 butterfly plus four modular multipliers) that read and write 16
// memory banks, 16 points per cycle, so one radix-4 pass over 256 points
// takes 16 cycles.
//
// Point index p = 64 d3 + 16 d2 + 4 d1 + d0 lives in bank
// 4((d1 + d3) mod 4) + ((d0 + d1 + d2 + d3) mod 4) at address {region, d1, d0};
// region 0 holds X, region 1 holds Y and later the product. A pass on digit
// q gives unit u the four points that differ only in d_q and have d_r = u
// for a digit r whose bank weight has the other parity, so the 16 points of
// a cycle always sit in 16 different banks, for reads and for the in-place
// writes alike. Passes on digits 3 and 2 (and on 1 and 0) visit the same 16
// points in the same cycle number, so each can follow the other without a
// wait.
//
// Pipeline (ntt_ctrl stage numbers): 0 bank read address; 1 bank data,
// butterfly input (operand digits in the first forward pass); 4 butterfly
// out, twiddle lookup; 6 multiplier out, bank write. Forward transform:
// decimation in frequency over digits 3,2,1,0 with twiddle OMEGA^e after
// passes 0..2, leaving the spectrum in base-4 digit-reversed order. Inverse:
// the transposed flow over digits 0,1,2,3 with the inverse twiddles and a
// final 1/256, taking digit-reversed input and giving natural order.
//
// Interface: pulse start with a and b valid (they are registered); busy is
// high until done pulses for one cycle; product then holds a*b until the
// next start. stall is high in cycles where the sequencer waits for the
// pipeline to drain before a dependent pass. One multiplication takes 223
// cycles from start to done.
//
// From the article: the modulus, the 24-bit digits and 256 points, the
// 4-point roots 2^48 / 2^144 inside the butterfly, the 16 banks and four
// butterfly-plus-multiplier rows with read and write multiplexers. This
// design's own: the bank mapping (which makes the article's staggered
// write registers unnecessary), pass order and twiddle placement, the
// point-wise product fused into the last forward Y pass, reading operands
// directly in the first pass, the evaluation unit and the interface.
module ssma_mult_3k #(
  parameter int OPERAND_BITS = 3072,
  localparam int NB  = gl_pkg::N_BANKS,
  localparam int NU  = gl_pkg::N_UNITS,
  localparam int LAT = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [OPERAND_BITS-1:0]   a,
  input  logic [OPERAND_BITS-1:0]   b,
  output logic                      busy,
  output logic                      done,
  output logic                      stall,
  output logic [2*OPERAND_BITS-1:0] product
);
  import gl_pkg::*;
  localparam int DB = DIGIT_BITS;
  localparam int ND = OPERAND_BITS / DB;   // nonzero digits per operand

  // ---------------- operands ----------------
  logic [OPERAND_BITS-1:0] a_q, b_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (start && !busy) begin
      a_q <= a;
      b_q <= b;
    end
  end

  // ---------------- control ----------------
  op_t  st [LAT+1];
  ntt_ctrl #(.LAT(LAT)) u_ctrl (.clk, .rst_n, .start, .st, .stall, .busy, .done);

  // ---------------- banks ----------------
  logic        we     [NB];
  logic [4:0]  waddr  [NB];
  logic [63:0] wdata  [NB];
  logic [4:0]  raddr0 [NB];
  logic [4:0]  raddr1 [NB];
  logic [63:0] rdata0 [NB];
  logic [63:0] rdata1 [NB];

  for (genvar i = 0; i < NB; i++) begin : g_bank
    bram_bank #(.DEPTH(32), .WIDTH(64)) u_bank (
      .clk, .we(we[i]), .waddr(waddr[i]), .wdata(wdata[i]),
      .raddr0(raddr0[i]), .rdata0(rdata0[i]),
      .raddr1(raddr1[i]), .rdata1(rdata1[i]));
  end

  // stage 0: read addresses (input multiplexer selects)
  always_comb begin
    logic [7:0] p;
    for (int i = 0; i < NB; i++) begin
      raddr0[i] = '0;
      raddr1[i] = '0;
    end
    if (st[0].eval) begin
      for (int i = 0; i < NB; i++) begin
        p = {st[0].c, 4'(i)};
        raddr0[bank_of(p)] = {st[0].region, p[3:0]};
      end
    end else begin
      for (int u = 0; u < NU; u++)
        for (int j = 0; j < 4; j++) begin
          p = pass_pos(pass_digit(st[0].inv, st[0].k), st[0].c, 2'(u), 2'(j));
          raddr0[bank_of(p)] = {st[0].region, p[3:0]};
          raddr1[bank_of(p)] = {1'b0, p[3:0]};
        end
    end
  end

  // stage 1: route bank data (or operand digits) to the butterflies
  logic [63:0] bf_in [NU][4];
  logic [63:0] xc_in [NU][4];
  always_comb begin
    logic [7:0] p;
    for (int u = 0; u < NU; u++)
      for (int j = 0; j < 4; j++) begin
        p = pass_pos(pass_digit(st[1].inv, st[1].k), st[1].c, 2'(u), 2'(j));
        xc_in[u][j] = rdata1[bank_of(p)];
        if (st[1].first) begin
          if (int'(p) < ND)
            bf_in[u][j] = 64'(st[1].region ? b_q[int'(p)*DB +: DB] : a_q[int'(p)*DB +: DB]);
          else
            bf_in[u][j] = '0;
        end else begin
          bf_in[u][j] = rdata0[bank_of(p)];
        end
      end
  end

  // stage 4: twiddle factors for the multipliers
  logic [7:0]  tw_e  [NU][4];
  logic [63:0] tw_w  [NU][4];
  logic [63:0] tw    [NU][4];
  always_comb begin
    logic [7:0] p;
    for (int u = 0; u < NU; u++)
      for (int m = 0; m < 4; m++) begin
        p = pass_pos(pass_digit(st[4].inv, st[4].k), st[4].c, 2'(u), 2'(m));
        if (st[4].k == 2'd3)
          tw_e[u][m] = 8'd0;
        else if (!st[4].inv)
          tw_e[u][m] = fwd_tw_exp(int'(st[4].k), p);
        else
          tw_e[u][m] = 8'd0 - fwd_tw_exp(2 - int'(st[4].k), p);
      end
  end
  for (genvar u = 0; u < NU; u++) begin : g_tw
    for (genvar m = 0; m < 4; m++) begin : g_lane
      twiddle_rom u_rom (.e(tw_e[u][m]), .w(tw_w[u][m]));
      assign tw[u][m] = (st[4].inv && st[4].k == 2'd3) ? N_INV : tw_w[u][m];
    end
  end

  // the four processing rows
  logic [63:0] res [NU][4];
  for (genvar u = 0; u < NU; u++) begin : g_unit
    ntt_unit u_unit (
      .clk, .fw_iv_n(!st[1].inv), .x(bf_in[u]), .xconv(xc_in[u]),
      .conv(st[4].conv), .tw(tw[u]), .y(res[u]));
  end

  // stage 6: write back in place (output multiplexers)
  always_comb begin
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < NB; i++) begin
      we[i]    = 1'b0;
      waddr[i] = '0;
      wdata[i] = '0;
    end
    if (st[LAT].valid && !st[LAT].eval)
      for (int u = 0; u < NU; u++)
        for (int m = 0; m < 4; m++) begin
          p = pass_pos(pass_digit(st[LAT].inv, st[LAT].k), st[LAT].c, 2'(u), 2'(m));
          we[bank_of(p)]    = 1'b1;
          waddr[bank_of(p)] = {st[LAT].region, p[3:0]};
          wdata[bank_of(p)] = res[u][m];
        end
  end

  // stage 1 of an evaluation read: coefficients in natural order
  logic [63:0] coef [NB];
  always_comb begin
    for (int i = 0; i < NB; i++) coef[i] = rdata0[bank_of({st[1].c, 4'(i)})];
  end
  evaluation_unit #(.CHUNK(NB)) u_eval (
    .clk, .rst_n, .valid(st[1].valid && st[1].eval), .idx(st[1].c),
    .coef, .product);

  // no read may fetch a point that an operation still in the pipeline is
  // going to rewrite (read-after-write race between passes)
  always_comb begin
    logic [7:0] rp, wp;
    rp = '0;
    wp = '0;
    if (st[0].valid)
      for (int s = 1; s <= LAT; s++)
        if (st[s].valid && !st[s].eval)
          for (int i = 0; i < 16; i++) begin
            rp = st[0].eval ? {st[0].c, 4'(i)}
                            : pass_pos(pass_digit(st[0].inv, st[0].k), st[0].c, 2'(i / 4), 2'(i % 4));
            for (int w = 0; w < 16; w++) begin
              wp = pass_pos(pass_digit(st[s].inv, st[s].k), st[s].c, 2'(w / 4), 2'(w % 4));
              if (rp == wp) begin
                assert (st[s].region != st[0].region);
                assert (!(st[0].conv && st[s].region == 1'b0));
              end
            end
          end
  end

  // no two writes or reads of one cycle may meet in a bank
  always_comb begin
    logic [NB-1:0] hit;
    hit = '0;
    if (st[LAT].valid && !st[LAT].eval)
      for (int u = 0; u < NU; u++)
        for (int m = 0; m < 4; m++)
          hit[bank_of(pass_pos(pass_digit(st[LAT].inv, st[LAT].k), st[LAT].c, 2'(u), 2'(m)))] = 1'b1;
    if (st[LAT].valid && !st[LAT].eval) assert (hit == '1);
  end
endmodule
