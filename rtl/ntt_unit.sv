// One processing row of the multiplier: a radix-4 butterfly followed by four
// modular multipliers ("NTT_4pts" + "Multiplier").
// Cycle 0: x[] (and, for the point-wise product, xconv[]) are presented.
// Cycle 3: the butterfly result leaves radix4_ctfnt_v2; in this same cycle
//          the caller presents the twiddle factors tw[] and the conv flag.
//          With conv = 0 lane m is multiplied by tw[m]; with conv = 1 it is
//          multiplied by xconv[m] as delayed inside this unit, which fuses the
//          point-wise product Z = X * Y into the last forward pass of Y.
// Cycle 5: y[] holds the result. Fully pipelined, one butterfly per cycle.
// The butterfly-then-multiplier order follows the article; fusing the
// point-wise product here is this design's choice.
module ntt_unit (
  input  logic        clk,
  input  logic        fw_iv_n,
  input  logic [63:0] x     [4],
  input  logic [63:0] xconv [4],
  input  logic        conv,
  input  logic [63:0] tw    [4],
  output logic [63:0] y     [4]
);
  logic [63:0] bf [4];
  logic [63:0] xd [3][4];

  radix4_ctfnt_v2 u_bf (.clk, .fw_iv_n, .x, .y(bf));

  always_ff @(posedge clk) begin
    xd[0] <= xconv;
    xd[1] <= xd[0];
    xd[2] <= xd[1];
  end

  for (genvar m = 0; m < 4; m++) begin : g_mul
    logic [63:0] op;
    assign op = conv ? xd[2][m] : tw[m];
    mul_mod_p u_mul (.clk, .a(bf[m]), .b(op), .y(y[m]));
  end
endmodule
