// Evaluation (carry propagation) of the product coefficients.
// After the inverse transform, coefficient z_i (i = 0..255, each below
// 2^56 for 3072-bit operands) is the weight of 2^(24 i) in the product.
// The unit takes CHUNK = 16 consecutive coefficients per valid cycle,
// chunk idx covering i = 16 idx .. 16 idx + 15, in increasing idx order
// starting with 0, and adds them with the carry left from the previous
// chunk:  s = carry + sum_k coef[k] * 2^(24 k);  the low 384 bits of s are
// product bits [384 idx +: 384] and carry = s >> 384. The product register
// holds 16 chunks = 6144 bits and is updated one cycle after each valid.
// The article only names this step; the streaming form is this design's.
module evaluation_unit #(
  parameter int CHUNK = 16,
  localparam int DB = gl_pkg::DIGIT_BITS,
  localparam int NCH = gl_pkg::N_POINTS / CHUNK,
  localparam int CW = CHUNK * DB,
  localparam int SW = CW + 64 + 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [$clog2(NCH)-1:0] idx,
  input  logic [63:0]       coef [CHUNK],
  output logic [NCH*CW-1:0] product
);
  logic [SW-1:0] carry_q, sum;
  always_comb begin
    sum = (idx == '0) ? '0 : carry_q;
    for (int k = 0; k < CHUNK; k++) sum = sum + (SW'(coef[k]) << (DB * k));
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carry_q <= '0;
      product <= '0;
    end else if (valid) begin
      carry_q <= sum >> CW;
      product[idx*CW +: CW] <= sum[CW-1:0];
    end
  end
endmodule
