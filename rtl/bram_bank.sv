// One data memory bank (BRAM0..BRAM15 of the 16-bank array).
// DEPTH words of WIDTH bits: addresses 0..15 hold the X operand's points,
// 16..31 the Y operand's points (later the product's). One write port and
// two synchronous read ports; a read returns the word stored before any
// write in the same cycle. Port 0 feeds the butterflies and the evaluation
// unit, port 1 fetches X during the fused point-wise product. The bank
// count and 64-bit words follow the article; depth, the second read port
// and the read-before-write behaviour are this design's choices. Contents
// are not reset.
module bram_bank #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 64,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end
endmodule
