// Self-checking test of evaluation_unit: feeds 256 random coefficients
// below 2^56 (and, in a second round, the all-maximum case) as 16 chunks of
// 16, twelve rounds in all, and compares the product register with sum z_i * 2^(24 i) computed as
// one wide sum in the testbench.
module tb_evaluation_unit;
  localparam int NP = 256;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [3:0]  idx;
  logic [63:0] coef [16];
  logic [6143:0] product;
  int checks = 0, failures = 0;
  evaluation_unit dut (.clk, .rst_n, .valid, .idx, .coef, .product);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic round(input int kind);
    logic [63:0]   z [NP];
    logic [6207:0] sum;
    sum = '0;
    for (int i = 0; i < NP; i++) begin
      if (kind == 0) z[i] = {8'd0, $urandom % (1 << 24), $urandom};
      else           z[i] = (i < 255) ? 64'h00FF_FFFF_FFFF_FFFF : 64'd0;
      sum = sum + (6208'(z[i]) << (24 * i));
    end
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      valid = 1; idx = 4'(t);
      for (int k = 0; k < 16; k++) coef[k] = z[16 * t + k];
    end
    @(negedge clk);
    valid = 0;
    @(negedge clk);
    checks++;
    if (product !== sum[6143:0]) begin failures++; $display("product mismatch in round %0d", kind); end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    round(0); round(1);
    for (int r = 0; r < 10; r++) round(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
