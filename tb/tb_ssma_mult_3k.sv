// End-to-end test of the 3072-bit multiplier at its default size.
// Runs a set of multiplications (zero, one, all-ones operands, a single
// high digit, 192-bit and random 3072-bit operands) and compares each
// product with a*b computed by the simulator's own wide arithmetic. It
// also checks the start-to-done cycle count and that every mechanism of
// the datapath was exercised: operand-direct first passes, interleaved
// forward passes without stalls, the fused point-wise product, the inverse
// passes with the 1/256 scaling, drain stalls between dependent passes and
// carries crossing chunk boundaries in the evaluation unit.
module tb_ssma_mult_3k;
  import gl_pkg::*;
  localparam int W = 3072;
  localparam int EXP_CYCLES = 223;

  logic           clk = 0;
  logic           rst_n = 0;
  logic           start = 0;
  logic [W-1:0]   a, b;
  logic           busy, done, stall;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;
  int n_first = 0, n_conv = 0, n_inv_scale = 0, n_stall = 0, n_fwd_stall = 0, n_carry = 0;

  ssma_mult_3k dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .stall, .product);

  always #5 clk = ~clk;

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.st[1].valid && dut.st[1].first) n_first++;
    if (dut.st[4].valid && dut.st[4].conv) n_conv++;
    if (dut.st[4].valid && dut.st[4].inv && dut.st[4].k == 2'd3) n_inv_scale++;
    if (stall) n_stall++;
    if (stall && dut.u_ctrl.pass_q < 4'd8) n_fwd_stall++;
    if (dut.st[1].valid && dut.st[1].eval && dut.st[1].c != 0 && dut.u_eval.carry_q != 0) n_carry++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y, input bit check_cycles);
    logic [2*W-1:0] expect_p;
    int cyc;
    expect_p = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (product !== expect_p) begin
      failures++;
      $display("product mismatch");
    end
    if (check_cycles) begin
      checks++;
      if (cyc != EXP_CYCLES) begin
        failures++;
        $display("cycle count %0d, expected %0d", cyc, EXP_CYCLES);
      end
    end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '0, 1);
    run(W'(1), W'(1), 1);
    run('1, '1, 1);
    run('1, W'(1), 1);
    run({24'hFFFFFF, {(W-24){1'b0}}}, {24'h800001, {(W-24){1'b0}}}, 1);
    // 192-bit operands: the size a single 16-point transform would serve
    for (int t = 0; t < 2; t++) run(W'(rnd() & ((W'(1) << 192) - 1)), W'(rnd() & ((W'(1) << 192) - 1)), 1);
    for (int t = 0; t < 6; t++) run(rnd(), rnd(), 1);
    run(rnd(), '1, 1);
    // mechanisms
    checks++; if (n_first == 0) begin failures++; $display("no operand-direct pass"); end
    checks++; if (n_conv == 0) begin failures++; $display("no fused point-wise product"); end
    checks++; if (n_inv_scale == 0) begin failures++; $display("no inverse scaling pass"); end
    checks++; if (n_stall == 0) begin failures++; $display("no drain stall"); end
    checks++; if (n_fwd_stall != 0) begin failures++; $display("forward passes stalled %0d times", n_fwd_stall); end
    checks++; if (n_carry == 0) begin failures++; $display("no evaluation carry"); end
    $display("mechanisms: first=%0d conv=%0d inv_scale=%0d stall=%0d carry=%0d",
             n_first, n_conv, n_inv_scale, n_stall, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
