// Self-checking test of mul_mod_p: streams edge and random operand pairs,
// one per cycle, and compares each result, exactly 2 cycles later, with
// (a * b) mod p computed on 128-bit values with the % operator.
module tb_mul_mod_p;
  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  localparam int NT = 3000;
  logic clk = 0;
  logic [63:0] a, b, y;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;
  mul_mod_p dut (.clk, .a, .b, .y);
  always #5 clk = ~clk;
  initial begin
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [63:0] rnd(input int i);
    logic [63:0] v;
    case (i % 7)
      0: v = P - 1;
      1: v = 64'd0;
      2: v = 64'h1_0000_0000;
      default: v = {$urandom, $urandom};
    endcase
    return (v >= P) ? v - P : v;
  endfunction
  initial begin
    logic [127:0] r;
    for (int i = 0; i < NT + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (y !== exp_q[0]) begin failures++; $display("cycle %0d: got %h want %h", i, y, exp_q[0]); end
        void'(exp_q.pop_front());
      end
      a = rnd(i); b = rnd(i + 3);
      r = ({64'd0, a} * {64'd0, b}) % {64'd0, P};
      exp_q.push_back(r[63:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
