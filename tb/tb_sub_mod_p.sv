// Self-checking test of sub_mod_p: edge values (0, 1, p-1, p-2) and random
// reduced operands, compared with (a - b) mod p worked out with the
// simulator's % operator on values offset by p.
module tb_sub_mod_p;
  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;
  sub_mod_p dut (.a, .b, .y);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic [63:0] x1, input logic [63:0] x2);
    logic [64:0] r;
    a = x1; b = x2; #1;
    r = ({1'b0, x1} + {1'b0, P} - {1'b0, x2}) % {1'b0, P};
    checks++;
    if (y !== r[63:0]) begin failures++; $display("sub %h - %h = %h, want %h", x1, x2, y, r[63:0]); end
  endtask
  function automatic logic [63:0] rnd();
    logic [63:0] v;
    v = {$urandom, $urandom};
    return (v >= P) ? v - P : v;
  endfunction
  initial begin
    logic [63:0] e [5] = '{64'd0, 64'd1, P - 1, P - 2, 64'hFFFF_FFFF};
    foreach (e[i]) foreach (e[j]) check(e[i], e[j]);
    for (int i = 0; i < 2000; i++) check(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
