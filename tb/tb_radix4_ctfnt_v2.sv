// Self-checking test of radix4_ctfnt_v2. Streams one 4-point transform per
// cycle, alternating forward and inverse, and checks each output set exactly
// 3 cycles later against the 4-point NTT y_m = sum_j x_j w^(j m) mod p with
// w = 2^48 (forward) or 2^144 (inverse), evaluated with the % operator.
// Also checks that forward followed by inverse returns 4 times the input.
module tb_radix4_ctfnt_v2;
  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  localparam int NT = 2000;
  logic        clk = 0;
  logic        fw_iv_n;
  logic [63:0] x [4];
  logic [63:0] y [4];
  typedef logic [63:0] vec_t [4];
  vec_t exp_q [$];
  int checks = 0, failures = 0;
  radix4_ctfnt_v2 dut (.clk, .fw_iv_n, .x, .y);
  always #5 clk = ~clk;
  initial begin
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [63:0] mm(input logic [63:0] a, input logic [63:0] b);
    logic [127:0] r;
    r = ({64'd0, a} * {64'd0, b}) % {64'd0, P};
    return r[63:0];
  endfunction
  function automatic logic [63:0] pw2(input int s);
    logic [63:0] r;
    r = 64'd1;
    for (int i = 0; i < s; i++) r = mm(r, 64'd2);
    return r;
  endfunction
  function automatic vec_t ntt4(input vec_t v, input bit fw);
    vec_t o;
    logic [63:0] w;
    logic [127:0] acc;
    w = fw ? pw2(48) : pw2(144);
    for (int m = 0; m < 4; m++) begin
      acc = 0;
      for (int j = 0; j < 4; j++) begin
        logic [63:0] t;
        t = 64'd1;
        for (int k = 0; k < (j * m) % 4; k++) t = mm(t, w);
        acc = (acc + mm(v[j], t)) % {64'd0, P};
      end
      o[m] = acc[63:0];
    end
    return o;
  endfunction
  function automatic logic [63:0] rnd(input int i);
    logic [63:0] v;
    v = (i % 5 == 0) ? P - 1 : {$urandom, $urandom};
    return (v >= P) ? v - P : v;
  endfunction
  initial begin
    vec_t v, f, g;
    // round trip
    for (int j = 0; j < 4; j++) v[j] = rnd(j + 1);
    f = ntt4(v, 1); g = ntt4(f, 0);
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (g[j] !== mm(v[j], 64'd4)) begin failures++; $display("reference round trip broken"); end
    end
    for (int i = 0; i < NT + 3; i++) begin
      @(negedge clk);
      if (i >= 3) begin
        for (int m = 0; m < 4; m++) begin
          checks++;
          if (y[m] !== exp_q[0][m]) begin
            failures++;
            $display("t=%0d out %0d: got %h want %h", i, m, y[m], exp_q[0][m]);
          end
        end
        void'(exp_q.pop_front());
      end
      fw_iv_n = i[0];
      for (int j = 0; j < 4; j++) v[j] = rnd(i * 4 + j);
      x = v;
      exp_q.push_back(ntt4(v, fw_iv_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
