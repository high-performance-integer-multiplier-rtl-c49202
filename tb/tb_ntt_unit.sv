// Self-checking test of ntt_unit. Streams one butterfly per cycle with random
// data; three cycles later it presents twiddle factors (or selects the fused
// point-wise product with conv = 1) and checks the four results exactly 5
// cycles after the inputs against a reference 4-point NTT followed by a
// multiplication modulo p, both computed with the % operator.
module tb_ntt_unit;
  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  localparam int NT = 1500;
  logic        clk = 0;
  logic        fw_iv_n, conv;
  logic [63:0] x [4], xconv [4], tw [4], y [4];
  typedef logic [63:0] vec_t [4];
  typedef logic [3:0][63:0] pvec_t;
  pvec_t bf_q [$], xc_q [$], exp_q [$];
  int checks = 0, failures = 0, n_conv = 0;
  ntt_unit dut (.clk, .fw_iv_n, .x, .xconv, .conv, .tw, .y);
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
  function automatic vec_t ntt4(input vec_t v, input bit fw);
    vec_t o;
    logic [63:0] w, t;
    logic [127:0] acc;
    w = 64'd1;
    for (int i = 0; i < (fw ? 48 : 144); i++) w = mm(w, 64'd2);
    for (int m = 0; m < 4; m++) begin
      acc = 0;
      for (int j = 0; j < 4; j++) begin
        t = 64'd1;
        for (int k = 0; k < (j * m) % 4; k++) t = mm(t, w);
        acc = (acc + mm(v[j], t)) % {64'd0, P};
      end
      o[m] = acc[63:0];
    end
    return o;
  endfunction
  function automatic logic [63:0] rnd();
    logic [63:0] v;
    v = {$urandom, $urandom};
    return (v >= P) ? v - P : v;
  endfunction
  initial begin
    vec_t v, xv, t;
    pvec_t bf, xc, e;
    conv = 0;
    for (int j = 0; j < 4; j++) tw[j] = '0;
    for (int i = 0; i < NT + 5; i++) begin
      @(negedge clk);
      if (i >= 5) begin
        for (int m = 0; m < 4; m++) begin
          checks++;
          if (y[m] !== exp_q[0][m]) begin failures++; $display("t=%0d lane %0d got %h want %h", i, m, y[m], exp_q[0][m]); end
        end
        void'(exp_q.pop_front());
      end
      // multiplier operands for the butterfly issued 3 cycles ago
      if (i >= 3) begin
        bf = bf_q.pop_front(); xc = xc_q.pop_front();
        conv = ($urandom % 3 == 0);
        if (conv) n_conv++;
        for (int m = 0; m < 4; m++) begin
          tw[m] = rnd();
          e[m] = mm(bf[m], conv ? xc[m] : tw[m]);
        end
        exp_q.push_back(e);
      end
      fw_iv_n = $urandom % 2;
      for (int j = 0; j < 4; j++) begin v[j] = rnd(); xv[j] = rnd(); end
      x = v; xconv = xv;
      t = ntt4(v, fw_iv_n);
      for (int j = 0; j < 4; j++) begin bf[j] = t[j]; xc[j] = xv[j]; end
      bf_q.push_back(bf);
      xc_q.push_back(xc);
    end
    checks++;
    if (n_conv == 0) begin failures++; $display("point-wise mode never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
