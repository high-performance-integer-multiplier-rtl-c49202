// Self-checking test of shl_mod_p for the shift amounts the butterfly uses
// (48, 96, 144) and a few others (0, 12, 60, 70, 100, 191). The reference
// doubles x modulo p SHIFT times with the simulator's % operator.
module tb_shl_mod_p;
  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  localparam int NS = 9;
  localparam int SH [NS] = '{0, 12, 48, 60, 70, 96, 100, 144, 191};
  logic [63:0] x;
  logic [63:0] y [NS];
  int checks = 0, failures = 0;
  for (genvar i = 0; i < NS; i++) begin : g
    shl_mod_p #(.SHIFT(SH[i])) dut (.x, .y(y[i]));
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic [63:0] v);
    logic [64:0] r;
    x = v; #1;
    for (int i = 0; i < NS; i++) begin
      r = {1'b0, v};
      for (int s = 0; s < SH[i]; s++) r = (r << 1) % {1'b0, P};
      checks++;
      if (y[i] !== r[63:0]) begin
        failures++;
        $display("shl%0d(%h) = %h, want %h", SH[i], v, y[i], r[63:0]);
      end
    end
  endtask
  initial begin
    logic [63:0] v;
    check(64'd0); check(64'd1); check(P - 1); check(64'hFFFF_FFFF);
    for (int i = 0; i < 500; i++) begin
      v = {$urandom, $urandom};
      if (v >= P) v = v - P;
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
