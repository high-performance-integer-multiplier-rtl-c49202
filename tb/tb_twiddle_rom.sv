// Self-checking test of twiddle_rom: every entry is compared with powers of
// OMEGA built up one multiplication at a time with the % operator, and the
// table is checked to hold the article's roots OMEGA^16 = 2^12 and
// OMEGA^64 = 2^48 and to have OMEGA^128 = -1 (a primitive 256th root).
module tb_twiddle_rom;
  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  logic [7:0]  e;
  logic [63:0] w;
  int checks = 0, failures = 0;
  twiddle_rom dut (.e, .w);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [127:0] r;
    logic [63:0]  omega;
    e = 8'd1; #1; omega = w;
    r = 128'd1;
    for (int i = 0; i < 256; i++) begin
      e = 8'(i); #1;
      checks++;
      if (w !== r[63:0]) begin failures++; $display("entry %0d = %h, want %h", i, w, r[63:0]); end
      if (i == 16)  begin checks++; if (w !== 64'h1000) begin failures++; $display("OMEGA^16 is not 2^12"); end end
      if (i == 64)  begin checks++; if (w !== 64'h1_0000_0000_0000) begin failures++; $display("OMEGA^64 is not 2^48"); end end
      if (i == 128) begin checks++; if (w !== P - 1) begin failures++; $display("OMEGA^128 is not -1"); end end
      r = (r * {64'd0, omega}) % {64'd0, P};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
