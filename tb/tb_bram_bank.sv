// Self-checking test of bram_bank: random writes and reads on both read
// ports against a shadow array, checking the one-cycle read latency and
// that a read of the address being written returns the old word.
module tb_bram_bank;
  localparam int NT = 3000;
  logic        clk = 0;
  logic        we;
  logic [4:0]  waddr, raddr0, raddr1;
  logic [63:0] wdata, rdata0, rdata1;
  logic [63:0] shadow [32];
  logic [63:0] e0, e1;
  int checks = 0, failures = 0, collisions = 0;
  bram_bank dut (.clk, .we, .waddr, .wdata, .raddr0, .rdata0, .raddr1, .rdata1);
  always #5 clk = ~clk;
  initial begin
    repeat (NT + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      waddr = 5'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < NT; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks += 2;
        if (rdata0 !== e0) begin failures++; $display("port 0 got %h want %h", rdata0, e0); end
        if (rdata1 !== e1) begin failures++; $display("port 1 got %h want %h", rdata1, e1); end
      end
      raddr0 = 5'($urandom); raddr1 = 5'($urandom);
      we = $urandom % 2; waddr = 5'($urandom); wdata = {$urandom, $urandom};
      if (we && (waddr == raddr0 || waddr == raddr1)) collisions++;
      e0 = shadow[raddr0]; e1 = shadow[raddr1];
      if (we) shadow[waddr] = wdata;
    end
    checks++;
    if (collisions == 0) begin failures++; $display("no read/write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
