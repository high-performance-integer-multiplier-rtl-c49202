// Self-checking test of ntt_ctrl: after start it must issue exactly 16
// operations for each of the 13 passes in order, with the right flags
// (X/Y interleaving, operand-direct first passes, fused point-wise product
// in pass 7, inverse passes 8..11 in the Y region, evaluation in pass 12),
// never stall during the forward passes, stall 6 cycles before each of the
// two passes that need a full drain, copy each operation down the delay
// line, and pulse done 223 cycles after start. Runs two operations back to back.
module tb_ntt_ctrl;
  import gl_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  op_t  st [7];
  logic stall, busy, done;
  op_t  hist [$];
  int checks = 0, failures = 0;
  ntt_ctrl dut (.clk, .rst_n, .start, .st, .stall, .busy, .done);
  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("%s", msg); end
  endtask
  task automatic one_run();
    int cyc, n_ops, n_stall, n_fwd_stall;
    op_t issued [$];
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; n_stall = 0; n_fwd_stall = 0;
    hist.delete();
    while (!done) begin
      if (st[0].valid) issued.push_back(st[0]);
      if (stall) begin
        n_stall++;
        if (st[0].pass < 4'd8) n_fwd_stall++;
      end
      hist.push_back(st[0]);
      if (hist.size() > 6) begin
        chk(st[6] == hist[hist.size() - 7], "delay line mismatch");
      end
      @(negedge clk); cyc++;
    end
    chk(cyc == 223, $sformatf("done after %0d cycles", cyc));
    chk(issued.size() == 13 * 16, $sformatf("%0d operations issued", issued.size()));
    chk(n_fwd_stall == 0, "forward pass stalled");
    chk(n_stall == 12, $sformatf("%0d stall cycles, expected 12", n_stall));
    for (int i = 0; i < issued.size(); i++) begin
      op_t o;
      int n;
      o = issued[i];
      n = i / 16;
      chk(o.pass == 4'(n) && o.c == 4'(i % 16), "order");
      if (n < 8) chk(!o.inv && !o.eval && o.k == 2'(n / 2) && o.region == n[0] &&
                     o.first == (n < 2) && o.conv == (n == 7), $sformatf("flags of pass %0d", n));
      else if (n < 12) chk(o.inv && !o.eval && o.k == 2'(n - 8) && o.region && !o.first && !o.conv,
                           $sformatf("flags of pass %0d", n));
      else chk(o.eval && o.region, "evaluation flags");
    end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one_run();
    one_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
