// Pass sequencer and pipeline bookkeeping for the 3072-bit multiplier.
// After start it issues one operation per cycle, 16 per pass:
//   passes 0..7  forward transform, X and Y interleaved (X0 Y0 X1 Y1 ...),
//                pass 0 of each reading the operand digits directly, and
//                Y's last pass fusing the point-wise product with X;
//   passes 8..11 inverse transform of the product, in the Y region;
//   pass 12      16 evaluation reads that stream the coefficients out.
// Each issued operation (op_t) is copied down a delay line, st[0] being the
// operation issued this cycle (bank read address), st[1] the bank data
// cycle (butterfly input), st[4] the butterfly output / multiplier input
// and st[LAT] = st[6] the bank write, 7 cycles before the data can be read.
// Dependences between passes on the same region come in two kinds:
// * same-set: the pass covers, in cycle c, exactly the points that the
//   previous pass on that region covered in its cycle c (digit pairs 3/2 and
//   1/0, see gl_pkg::pass_pos). Issued at least 16 cycles later without a
//   break, it always finds them written, so it never waits. The Y pass that
//   fuses the point-wise product reads X the same way.
// * full: the pass (gl_pkg::needs_drain) needs every result of the previous
//   one. It is held (stall = 1) while any operation of an earlier pass in
//   st[1..LAT] will still write its region. For the interleaved forward
//   passes that write is long done; inverse pass 2 and the evaluation wait
//   6 cycles each.
// done pulses one cycle after the product register has taken the last
// chunk. Synchronous active-low reset. The sequencing and the hazard rule
// are this design's own.
module ntt_ctrl #(
  parameter int LAT = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output gl_pkg::op_t   st [LAT+1],
  output logic          stall,
  output logic          busy,
  output logic          done
);
  import gl_pkg::*;

  op_t        st_q [1:LAT];
  logic       run_q;
  logic [3:0] pass_q;   // 0..12
  logic [3:0] c_q;
  op_t        cand;
  logic       hazard;

  always_comb begin
    cand        = '0;
    cand.c      = c_q;
    cand.pass   = pass_q;
    if (pass_q < 4'd8) begin
      cand.k      = pass_q[2:1];
      cand.region = pass_q[0];
      cand.first  = (pass_q[2:1] == 2'd0);
      cand.conv   = (pass_q == 4'd7);
    end else if (pass_q < 4'd12) begin
      cand.inv    = 1'b1;
      cand.k      = 2'(pass_q - 4'd8);
      cand.region = 1'b1;
    end else begin
      cand.eval   = 1'b1;
      cand.region = 1'b1;
    end
    hazard = 1'b0;
    if (needs_drain(pass_q))
      for (int s = 1; s <= LAT; s++)
        if (st_q[s].valid && !st_q[s].eval && st_q[s].region == cand.region &&
            st_q[s].pass != cand.pass) hazard = 1'b1;
    cand.valid = run_q && !hazard;
    stall      = run_q && hazard;
  end

  always_comb begin
    st[0] = cand;
    for (int s = 1; s <= LAT; s++) st[s] = st_q[s];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      pass_q <= '0;
      c_q    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      for (int s = 1; s <= LAT; s++) st_q[s] <= '0;
    end else begin
      st_q[1] <= cand;
      for (int s = 2; s <= LAT; s++) st_q[s] <= st_q[s-1];
      done <= 1'b0;
      if (start && !busy) begin
        run_q  <= 1'b1;
        busy   <= 1'b1;
        pass_q <= '0;
        c_q    <= '0;
      end else if (cand.valid) begin
        c_q <= c_q + 4'd1;
        if (c_q == 4'd15) begin
          if (pass_q == 4'd12) run_q <= 1'b0;
          else pass_q <= pass_q + 4'd1;
        end
      end
      if (st_q[2].valid && st_q[2].eval && st_q[2].c == 4'd15) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // a new operation is only issued while running
  assert property (@(posedge clk) disable iff (!rst_n) st[0].valid |-> run_q);
endmodule
