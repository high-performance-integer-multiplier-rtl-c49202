# 3072-bit integer multiplier with a radix-4 number theoretic transform

This design multiplies two 3072-bit unsigned integers in 223 clock cycles. It
never forms the schoolbook product. Each operand is cut into 128 digits of
24 bits and padded with zeros to 256 points. Both point vectors go through a
256-point number theoretic transform (NTT), which is a Fourier transform over
the integers modulo a prime. The two spectra are multiplied point by point
and transformed back. The result is the 256 coefficients of the digit
convolution, and a final carry pass turns them into the 6144-bit product.
This is the Schönhage–Strassen scheme.

The architecture follows B.-C. Chang, W.-K. Lee, B.-M. Goi and S. O. Hwang,
"High Performance Integer Multiplier on FPGA with Radix-4 Number Theoretic
Transform" (2022). That article gives the arithmetic, the radix-4 butterfly
and the overall block structure: 16 memory banks feeding four
"butterfly + multiplier" rows. It does not give addressing, scheduling,
control or I/O, so those parts are this design's own. The section
[Departures from the article](#departures-from-the-article) lists every
difference.

## Arithmetic modulo p = 2^64 − 2^32 + 1

All transform values are 64-bit residues modulo the Solinas prime
p = 0xFFFFFFFF00000001. The prime is large enough for this use. A
convolution coefficient is at most 128 · (2^24 − 1)^2 < 2^55 < p, so the
inverse transform returns every coefficient exactly, with no wrap-around.

Two identities make the arithmetic cheap:

* 2^64 ≡ 2^32 − 1 and 2^96 ≡ −1 (mod p). Split a 128-bit value into 32-bit
  limbs a·2^96 + b·2^64 + c·2^32 + d. It is then congruent to
  2^32(b + c) − a − b + d, which lies between −2^33 and 2^65. `reduce128`
  in `gl_pkg` adds p to make this non-negative, then finishes with three
  conditional subtractions.
* 2^192 ≡ 1, so 2^48 is a 4th root of unity and 2^12 is a 16th root. A
  multiplication by one of these is a shift followed by the same fold. A
  shift by 96 or more is a negation, because 2^96 ≡ −1.

Modules: `add_mod_p`, `sub_mod_p` (one conditional correction each),
`shl_mod_p #(SHIFT)` (fixed power-of-two multiply, combinational) and
`mul_mod_p`. `mul_mod_p` is a 2-stage pipeline. The first stage forms the
64×64 product with one Karatsuba step on 32-bit halves, which takes three
partial products: a1·b1, a0·b0 and (a1+a0)(b1+b0). The second stage
recombines them and applies the fold.

## The radix-4 butterfly (`radix4_ctfnt_v2`)

The butterfly computes a 4-point NTT with w = 2^48 for the forward transform
and w = 2^144 = 2^−48 for the inverse. Since w² = −1:

```
y0 = (x0 + x2) + (x1 + x3)        y2 = (x0 + x2) − (x1 + x3)
y1 = (x0 − x2) + w(x1 − x3)       y3 = (x0 − x2) − w(x1 − x3)
```

It uses no multiplier. The only operations are modular add, modular
subtract, and shifts by 48, 96 and 144. The input `fw_iv_n` selects the
shift by 48 or by 144. The butterfly has three register stages, so a result
appears 3 cycles after its inputs, and it accepts a new set every cycle.
`x0 − x2` is formed as `x0 + 2^96·x2`, as the article draws it.

## The 256-point transform as four radix-4 passes

Write a point index in base 4 as p = 64·d3 + 16·d2 + 4·d1 + d0. A radix-4
pass on digit q combines, in groups of four, the points that differ only in
d_q. It writes each result back to the position it came from (in place).

* **Forward** (decimation in frequency): passes on digits 3, 2, 1, 0.
  After forward pass s (s = 0, 1, 2), the value at position p is multiplied
  by OMEGA^e, where e = 4^s · (p mod 4^(3−s)) · d_(3−s)(p) mod 256. The last
  pass has no twiddle. The spectrum ends up in base-4 digit-reversed order:
  X[k0 + 4k1 + 16k2 + 64k3] sits at position 64k0 + 16k1 + 4k2 + k3.
* **Inverse**: the transpose of the forward flow. It runs passes on digits
  0, 1, 2, 3 with the inverse butterfly. After inverse pass i (i = 0, 1, 2),
  position p is multiplied by OMEGA^(−e), using the forward twiddle of pass
  s = 2 − i. The last pass multiplies by 256^−1. This flow takes the
  digit-reversed spectrum and returns the coefficients in natural order, so
  no reordering pass is needed anywhere.

OMEGA = 0xC2DED1724375E12E is a primitive 256th root of unity with
OMEGA^16 = 2^12 and OMEGA^64 = 2^48. The table and the butterflies therefore
use the same root. `twiddle_rom` computes its 256 entries at elaboration
time by square-and-multiply.

In hardware every multiplication follows a butterfly. Each of the four rows
(`ntt_unit`) is one butterfly followed by four `mul_mod_p`. All twiddles go
through these general multipliers.

## Memory organisation: 16 banks with no conflicts

This is the part of the design that needs the most care. Each cycle, the
four rows read 16 points and write 16 results, and each of the 16 banks has
one write port. The 16 points of a cycle must therefore always fall in 16
different banks, for every pass direction.

Point p lives in

```
bank    = 4·((d1 + d3) mod 4) + ((d0 + d1 + d2 + d3) mod 4)
address = {region, d1, d0}        region 0 = X, region 1 = Y / product
```

In a pass on digit q, cycle c (0..15), row u and lane j handle the point
with d_q = j and d_r = u. The cycle counter c supplies the two remaining
digits, lower digit from c[1:0]. The digit r is chosen so that its weight in
the first bank term (d1 + d3) has the opposite parity to d_q's weight:
r = 2, 3, 0, 1 for q = 3, 2, 1, 0 (`gl_pkg::pass_pos`).

* The second bank term separates the four lanes.
* The first bank term separates the rows.

As a result, all 16 points of a cycle map to distinct banks. Writes return
to the same positions as the reads, so they are conflict-free too. The
evaluation pass reads 16 consecutive positions and is also conflict-free. A
simulation assertion in `ssma_mult_3k` checks the write side every cycle.

Every bank (`bram_bank`) has 32 words of 64 bits, one write port and two
synchronous read ports. Port 0 feeds the butterflies and the evaluation.
Port 1 exists only to fetch X during the fused point-wise product.

## Schedule and pipeline (`ntt_ctrl`)

One pass is 16 cycles. The sequencer issues 13 passes:

| pass | work | region | notes |
|------|------|--------|-------|
| 0, 1 | forward pass 0 of X, of Y | X, Y | butterfly inputs come straight from the operand registers (digits ≥ 128 are 0), so there is no load phase |
| 2–5 | forward passes 1, 2 of X and Y, interleaved | X / Y | |
| 6, 7 | forward pass 3 of X, of Y | X, Y | pass 7 multiplies by X read through port 1 instead of a twiddle. This is the point-wise product; the result Z overwrites Y |
| 8–11 | inverse passes 0–3 on Z | Y | pass 11 multiplies by 256^−1 |
| 12 | 16 evaluation reads | Y | |

Each issued operation (`gl_pkg::op_t`) moves down a delay line. The stages
are:

```
stage 0  bank read addresses
stage 1  bank data (or operand digits) -> butterfly inputs
stage 4  butterfly outputs, twiddle lookup -> multipliers
stage 6  multiplier outputs -> bank writes (visible from the next cycle)
```

A result is written 6 cycles after its operation is issued and can be read
one cycle later. Two kinds of dependence link passes on the same region:

* **Same set.** Passes on digits 3 and 2 both cover the points with fixed
  (d1, d0) in cycle c, where d1 and d0 come from c. Passes on digits 1 and
  0 likewise cover the points with fixed (d3, d2). So cycle c of the second
  pass needs only the results of cycle c of the first. Those results were
  issued at least 16 cycles earlier, so such a pass never waits. The same
  holds for the transition from the last forward pass to the first inverse
  pass (both on digit 0) and for the X reads of the fused product.
* **Full.** The pass on digit 1 after the pass on digit 2, and the
  evaluation after the last inverse pass, need every result of the previous
  pass (`gl_pkg::needs_drain`). Such a pass may not start while an
  operation of an earlier pass on its region is still in stages 1–6. In the
  forward transform, the interleaving of X and Y already gives that time.
  Inverse pass 2 and the evaluation each wait 6 cycles, with `stall` high
  during the wait.

A simulation assertion in `ssma_mult_3k` checks every cycle that no read
fetches a point that an in-flight operation will still rewrite.

Total: 13 × 16 issue cycles plus 2 × 6 stall cycles, plus start and finish
overhead. That is **223 cycles from the `start` edge to `done`**, every
time.

## Evaluation (`evaluation_unit`)

Coefficient z_i (< 2^56) has weight 2^(24i). Each cycle, the unit takes 16
consecutive coefficients and adds them, shifted by 24·k, to the carry left
from the previous chunk. The low 384 bits go into the product register. The
rest is kept as the carry. Sixteen chunks fill the 6144-bit product.

## Interface (`ssma_mult_3k`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, synchronous active-low reset |
| start | in | 1 | pulse with `a`, `b` valid; ignored while busy |
| a, b | in | 3072 | operands (registered at start) |
| busy | out | 1 | a multiplication is in progress |
| done | out | 1 | one-cycle pulse; `product` is valid from this cycle |
| stall | out | 1 | the sequencer is waiting for the pipeline to drain |
| product | out | 6144 | a·b, held until the next start |

The parameter `OPERAND_BITS` is 3072. The transform size, bank count, row
count and digit width are fixed in `gl_pkg`. The bank mapping and schedule
depend on N = 256 = 4^4, 16 banks and 4 rows, so do not change them
independently. The bank memories are not reset. They never need to be,
because the first passes take their inputs from the operand registers.

## Departures from the article

* **Cycle count.** The article reports 198 cycles per multiplication. This
  design takes 223 cycles: 208 issue cycles, 12 drain stalls and 3 cycles
  of start and finish. The article does not say how its transforms avoid
  these waits, or whether its count includes the final carry pass.
* **Write stagger.** The article adds delay registers of 1, 2 and 3 cycles
  on three of the four multiplier outputs, so that the four results of a
  butterfly can go to the same bank in successive cycles. Here, the bank
  mapping above puts the 16 results of a cycle in 16 different banks, so
  the stagger registers are left out. The output crossbar is a full
  16-way selection, not per-group 4×4 crossbars, and the input multiplexers
  are full 16-way selections.
* **Point-wise product.** It runs on the multipliers during the last Y
  forward pass, which needs a second read port on each bank. The article
  shows a separate convolution unit.
* **Transform structure.** The article describes the transform as a 16 × 16
  Cooley–Tukey decomposition, with each 16-point transform split 4 × 4. The
  four-pass in-place flow here is equivalent, but the twiddle placement and
  the transpose-form inverse are this design's choices. Every twiddle uses
  the general multipliers. None uses a shift.
* **Butterfly.** The butterfly reads the article's improved radix-4 diagram
  as three stages: (x0+x2, x0−x2, x1+x3, x1−x3), then (y0, −(x1+x3),
  w(x1−x3)), then (y1, y2, y3). The outputs are in natural order. One adder
  of the drawing could not be placed and is not built.
* **Multiplier.** The three 32-bit Karatsuba partial products are plain
  `*` operators, and the mapping to DSP blocks is left to synthesis.
* **Twiddle table.** Each of the 16 multipliers has its own copy of the
  256-entry twiddle table. The article keeps one shared table.
* **Own additions.** The evaluation (carry) unit, the controller, the
  operand registers and the start/busy/done interface are this design's own.
* **Left out.** The article also describes baselines: a radix-2 butterfly, a
  radix-4 butterfly built from four radix-2 ones, and the first version of
  its radix-4 butterfly. It also describes a partially pipelined multiplier
  with temporary registers. These are only comparisons and are not part of
  this RTL.
* **Operand size.** Operands are 3072 bits (128 digits), and half of the 256
  points are zero padding. This is the reading that makes "3072-bit
  multiplier" and "only half of the points carry data" agree.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
reference values computed with the simulator's own `%` and wide arithmetic,
never with the RTL's functions. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_ssma_mult_3k` runs the whole multiplier at its default size. It runs
  14 multiplications: zero, one, all-ones, a single high digit, 192-bit
  operands and random 3072-bit operands. It compares each product with a·b,
  checks the 223-cycle latency, and checks that every mechanism happened:
  operand-direct first passes, the fused point-wise product, the 1/256
  scaling, drain stalls, no stall in the forward passes, and carries
  between evaluation chunks.
* `tb_ntt_ctrl` checks the pass order, the flags of each pass, the delay
  line, the 12 stall cycles and the timing of `done`.
* The arithmetic, butterfly, ROM, bank, row and evaluation testbenches
  check each block against its own reference. Pipelined blocks are checked
  at their exact latency.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing -Irtl rtl/gl_pkg.sv tb/tb_ssma_mult_3k.sv \
          --top-module tb_ssma_mult_3k -o sim
./obj_dir/sim
```

For another block, replace the testbench name. `gl_pkg.sv` must come first,
and `-Irtl` lets Verilator find the other modules by name. The full
multiplier test builds in a few seconds and runs in well under a second.
