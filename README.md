# Pipelined 5-point Winograd Fourier transform

This is a streaming 5-point DFT engine. It takes one complex sample per clock and puts out one
DFT bin per clock. Both streams are in natural order. It is built on the Winograd factorisation
of the 5-point DFT matrix:

    X = S1 · M · S2 · x

- `S2` (6×5) and `S1` (5×6) contain only 0, +1 and −1, so they are pure additions.
- `M` is diagonal. Its six elements are either real or purely imaginary.

Computed directly, that is 17 complex additions and 5 real-by-complex multiplications per
transform, with no general multiplier. The samples arrive one at a time, so each group of stages
of the flow graph is folded onto a single shared unit that works on a different operation every
clock:

| stage | job | hardware | operations per 5 clocks |
|---|---|---|---|
| input buffer | natural order → feeding order x0, x1, x2, x4, x3 | ping-pong buffer, 2×5 words | — |
| B1–B3 | `S2` (3 full + 2 half butterflies) | 1 complex adder + 1 complex subtractor | 5 |
| B4 | `M` (m1…m5; m0 = 1 bypasses) | 2 reconfigurable multiplier blocks (ReMB), 2×2 switch, negator | 5 |
| B5–B6 | first two stages of `S1` (1 full + 3 half butterflies) | 1 complex adder + 1 complex subtractor | 4 |
| B7 | last stage of `S1` (2 full butterflies) and natural-order output | 1 complex adder + 1 complex subtractor | 2 |

So the whole datapath has three complex adders, three complex subtractors and two ReMBs. Each
ReMB has three multiplexers and three real adders. A 3-bit counter that runs 001…101 sequences
all of it.

## The arithmetic

The DFT is `X_k = Σ x_n ω^{nk}` with `ω = e^{−j2π/5}` and `u = 2π/5`.

`S2` forms six sums from the natural-order samples:

    a0 = x0+x1+x2+x3+x4      a1 = x1+x2+x3+x4       a2 = x1−x2−x3+x4
    a3 = x1−x4               a4 = x1+x2−x3−x4       a5 = x2−x3

They are built as butterflies: `s14, a3 = x1 ± x4`, then `s23, a5 = x2 ± x3`, then
`a1, a2 = s14 ± s23`, then `a4 = a3 + a5`, then `a0 = x0 + a1`.

`M` scales each sum, `b_i = m_i · a_i`:

| | value | numeric |
|---|---|---|
| m0 | 1 | 1 |
| m1 | 1 − (cos u + cos 2u)/2 | 1.25 |
| m2 | (cos 2u − cos u)/2 | −0.559017 |
| m3 | j (sin u + sin 2u) | j 1.538842 |
| m4 | j sin u | j 0.951057 |
| m5 | j (sin u − sin 2u) | j 0.363271 |

`S1` combines the products:

    c = b0 − b1,  p = c + b2,  q = c − b2,  e = b4 − b5,  g = b3 − b4
    X0 = b0   X1 = q − e   X2 = p − g   X3 = p + g   X4 = q + e

The matrices were checked numerically against the DFT definition. They give exactly `X0…X4` in
natural order when their columns are taken as `x0…x4` in natural order. The order
`x0, x1, x2, x4, x3` is only the order in which the samples are fed to B1–B3.

## The schedule (the part to read carefully)

Every unit sees the counter value `ph` (1…5). A transform that enters B1–B3 in period `P` finishes
in period `P+3`. Each unit keeps stage registers long enough that the next transform can already
come in behind it. The table shows what each unit does in each phase. "→" means "written into a
register at the end of that clock".

| ph | B1–B3 input | B1–B3 butterfly | to B4 (coefficient) | B4 output (registered) | B5–B6 butterfly | B7 butterfly | output |
|---|---|---|---|---|---|---|---|
| 1 | x0 (next) | a1, a2 = s14 ± s23 → | a5 (m5) | b3 | e = b4 − b5 → | — | X1 |
| 2 | x1 | a4 = a3 + a5 → | a1 (m1) | b5 | p, q = c ± b2 → | — | X2 |
| 3 | x2 | a0 = x0 + a1 → | a2 (m2) | b1 | — | X4, X1 = q ± e → | X3 |
| 4 | x4 | s14, a3 = x1 ± x4 → | a4 (m4) | b2 | c = b0 − b1 → | X3, X2 = p ± g → | X4 |
| 5 | x3 | s23, a5 = x2 ± x3 → | a3 (m3) | b4 | g = b3 − b4 → | — | X0 (next) |

Points worth knowing:

- **x0 is delayed twice.** A transform's `a0 = x0 + a1` is formed in phase 3 of the *following*
  period. By then the next transform's x0 has already arrived. x0 therefore goes through a
  two-deep shift register: it is captured in phase 1 and moved on in phase 4.
- **a0 bypasses the multipliers.** `m0 = 1`, so `a0` goes straight from B1–B3 to B5–B6 as `b0`.
  It is valid there from phase 4 to the next phase 3. B5–B6 also copies it into the `x0` stage
  register, which feeds X0.
- **Products are consumed out of arrival order.** B4 delivers `b3, b5, b1, b2, b4` in phases
  1…5. B5–B6 holds each one in an input register until its operation is due: `g` needs `b3`
  (phase 1) and `b4` (phase 5).
- **B7 doubles as the output address generator.** Its four results wait in output registers. A
  multiplexer stepped by the counter emits X0…X4 in natural order through one output register.

### Latency and throughput

- One sample in and one bin out every clock, with no stalls.
- x0 enters the input buffer 19 clocks before X0 leaves the top: 5 clocks in the buffer and
  14 in B1–B7.
- The first block's X0 appears 19 clocks after reset is released. `out_valid` rises at that
  point and stays high.

## The reconfigurable multiplier block (`remb`)

A ReMB multiplies a real word by one of five constants without a multiplier:

- A pre-adder forms `P = IN + IN/2`.
- Three 5-input multiplexers pick shifted, and possibly inverted, copies of `IN` and `P`.
- Two adders sum them:

      OUT = A + (B >>> 2) + i1 + (C >>> 5) + i2

An inverted term plus a carry-in of 1 is an exact two's-complement subtraction. Multiplexer input
`k` belongs to coefficient `m(k+1)`.

| sel | constant | A | B | C | realised | error |
|---|---|---|---|---|---|---|
| 0 | m1 | IN | IN | 0 | 1.25 | 0 |
| 1 | m2 | ~(P>>1) | P>>1 | IN>>3 | −0.55859375 | 4.2e-4 |
| 2 | \|m3\| | P | IN>>3 | IN>>2 | 1.5390625 | 2.2e-4 |
| 3 | \|m4\| | IN | ~(P>>3) | ~(IN>>4) | 0.951171875 | 1.1e-4 |
| 4 | \|m5\| | IN>>1 | ~(IN>>1) | ~(P>>2) | 0.36328125 | 1.1e-5 |

How the constants and the factor j are handled:

- **Negative m2.** The ReMB produces m2 with its sign: an inverted `A` plus `i1`.
- **Imaginary m3…m5.** The ReMB produces only their magnitude. In the multiplier stage the 2×2
  switch crosses the two ReMB outputs, and the negator on the real output gives

      (re, im) · j|m| = (−|m|·im, |m|·re)

- **Control.** The control logic supplies `sel`, `i1`, `i2` and the switch/negator enable in the
  same clock as the sample.

Internally the ReMB adds 10 guard fraction bits, so every shift and negation is exact. The
result is truncated (floored) back to 9 fraction bits.

## Number format and accuracy

| | format | range |
|---|---|---|
| inputs | Q2.9, 11 bits | [−2, 2) |
| inside and outputs | Q5.9, 14 bits | [−16, 16) |

- The 14-bit words have room for the largest sum of five inputs (`|a0| ≤ 10`) and the largest
  DFT output (`|Re X|, |Im X| ≤ 5·2·√2 ≈ 14.1`), so nothing overflows.
- Rounding happens only in the ReMBs.
- Over 400 test transforms, which include full-scale corner blocks, the largest output error
  against a floating-point DFT was 0.0063, about 3 LSB.

## Control signals

The control logic (`wft5_ctrl`) holds the counter. It decodes two things from it:

- **The multiplier configuration** described above.
- **The control signals `c1…c5`** of the original butterfly circuit: 001 → c2, c3;
  010 → c1, c3, c4; 011 → c2, c3, c5; 100 → c4; 101 → c4. They are brought out on `ctrl_c` for
  observation.

The butterfly units of this RTL are sequenced from the counter value directly. Their schedule
(above) is their own, so `c1…c5` do not drive them. A sixth signal, c6, is named for the second
latch of the original circuit, but its timing is not given. It is not generated.

## Departures from the original design

- **ReMB contents.** The published ReMB drawing lists multiplexer inputs and output shifts
  (>>3, >>6) that do not produce the five WFT constants. With those shifts 1.25 cannot be
  reached at all. The topology is kept: pre-adder, three 5-input multiplexers in coefficient
  order, inverted inputs, two adders with carry-ins. The inputs and the shifts (>>2, >>5) are
  this design's own CSD choice (table above).
- **Butterfly wiring.** The original modified butterfly for B1–B3 gives the units (two operand
  multiplexers, adder, subtractor, shift registers, latches, output multiplexer) but not the
  multiplexer input order. The schedule, register allocation and output multiplexer here are
  this design's own. The original layout of B5–B6 is not given at all.
- **Latches.** The original circuit's two latches are replaced by edge-triggered registers with
  enables. Its shift registers are clocked every cycle. Here, the stage registers load only in
  their phase.
- **Buffers.** The input and output buffers with address generators are only named in the
  original. Here, the input buffer is a ping-pong buffer (`wft5_reorder`), and the output
  ordering is done by B7's output multiplexer.
- **Choices of this design.** No handshake, the 14-bit internal words, the output flags and the
  registered B4 and B7 outputs.

## Interface of `wft5_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock, all registers on the rising edge |
| rst_n | in | 1 | synchronous, active low |
| in_re, in_im | in | 11 | sample, Q2.9, natural order |
| in_sof | out | 1 | high in the clock whose input is taken as x0 (every 5th clock, starting with the first clock after reset) |
| out_re, out_im | out | 14 | bin X_k, Q5.9 |
| out_k | out | 3 | index k of the current bin |
| out_sof | out | 1 | high with X0 while out_valid |
| out_valid | out | 1 | high from the first computed X0 onwards |
| ctrl_c | out | 5 | c1…c5 (bit k−1 = c_k) |

## Files

`rtl/`:

| file | contents |
|---|---|
| `wft5_pkg.sv` | widths, complex types, coefficient enum, multiplier control struct |
| `wft5_ctrl.sv` | counter, c1…c5 decode, multiplier configuration |
| `remb.sv` | reconfigurable multiplier block (combinational) |
| `wft5_mult_stage.sv` | B4: two ReMBs, switch, negator, output register |
| `wft5_s2_bfly.sv` | B1–B3 |
| `wft5_s1_bfly.sv` | B5–B6 |
| `wft5_bfly_out.sv` | B7 and output selection |
| `wft5_reorder.sv` | five-sample ping-pong reorder buffer, permutation as a parameter |
| `wft5_top.sv` | the pipeline |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`:

- `tb_wft5_top` runs 400 transforms end to end at the default sizes. It compares every bin with a
  floating-point DFT, checks the 19-clock latency and the control decode, and counts that every
  coefficient, the j path and the input reordering were used.
- The unit testbenches check their unit bit-exactly against values worked out from the
  equations above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/wft5_pkg.sv \
        tb/tb_wft5_top.sv --top-module tb_wft5_top -o sim
    ./obj_dir/sim

Replace `tb_wft5_top` with any other testbench name to run that one. Everything runs in well
under a second.

## Changing it

- **Other word widths.** Change `DATA_W` / `GROW_W` in `wft5_pkg`. The ReMB guard bits (`G`)
  must stay at least 9, so that its shifts remain exact.
- **A different schedule.** It lives in the `case (phase)` statements of the three butterfly
  units, in the coefficient order in `wft5_ctrl`, and in the `out_k` decode and `LATENCY` of the
  top. These must change together. The schedule table above is the reference.
