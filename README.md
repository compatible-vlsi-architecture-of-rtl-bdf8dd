# Radix-8 Booth multiply-accumulate unit with carry-save accumulation

A multiply-accumulate (MAC) unit computes `P = X*Y + P` over and over: it is the core
operation of FIR filters, FFT butterflies and inner products. In a plain design the
product goes through a full carry-propagate adder, and the accumulator then goes
through another one, every cycle. This unit avoids both in the loop:

* the multiplier `Y` is recoded with **radix-8 modified Booth encoding**, so a 32-bit
  multiplication has only 11 partial products instead of 32;
* the partial products are summed by a **Wallace-style tree of 5:2, 4:2 and 3:2
  compressors**;
* the **running result is fed back into that same tree** as two extra rows, kept as a
  sum row and a carry row, so no full-width carry-propagate addition sits in the
  accumulation loop. Only the upper half of the result goes through a final adder,
  and that adder is outside the loop.

Operands are N-bit two's complement (N = 32 by default), the result and accumulator
are 2N bits and wrap modulo 2^(2N). A new operation can start every clock; the result
appears two clocks after the operands are sampled.

## Operation

| `in_valid` | `acc` | effect on the held result P                  |
|-----------:|------:|-----------------------------------------------|
| 1          | 0     | P = X*Y (start a new sum; plain multiplier)   |
| 1          | 1     | P = P + X*Y (mod 2^(2N))                      |
| 0          | -     | P unchanged                                   |

`rst_n` is a synchronous, active-low reset that clears every register, so P is 0
after reset. There is no saturation and no overflow flag: a sum that leaves the
signed 2N-bit range wraps around.

## Pipeline

```
          x   y   acc in_valid
          |   |    |    |
        [ stage-1 input registers ]                         edge k samples
          |   |
   booth_pp_gen: 11 x booth_r8_encoder, 3X adder,
   11 partial-product rows + 1 negation row
          |
   compressor_accumulator:
     compressor_tree (11 + 1 + 2 feedback rows -> sum, carry)
     N-bit adder on the lower halves            <-----+
     [ p_lo | c_lo | s_hi | c_hi registers ] ---------+     edge k+1 loads
          |        |     |
          |      final_adder (s_hi + c_hi + c_lo)
          |            |
      p[N-1:0]     p[2N-1:N]                                valid after edge k+1
```

Operands and control are registered at edge k. During the next cycle the Booth
encoders, the partial-product selectors, the compressor tree and a lower-half adder
work out the new state, which is registered at edge k+1. The final adder is
combinational behind those registers, so `p` and `p_valid` change right after edge
k+1. Throughput is one operation per clock, with no stalls: back-to-back
accumulations need no forwarding because the feedback loop is entirely inside stage 2.

## Radix-8 Booth encoding

The multiplier is cut into overlapping 4-bit groups
`{y[3i+2], y[3i+1], y[3i], y[3i-1]}`, with `y[-1] = 0` and `y` sign-extended at the top.
Each group stands for one signed digit

```
d_i = -4*y[3i+2] + 2*y[3i+1] + y[3i] + y[3i-1]      in {-4 .. +4}
X*Y = sum_i d_i * X * 8^i
```

so an N-bit multiplier needs ceil(N/3) digits: 11 for N = 32, 6 for N = 16.

`booth_r8_encoder` folds a negative group onto its magnitude by inverting its lower
three bits when the top bit is set, and then decodes the magnitude into one-hot
selects `one`, `two`, `three`, `four` plus a sign `neg`. The all-ones group is digit
zero and is not marked negative.

`booth_pp_gen` forms the multiples of X once: X, 2X and 4X are shifts; 3X, the
"hard multiple", takes one adder (X + 2X). Each row picks its multiple with AND-OR
selection, inverts it for a negative digit, sign-extends it to the full 2N bits and
shifts it left by 3i. The +1 that completes each two's-complement negation is not
added in the row: it is placed at bit 3i of a separate **negation row**, which the
tree adds along with the rest. Full sign extension costs some extra cells in the
upper columns of the tree but keeps every row self-contained.

## Compressor tree

The cells:

* `comp32`: full adder, 3 bits in, sum + carry out.
* `comp42`: 4 bits plus a carry-in from the column below, sum + carry + carry-out.
  The carry paths use multiplexers steered by XOR terms
  (`cout = (a^b) ? c : a`, `carry = (a^b^c^d) ? cin : d`), so the carry-out never
  depends on the carry-in and a row of cells does not ripple.
* `comp52`: 5 bits plus two carry-ins, sum + carry + two carry-outs, built from three
  chained full adders; again the carry-outs do not depend on the carry-ins.

`compressor_tree` applies them level by level. At each level the rows are taken in
groups of five (5:2 cells), and a leftover of four or three rows goes through 4:2 or
3:2 cells; one or two leftover rows pass through. For the 32-bit MAC the tree sees 14
rows (11 partial products, the negation row, two feedback rows) and reduces them
14 -> 6 -> 3 -> 2 in three levels. All sums are modulo 2^(2N): carries out of the top
column are simply dropped.

## Accumulating in carry-save form

This is the part that differs most from a textbook MAC. The accumulator is never a
single binary number. `compressor_accumulator` keeps four registers:

| register | width | meaning                                              |
|----------|-------|------------------------------------------------------|
| `p_lo`   | N     | lower half of P, in binary                           |
| `c_lo`   | 1     | carry out of the lower half, not yet added upward    |
| `s_hi`   | N     | upper half of P, sum row                             |
| `c_hi`   | N     | upper half of P, carry row                           |

so that `P = {s_hi + c_hi + c_lo, p_lo}`.

When `acc` is set they re-enter the tree as two rows, `{s_hi, p_lo}` and
`{c_hi, 0}`. `c_lo` goes into bit N of the negation row, a column that row never
uses (its bits sit at 3i, and 3i < N for every digit). The tree then produces a sum
row and a carry row for `P + X*Y`. An N-bit adder resolves the lower halves of the
two rows into the new `p_lo` and `c_lo`. The upper halves are registered as they are.

Why split the result at bit N: the lower half of a product is complete once the
partial products are added, and a binary lower half lets `p[N-1:0]` leave straight
from a register. The upper half, the wide and slow part, never has to be resolved
inside the loop; `final_adder` resolves it, with `c_lo` as carry-in, only for the
output. The price is the N-bit lower-half adder, which does sit in the stage-2 path
after the tree.

The scheme relies on bit N of the negation row being free; `compressor_accumulator`
carries an assertion that checks this whenever it loads.

When `acc` is clear the feedback rows are zero and the registers take `X*Y` alone,
so the same hardware is the plain Booth multiplier.

## Files

| file | contents |
|------|----------|
| `rtl/mac_pkg.sv` | `booth_sel_t` digit type; digit-count and tree-level functions |
| `rtl/booth_r8_encoder.sv` | one radix-8 Booth group to sign + one-hot magnitude |
| `rtl/booth_pp_gen.sv` | encoders, 3X adder, partial-product rows, negation row |
| `rtl/comp32.sv`, `rtl/comp42.sv`, `rtl/comp52.sv` | compressor cells |
| `rtl/compressor_tree.sv` | level-by-level reduction to sum and carry rows |
| `rtl/compressor_accumulator.sv` | tree with feedback, lower-half adder, state registers |
| `rtl/final_adder.sv` | upper-half carry-propagate adder |
| `rtl/mac_top.sv` | top: input registers and the blocks above |

The one parameter is `N` (operand width, default 32) on `mac_top`, `booth_pp_gen`,
`compressor_accumulator` and `final_adder`; `compressor_tree` takes `ROWS` and `W`.
Any N of 4 or more works. At N = 32 a coarse synthesis gives about 2,800 word-level
cells (mostly single-bit XOR/AND/OR from the compressor cells) and 164 flip-flops.

## Where this design makes its own choices

The overall structure follows the published architecture: radix-8 modified Booth
encoding with 4-bit overlapping groups, 11 groups for a 32-bit multiplier, a Wallace
tree of 3:2, 4:2 and 5:2 compressors with multiplexers in place of XOR gates on the
carry paths, accumulation merged into the compression and kept as sum and carry,
input registers on X and Y, registers holding the lower result half and the upper
sum and carry, and a final adder producing `P[2N-1:N]`. The following are not fixed
by it and were decided here:

* **Digit set.** The published text lists partial products up to ±7X, which a
  radix-8 scheme with one overlapping bit cannot produce; the grouping it describes
  gives digits -4..+4, and that is what is built.
* **Which operand is encoded.** The multiplier Y is Booth-encoded and X is the
  multiplicand, as the algorithm description says; one block diagram draws the
  multiplicand entering the encoder instead.
* **Width.** 32 bits by default, as the text states; the reference simulation was run
  with 16-bit operands and a 32-bit result, which is `N = 16` here.
* **Signedness, sign extension, 3X, reset, control.** Two's-complement operands; fully
  sign-extended rows with a separate negation row; 3X by an adder; synchronous
  active-low reset; the `in_valid` / `acc` interface.
* **Lower-half carry.** Its path (registered, fed back at bit N, carry-in of the final
  adder) is this design's.
* **Adders.** The lower-half adder and the final adder are written as `+` and left to
  synthesis; no particular fast-adder structure is prescribed.
* **Latency.** Two clocks, with a combinational final adder at the output, as the
  pipeline drawing shows; no cycle count is stated in the source.
* **Power reduction.** The source mentions power-reduction techniques without
  describing any; none are implemented.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_booth_r8_encoder` | all 16 groups: digit value, at most one select, no negative zero |
| `tb_comp32`, `tb_comp42`, `tb_comp52` | all inputs: the column-sum identity; carry-outs independent of carry-ins |
| `tb_booth_pp_gen` | rows + negation row = X*Y: 3,000+ random and corner 32-bit pairs, every 8-bit and 6-bit pair |
| `tb_compressor_tree` | sum + carry = sum of rows for 14x64 and 3/4/5/7/9-row trees, random and all-ones data |
| `tb_compressor_accumulator` | 4,000 cycles of random rows against a reference accumulator: fresh, accumulate, hold, reset |
| `tb_final_adder` | random and carry-chain corner cases |
| `tb_mac_top` | the full 32-bit unit end to end: 20,000 random operations with accumulation chains, idle cycles, wrap-around past 2^63, reset in mid-stream, the two-clock latency, and 0x7b0d * 0x6673 = 0x313e74d7 |
| `tb_mac_n16` | the unit at N = 16 (the reference simulation size): 0x7b0d * 0x6673 and 20,000 random operations |

`tb_mac_top` counts each mechanism (fresh product, accumulation, idle hold, wrap,
reset, long accumulation chain) and fails if one never happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mac_pkg.sv tb/tb_mac_top.sv \
          --top-module tb_mac_top -Mdir obj_mac
./obj_mac/Vtb_mac_top
```

Other testbenches are run the same way with their own name. Each of them finishes in
well under a second of simulation time.
