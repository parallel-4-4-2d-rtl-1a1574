# Parallel 4×4 multiple-transform processor for H.264

H.264 codes residuals with three small 4×4 transforms: the forward integer
transform (an integer approximation of the DCT), its inverse, and a 4×4
Hadamard transform applied to the sixteen luma DC coefficients of a
macroblock coded in 16×16 intra mode. All three use only the coefficients
±1, ±2 and ±½, so they reduce to shifts and additions.

This RTL computes them with a parallel architecture at four samples per
clock. It comes in two forms, side by side in the top level `tx_h264_top`:

* **`tx_mt4x4`**, the multiple-function processor. It handles all three
  transforms on one 16-bit datapath, selected per block.
* **`tx_ded4x4`**, the dedicated processor, built for a single transform. The
  top level has three instances: forward, inverse and Hadamard. Each stage is
  only as wide as its transform needs.

Both forms work the same way. A 4×4 block goes in as four rows, one row of
four samples per cycle. It comes out four cycles later as the four columns of
the transformed block, one per cycle. Blocks can follow each other with no
gap. In the multiple-function processor, consecutive blocks may use different
transforms. The diagram shows the multiple-function processor.

```
          din (4 x 16 bit)          mode, de
               |                        |
        +------v------+          +------v------+
        |  tx_1d      |          |  tx_ctrl    |  counter, NOP, 4-stage
        |  (rows)     |          |             |  de/mode chain
        +------+------+          +--+---+---+--+
               |                    |   |   |
        +------v------+   hold,dir  |   |   |
        | tx_transpose|<------------+   |   |
        | 4x4 x tx_cell|                |   |
        +------+------+                 |   |
               | bottom row / left column   |
        +------v------+   mode of block |   |
        |  tx_1d      |<----------------+   |
        |  (columns)  |                     |
        +------+------+                     |
        +------v------+                     |
        |  tx_round   | (inverse only)      |
        +------+------+                     |
               v                            v
          dout (4 x 16 bit)              oe, out_mode
```

## The transforms

For an input row vector x = (X0, X1, X2, X3), the 1D transforms are:

| mode     | matrix rows                                              |
|----------|----------------------------------------------------------|
| `XF_FWD` | (1 1 1 1), (2 1 −1 −2), (1 −1 −1 1), (1 −2 2 −1)          |
| `XF_INV` | (1 1 1 ½), (1 ½ −1 −1), (1 −½ −1 1), (1 −1 1 −½)          |
| `XF_HAD` | (1 1 1 1), (1 1 −1 −1), (1 −1 −1 1), (1 −1 1 −1)          |

In the inverse, "½·v" means `v >>> 1`, the arithmetic shift H.264 uses.
The 2D result is the row transform followed by the column transform. For
the inverse transform each result is then scaled by `(y + 32) >>> 6`. The
forward and Hadamard matrices are not normalised. As in H.264, scaling is
left to quantisation.

Each 1D transform is two columns of four adders (a butterfly).
`tx_1d` lays the three butterflies over one another:

```
s0 = X0 + (INV ? X2   : X3)            A = s0 + s1
s1 = X1 + (INV ? X3/2 : X2)            B = s0 - s1
s2 = (INV ? X1/2 : X1) - (INV ? X3 : X2)
s3 = X0 - (INV ? X2   : X3)            C = (FWD ? 2*s3 : s3) + s2
                                       D = s3 - (FWD ? 2*s2 : s2)
FWD, HAD: Y = (A, C, B, D)             INV: Y = (A, C, D, B)
```

Every transform uses eight additions. Switching transforms only changes
multiplexer settings, shift wiring (×2, ×½) and, for the inverse, the order
of the last two outputs.

## Dedicated processors and their widths (`tx_ded4x4`)

A processor built for a single transform uses fixed butterflies. These are
`tx_fwd_1d`, `tx_inv_1d` and `tx_had_1d`, the three butterflies that
`tx_1d` lays over one another. Each stage is sized to the values it can actually hold:

| instance | input | 1st-pass adders | array / 2nd-pass input | output |
|----------|-------|-----------------|------------------------|--------|
| forward  | 9 (residual −256…255) | 10 | 12 | 15 |
| inverse  | 15 (dequantised coefficients) | 16 | 16 | 16, after `(x+32)>>6` |
| Hadamard | 14 (quantised luma DC) | 15 | 16 | 18 |

The forward widths are exact for every 9-bit input. The Hadamard widths are
exact for every 14-bit input: each pass adds two bits. The inverse relies on
H.264's guarantee that conforming streams fit 16-bit arithmetic.

The dedicated forward processor holds 195 flip-flop bits, against 259 for the
multiple-function processor. The whole difference is its 12-bit array. The
inverse and Hadamard processors need 16-bit arrays too. None of the dedicated
1D units has operand multiplexers.

The controller, transpose array, latency and handshake are the same as in the
multiple-function processor. The only difference is that the transform select
is tied to the `KIND` parameter. The ports are `de`, `din` (4×`IN_W`), `oe`
and `dout` (4×`OUT_W`).

## The transpose register array

The part that takes the most care is the corner turn between the row pass and
the column pass. It is done without RAM, by 16 registers (`tx_cell`). Each
register has a three-input multiplexer in front of it: hold, take from the
element above, or take from the element to the right. The whole array moves
in one direction at a time.

* **Shift down.** The row from the first 1D unit enters the top row, with
  element j in column j. The bottom row leaves the array.
* **Shift left.** The row enters the right column, with element j in row 3−j.
  The left column leaves the array.

Suppose block A is written with four downward shifts. Its row 0 is then in
the bottom row and its column 0 is in the left column. The direction now flips
to left. For the next four cycles, the left column leaves and holds A's
columns 0, 1, 2 and 3 in turn. Meanwhile block B's rows enter at the right.
After those four cycles, B's row k sits in array column k, so the bottom row
holds B's column 0. The direction flips back to down and B drains out
column by column while block C enters at the top.

Four output multiplexers pick the bottom row (element i = `rg[3][i]`) or the
left column (element i = `rg[3-i][0]`) for the second 1D unit. Only one
direction is ever in use, so the same array both receives one block and
delivers the previous one.

## Control: counter, stalls and the de/mode chain (`tx_ctrl`)

* A 2-bit counter counts accepted rows (`de = 1`). On every fourth row the
  array direction flips.
* `de = 0` while the counter is non-zero means the source paused inside a
  block. That cycle is a **NOP**: every array cell, the chain and the counter
  hold, and `oe` is low. Each such pause costs exactly one cycle.
* `de = 0` with the counter at zero is a gap between blocks. The array keeps
  shifting in its current direction, so the last block still drains out and
  invalid rows follow it in. The output therefore never waits for the next
  block.
* Beside the array runs a four-stage chain. Each stage is a register with a
  hold multiplexer, and it carries each row's `de` and `mode` (`tx_pkg::tag_t`).
  The last stage gives `oe` and the transform select for the second 1D unit and
  the output stage. Because of this, the two 1D units can run different
  transforms in the same cycle when consecutive blocks differ.

## Interface and timing (`tx_mt4x4`; `tx_ded4x4` alike)

| port       | dir | width | meaning                                              |
|------------|-----|-------|------------------------------------------------------|
| `clk`      | in  | 1     | rising-edge clock                                    |
| `rst_n`    | in  | 1     | synchronous, active-low reset of the control state   |
| `de`       | in  | 1     | `din` holds a valid row                              |
| `mode`     | in  | 2     | `XF_FWD`=0, `XF_INV`=1, `XF_HAD`=2; fixed within a block |
| `din`      | in  | 64    | row samples, sample i in bits `[16*i +: 16]`          |
| `oe`       | out | 1     | `dout` holds a valid result column                   |
| `out_mode` | out | 2     | transform applied to `dout`                          |
| `dout`     | out | 64    | result column, sample i = row i of that column       |

* **Latency.** A row accepted in cycle t gives an output column with `oe` in
  cycle t+4, plus one cycle for each NOP in between. `dout` is combinational
  from the array registers, through the second 1D unit and the rounding stage.
  Register `dout` outside the processor if a registered output is needed.
* **Throughput.** Four samples per cycle, in and out. At an 80 MHz clock that
  is 320 M samples/s. This is enough for 1080p30 4:2:0 video, about
  187 M samples/s for the forward and the inverse transform together.
* **Ordering.** The k-th output of a block is column k of the result. This
  is the transpose of the usual row order.
* Data registers are not reset. Only `oe` tells which outputs are valid.
* An assertion in `tx_ctrl` fires if `mode` changes inside a block.

## Number ranges

Every adder and register is 16 bits wide and wraps. The ranges that stay
exact are:

* **Forward.** 9-bit residuals (−256…255) give at most 15-bit results. This is
  always exact.
* **Inverse.** Each pass can grow the magnitude by up to 3.5×. Conforming H.264
  streams are guaranteed to fit 16-bit arithmetic. Arbitrary 15-bit inputs can
  wrap. Coefficients in −2048…2047 are always exact. The `+32` of the rounding
  stage is formed in 17 bits, so it never wraps.
* **Hadamard.** The DC inputs of a 16×16-intra macroblock can reach 14 bits,
  and a full 2D Hadamard adds 4 bits. In the multiple-function processor,
  full-range inputs can therefore produce results that wrap at 16 bits.
  Inputs in −2048…2047 are exact. The dedicated Hadamard processor has an
  18-bit output and is exact over the full 14-bit range. Widening
  `tx_pkg::TX_W` removes the limit in the multiple-function processor, at the
  cost of area.

## What is specified and what was chosen here

These parts follow the architecture: two single-cycle 1D units around a 4×4
transpose register array with hold/down/right multiplexers; the counter that
flips direction every four valid rows; the NOP rule (counter ≠ 0 and
`de` = 0); the four-deep de chain giving `oe`; the transform select carried
along the same chain; the 16-bit widths; the 64-bit interface; the four-cycle
latency; and the bypassable `(x+32)>>6` output stage.

These are this design's own choices:

* the operand multiplexers and output swap in `tx_1d` (multiplexers are used
  instead of adder/subtractors);
* which vector element goes to which cell of the array;
* the `xform_t` encoding (code 3 acts as forward);
* the 64-bit packing;
* `oe` held low during a NOP;
* the synchronous reset;
* the combinational output stage;
* the 17-bit rounding sum.

Not included:

* the 2×2 chroma DC transform of H.264;
* quantisation.

For the dedicated processors, three widths are this design's choice: the
inverse array and output (16 bits), the inverse intermediate stage, and the
Hadamard output (18 bits).

## Files

| file | contents |
|------|----------|
| `rtl/tx_pkg.sv` | `TX_W`, `xform_t`, `tag_t` |
| `rtl/tx_1d.sv` | reconfigurable 1D transform (combinational) |
| `rtl/tx_cell.sv` | one transpose register element |
| `rtl/tx_transpose.sv` | 4×4 array and output multiplexers |
| `rtl/tx_ctrl.sv` | counter, NOP, de/mode chain, assertion |
| `rtl/tx_round.sv` | inverse output stage with bypass |
| `rtl/tx_mt4x4.sv` | multiple-function processor |
| `rtl/tx_fwd_1d.sv`, `rtl/tx_inv_1d.sv`, `rtl/tx_had_1d.sv` | dedicated 1D units, widths as parameters |
| `rtl/tx_ded4x4.sv` | dedicated processor (`KIND`, `IN_W`, `ARR_W`, `OUT_W`) |
| `rtl/tx_h264_top.sv` | top level: all four processors, ports prefixed `mt_`, `fwd_`, `inv_`, `had_` |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_tx_ded_1d.sv` | testbench for the three dedicated 1D units |
| `tb/tb_tx_agent.sv` | reusable driver and scoreboard for one processor |

Each testbench computes its expected values itself, from the matrices above,
and prints `TB_RESULT checks=N failures=M`.

`tb_tx_h264_top` runs all four processors at once, each under its own
`tb_tx_agent`. `tb_tx_ded4x4` does the same for the three dedicated
configurations. `tb_tx_mt4x4` runs the multiple-function processor at its
default size and covers:

* a directed all-ones block;
* 16 blocks back to back, checking 64 result columns in 64 consecutive
  cycles;
* 300 random blocks of all three transforms, with stalls and idle gaps.

For every output, `tb_tx_mt4x4` checks the data, `out_mode` and the
four-cycle latency. It also fails if any of these never happened: a stall, a
drain across a gap, readout in each direction, different transforms in the
two 1D units at once, and the rounding stage used and bypassed.

`tb_tx_mb_intra16` runs one 16×16-intra luma macroblock through the
processor.

* **Encoder side.** It sends 16 forward blocks. It then builds the DC block
  from their outputs and sends it through the Hadamard transform. This takes
  72 cycles from the first row to the last column.
* **Decoder side.** It sends the Hadamard of a DC block, followed at once by
  16 inverse blocks. This takes 71 cycles.

The testbench checks both cycle counts as well as the data. Quantisation is
outside the processor and is left out of this test.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/tx_pkg.sv rtl/tx_1d.sv \
  rtl/tx_cell.sv rtl/tx_transpose.sv rtl/tx_ctrl.sv rtl/tx_round.sv \
  rtl/tx_mt4x4.sv tb/tb_tx_mt4x4.sv --top-module tb_tx_mt4x4
./obj_dir/Vtb_tx_mt4x4
```

To let Verilator find the other files by module name, use `-y rtl -y tb`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/tx_pkg.sv \
  tb/tb_tx_h264_top.sv --top-module tb_tx_h264_top
```

Lint a module with
`verilator --lint-only -Wall -y rtl rtl/tx_pkg.sv rtl/<module>.sv`.
