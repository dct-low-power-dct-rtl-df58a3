# Low-power 8x8 DCT with repetition-skipping computation sharing multipliers

Neighbouring pixels of an image are usually alike, so the 8-bit operands that a
DCT multiplier sees one after another often share their upper four bits, and in
flat areas their lower four bits too. This design exploits that. Every
multiplier is a *computation sharing multiplier* (CSHM) that works on 4-bit
groups of the operand. Each group gets a comparator and a small register. When
a group repeats, the stored partial product is reused instead of being formed
again. The result is bit-exact. Only the work, and so the switching activity,
goes down.

The RTL follows the architecture described in "Low-Power DCT Architecture by
Minimizing Switching Activity" (스위칭 액티비티를 최소화한 저전력 DCT 아키텍처
구현). That article gives the multiplier: its precomputer bank, select units,
comparator, skipper and final adder. It does not give the DCT datapath around
the multiplier. The row-column organisation, number formats, stream orders and
timing described below are this implementation's own.

## The computation sharing multiplier

To multiply a coefficient `C` by `X`, cut `X` into 4-bit groups. Any non-zero
4-bit group equals an odd number times a power of two:
`0100 = 1·2²` and `1110 = 7·2¹`. So one group times `C` is one of eight odd
multiples `1C, 3C, …, 15C`, shifted left by 0 to 3 places. The multiplier is
built from these parts:

* **Precomputer bank** (`precomputer_bank`, `precomputer`): computes the eight
  odd multiples once per coefficient, using only shifts and adds. For example,
  `11C = 8C + 2C + C`. Each precomputer reduces its shifted copies of `C` with
  one row of full adders per extra term (carry-save form). A carry select adder
  (`carry_select_adder`, 4-bit blocks) then adds the last two words.
* **Select unit** (`select_unit`), one per group:
  * A *shifter* finds the trailing-zero count `s` and the odd part of the group.
  * An 8:1 *mux* picks that odd multiple from the bank.
  * An *ishifter* shifts it left by `s`.
  * A zero group gives zero.
* **Final adder** (`final_adder`): adds the group results, each weighted by
  `2^(4n)`.

Worked example: `X = 1110_0100`.

| group | value | odd part | mux select | shift | result |
|-------|-------|----------|------------|-------|--------|
| upper | `1110` | `111` (7) | `011` | 1 | `14C` |
| lower | `0100` | `1` | `000` | 2 | `4C` |

Final adder: `14C·16 + 4C = 228C`.

Several select units can share one precomputer bank when they all use the same
coefficient. That sharing is what "computation sharing" refers to.

## Skipping repeated groups

`cshm_multiplier` adds two parts to each group's lane:

* **`nibble_comparator`** keeps the group of the previous accepted operand and
  flags when the current group equals it.
* **`skipper`** holds the last partial product that the select unit produced. A
  2:1 mux forwards either that stored value (skip) or the fresh one. The
  register loads only on operands that are accepted and not skipped.

A group skips when all three of these hold:

1. The comparator reports a repeat.
2. The group is enabled by the `SKIP_EN` parameter.
3. The coefficient has not changed since the previous operand (`same_coef` is
   high).

The third condition matters. The stored partial product is `group·C` for the
*old* coefficient. Reusing it after `C` changes would give a wrong product. The
article's multiplier has a fixed coefficient, so this input is this design's
addition. The DCT passes drive it low on the first operand after every
coefficient change.

`SKIP_EN` chooses the variant:

* Both groups may skip: `2'b11` for the 8-bit multiplier. This is the default
  and the variant the article reports as lowest power.
* Only the upper group may skip: `2'b10`.

The outputs are identical either way. Only the skip counts differ.

In this RTL a skipped lane's select unit still sees its input. That input is
unchanged (the group repeats), so the lane does not toggle. The saving comes
from the skipped product words staying put through the mux and final adder. It
also comes from the surrounding datapath not recomputing work it already did.
Power itself is not modelled here. The article measured about 7–8 % lower power
than a plain CSHM DCT, on a 0.25 µm layout. Treat that as its figure, not a
property of this RTL.

The multiplier registers its product, so `p`, `skip` and `out_valid` appear one
clock after the operand.

## How the 8x8 DCT uses the multipliers

Skipping only pays off if a multiplier keeps the same coefficient while similar
operands stream past it. The DCT is arranged for that.

* **Input order.** Pixels arrive in *column order* within a block:
  `x(0,0), x(1,0), …, x(7,0), x(0,1), …`.
* **Row pass** (`dct_1d_pass`, 2 groups, unsigned operands):
  * There are eight multipliers, one per frequency `k`.
  * While column `j` streams in, multiplier `k` holds `c(k,j)`. It therefore
    meets eight vertically neighbouring pixels with one coefficient.
  * Products go to 64 accumulators `acc[k][i]`. The first column of a block
    clears them.
  * At the end of the block, `acc[k][i]` is the 1-D DCT of row `i`.
* **Transpose buffer** (`block_buffer`): copies the 64 rounded row results in
  one clock. It sends them out as `Z(0,0..7), Z(1,0..7), …`, which is column
  order for the second pass.
* **Column pass** (`dct_1d_pass`): the same structure. Its operands are signed
  12-bit values, so it uses three 4-bit groups. Its final adder subtracts
  `C·2¹²` when the operand's sign bit is set.
* **Output buffer** (`block_buffer`): streams `Y(u,v)` in column order:
  `Y(0,0), Y(1,0), …, Y(7,0), Y(0,1), …`.

Coefficients come from `cshm_pkg::dct_coef`. They are 8-bit signed values
scaled by 256:

`c(k,n) = round(256 · a(k) · cos((2n+1)kπ/16))`, where `a(0) = 1/(2√2)` and
`a(k>0) = 1/2`

The magnitudes are 91, 126, 118, 106, 91, 71, 49 and 25. Each pass rounds its
sum to the nearest integer after dividing by 256: `(acc + 128) >>> 8`.

* Row-pass results fit in 12 signed bits: |Z| ≤ 1004.
* Outputs are 16-bit signed. The DC term of a block is `sum(x)/8`, which is
  2040 for an all-255 block.

The result is the orthonormal 2-D DCT with 8-bit coefficients. Its accuracy is
limited by those coefficients. It is not meant to meet the IEEE 1180 accuracy
limits.

## Interface and timing of `dct2d_cshm`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `in_valid`, `pixel` | in | 1, 8 | one unsigned pixel per valid clock, 64 per block, column order |
| `out_valid`, `coef_out` | out | 1, 16 | 64 consecutive signed coefficients per block, column order |
| `out_first` | out | 1 | high with `Y(0,0)` |
| `skip1_valid`, `skip1[8]` | out | 1, 2 each | row-pass skip flags per multiplier (`[1]` upper group, `[0]` lower) |
| `skip2_valid`, `skip2[8]` | out | 1, 3 each | column-pass skip flags |

* **Throughput:** one pixel per clock. Blocks may follow each other with no
  gap, and `in_valid` may drop at any time.
* **No back-pressure:** the output cannot be stalled.
* **Latency:** `Y(0,0)` of a block is on `coef_out` in the cycle that starts
  68 clock edges after the edge that accepted the block's last pixel. This
  holds when the column pass is free, which is always the case when blocks
  arrive at most one pixel per clock.
* **Buffer rule:** `block_buffer` asserts that it is never reloaded while a
  block is still streaming out.

Parameters:

* `SKIP_EN1`: the row-pass skip groups, `2'b11` (default) or `2'b10`.
* `SKIP_EN2`: the column-pass skip groups, default `3'b111`.

## Departures from the source and open points

* **DCT organisation.** The article states only that the multiplier serves an
  8x8 DCT. Everything in the section above is this design's own choice: the
  ordering, accumulators, transpose buffer, signed second pass, coefficient
  precision and rounding.
* **Comparator.** It is written as a register plus a 4-bit equality test. The
  article's gate-level drawing of the comparator is not reproduced gate for
  gate.
* **Precomputers.** The article draws only the `11C` precomputer. The other odd
  multiples use the same scheme with the number of full-adder rows their term
  count needs.
* **Coefficient changes.** `same_coef` and the one-clock product register are
  additions.
* **Power.** No power or timing figures are reproduced. They need a cell
  library and layout.
* **Baseline.** The article compares against a conventional CSHM DCT without
  skipping. That baseline is not included.
* **Skip counting.** Every operand is compared with the previous operand of the
  same multiplier. Only operands that share a coefficient can skip. The first
  pixel of each block column therefore never skips, so at most 7/8 of row-pass
  operands can skip.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_precomputer`, `tb_precomputer_bank`, `tb_select_unit`: exhaustive over
  all 8-bit coefficients and all nibbles.
* `tb_final_adder`: random operands, unsigned and signed.
* `tb_nibble_comparator`, `tb_skipper`: random streams against a model.
* `tb_cshm_multiplier`: three multiplier variants on one stimulus. The stimulus
  mixes smooth runs, random runs, coefficient changes and idle cycles. The
  testbench checks every product and the expected skip flags.
* `tb_dct_1d_pass`: 40 blocks through both pass variants against a cosine
  reference, plus the timing of `done`.
* `tb_block_buffer`: order, contiguity, back-to-back loads, and that the buffer
  ignores `din` after the load.
* `tb_dct2d_cshm`: end to end at default parameters. It runs 48 blocks (flat,
  gradient, edge and texture; back to back and with idle cycles) and checks
  every coefficient, the output order and the 68-clock latency. It also checks
  that upper skips, lower skips, column-pass skips, idle cycles and
  back-to-back blocks all occur.
* `tb_dct2d_images`: three QCIF-sized synthetic frames (176×144, 396 blocks)
  through the default DCT and the upper-only variant. It checks every
  coefficient and checks that both variants agree. It prints skip ratios, for
  example:

  | frame | upper-group skips | lower-group skips |
  |-------|-------------------|-------------------|
  | smooth | 85.7 % | 59.0 % |
  | mixed | 67.9 % | 11.5 % |
  | textured | 5.5 % | 5.6 % |

  The frames are synthetic, so these ratios only show the trend (smoother
  means more skipping). They are not results for natural images.

## Simulating

Use Verilator 5 with timing support. From the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl rtl/cshm_pkg.sv tb/tb_dct2d_cshm.sv \
          --top-module tb_dct2d_cshm -o sim && ./obj_dir/sim
```

Replace `tb_dct2d_cshm` with any other testbench name. `-Irtl` lets Verilator
find each module in `rtl/<module>.sv`. The package has to be listed first.

## Files

| file | content |
|------|---------|
| `rtl/cshm_pkg.sv` | widths, coefficient table function |
| `rtl/dct2d_cshm.sv` | top: row pass, transpose buffer, column pass, output buffer |
| `rtl/dct_1d_pass.sv` | eight multipliers, coefficient ROM, accumulators |
| `rtl/block_buffer.sv` | 64-entry buffer with transposed readout |
| `rtl/cshm_multiplier.sv` | CSHM with per-group skipping |
| `rtl/precomputer_bank.sv`, `rtl/precomputer.sv`, `rtl/carry_select_adder.sv` | odd multiples of C |
| `rtl/select_unit.sv` | shifter, 8:1 mux, ishifter |
| `rtl/nibble_comparator.sv`, `rtl/skipper.sv` | repeat detection and reuse |
| `rtl/final_adder.sv` | group sum with signed-operand correction |
