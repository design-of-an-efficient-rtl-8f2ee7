# 16×16 multiplier with approximate 15-4 compressors

This is an unsigned 16×16-bit multiplier for DSP datapaths that can tolerate
small arithmetic errors, such as image and video filtering. Its
partial-product tree is built around *15-4 compressors*. Each of these
counts the ones in a column slice of fifteen bits. Inside each 15-4
compressor sit two *5-3 compressors*, which are 5-input bit counters. Replace
those counters with cheaper, slightly wrong logic, and the whole multiplier
becomes an approximate multiplier. The saving lands in the middle columns of
the product, where it costs little precision.

The RTL builds five multipliers that share one structure:

| design | 5-3 counters inside the three approximate 15-4 compressors |
|--------|-------------------------------------------------------------|
| 0, accurate | exact counters everywhere; `p == a*b` |
| 1 | approximate 5-3 design 1 for both counters |
| 2 | approximate 5-3 design 2 for both counters |
| 3 | approximate 5-3 design 3 for both counters |
| 4 | design 1 for the carry counter, design 4 for the sum counter |

The top level, `mult15_4_top`, feeds the same operands to all five and
returns `p[0]` to `p[4]`. All of the logic is combinational. There is no
clock, reset or pipeline register.

## The 5-3 compressor and its four approximations

`compressor_5_3` takes five bits `x0..x4` and returns their count
`{o2,o1,o0}`. The exact version consists of two full adders drawn with
multiplexers:

```
c1 = (x0^x1) ? x2 : x0            carry of x0+x1+x2
p  = x0^x1^x2^x3
c2 = p ? x4 : x3                  carry of the second full adder
o0 = p^x4    o1 = c1^c2    o2 = c1&c2
```

Each approximate design swaps one or two outputs for simpler logic:

| design | change | wrong inputs (of 32) | error |
|--------|--------|----------------------|-------|
| 1 | `o2 = x3&x2`; `o0` is forced to `~(x3&x2)` for the patterns where that lowers the error, otherwise it is exact | 6 | +4 for input 12 (only x3, x2 set); ±3 for the other five |
| 2 | `o2 = x4&c1`, `o1 = x4^c1` | 8 | ±2 |
| 3 | `o1 = x4^c1` | 8 | ±2 |
| 4 | `o1 = x2^x3` | 12 | ±2 |

Here "input n" means the pattern `x4..x0` read as a binary number. The
`DESIGN` parameter, of enum type `mult_pkg::design_e`, selects the variant.

## The 15-4 compressor

`compressor_15_4` counts the ones among fifteen bits in three steps:

1. Five full adders each add a group of three inputs: `x[2:0]`, `x[5:3]`, …,
   `x[14:12]`.
2. The five sum bits, of weight 1, go to one 5-3 compressor, which gives
   `A`. The five carry bits, of weight 2, go to a second 5-3 compressor,
   which gives `B`.
3. A 4-bit parallel adder forms `o = A + 2·B`.

With exact counters `A + 2B` is at most 15. With approximate counters it can
exceed 15. The adder has no fifth output bit, so the count then wraps, which
turns a small positive error into a large negative one. An exhaustive run
over all 32,768 inputs shows how often this happens:

| 15-4 design | wrong outputs | mean error distance | wrapped outputs |
|-------------|---------------|---------------------|-----------------|
| accurate | 0 | 0 | 0 |
| 1 | 11,544 | 1.68 | 310 |
| 2 | 13,568 | 1.18 | 0 |
| 3 | 13,568 | 1.46 | 43 |
| 4 | 15,408 | 1.66 | 510 |

Full adder *k* (inputs `x[3k+2:3k]`) drives input *k* of both 5-3
compressors. This wiring is a choice of this implementation. It only matters
for the approximate designs, because their error depends on which input
carries which bit.

## The multiplier and its reduction tree

`multiplier_16x16` is a chain of three blocks:

1. `pp_generator` forms the 256 partial products `a[j] & b[i]` and groups
   them by weight into 32 columns. Column *c* holds its products in the
   order of rising `i`. It has *c*+1 bits for *c* < 16 and 31−*c* bits above
   that.
2. `reduction_tree` compresses the columns into two 32-bit rows.
3. A 32-bit ripple-carry `parallel_adder` adds the two rows.

### Stage 0: the 15-4 compressors

Six 15-4 compressors sit on columns 12 to 17, counted from 0. Each one takes
the first fifteen bits of its column:

* Column 12 has 13 bits, so its compressor gets two zero inputs.
* Columns 13 and 17 have 14 bits, so each gets one zero input.
* Column 15 has 16 bits. Its last bit, `a[0]&b[15]`, bypasses the
  compressor.

Output bit *k* of the compressor on column *c* has weight 2^(c+k), so it
moves on in column *c+k*.

Only the three lowest compressors, on columns 12, 13 and 14, use the selected
`DESIGN`. The three upper ones are always exact. This keeps the approximation
out of the high-order columns, where an error would cost more.

### The rest of the tree: a schedule computed at elaboration

The remaining columns, and every column in later stages, are reduced with
three kinds of exact cells:

* 4-2 compressors (`compressor_4_2`): two chained full adders. The `cout`
  does not depend on `cin`.
* Full adders.
* Half adders.

The placement of these cells is not written out by hand. Instead, the
constant function `mult_pkg::sched_stage(s, cmp_lsb)` computes it at
elaboration, in a Dadda-style pass:

* Each stage *s* has a target height: 8, 4, 2 and 2 bits per column.
* Columns are visited from bit 0 upward. The pass keeps adding cells to a
  column until the column's output fits the target. That output includes
  the carries arriving from the column below. Cells are tried in this order:
  * a 4-2 compressor, if the column is at least three bits over the target;
  * a full adder, if it is at least two bits over;
  * a half adder otherwise.
* The `cout` of the *k*-th 4-2 compressor in a column feeds the `cin` of the
  *k*-th 4-2 compressor one column up in the same stage. A `cout` that finds
  no compressor above it continues as an ordinary bit.

In the next stage, the bits of each column are stored in this order:

1. outputs of the 15-4 compressors (stage 0 only);
2. sums of the 4-2 compressors, then of the full adders, then of the half
   adders;
3. bits that passed through unreduced;
4. carries from the column below;
5. unused `cout`s from the column below.

`reduction_tree` reads the schedule through `localparam`s inside nested
`generate` loops and instantiates the cells. For every column it checks at
elaboration that the bits it wires into the next stage match the height
that the schedule predicts. If they do not, elaboration stops with
`$error`.

The tree has four stages in total:

| stage | 15-4 | 4-2 | full adders | half adders | tallest column after |
|-------|------|-----|-------------|-------------|----------------------|
| 0 | 6 | 15 | 2 | 4 | 8 |
| 1 | – | 26 | 5 | 5 | 5 |
| 2 | – | 25 | 1 | 2 | 3 |
| 3 | – | – | 5 | 14 | 2 |

A 4-2 compressor sends two bits, the carry and the `cout`, into the next
column. Because of this the targets cannot always be met, and stage 3 is a
small clean-up stage. The layout follows the original plan, in which stage 0
holds the 15-4 compressors and two further stages use 4-2 compressors and
adders. The fourth stage is this implementation's addition.

To move the compressors, change `CMP_LSB_COL`; the schedule and the wiring
follow automatically. Columns 11 and 12 are the placements that are tested. To change the
tree's shape, edit `stage_target` or `NST` in `mult_pkg`. The elaboration
checks will report any schedule that does not close.

### Accuracy of the multipliers

Over 200,000 uniformly random operand pairs, the products compare with
`a*b` as follows. The error rates also count about 2,000 directed pairs.

| design | products ≠ a·b | mean relative error |
|--------|----------------|---------------------|
| accurate | 0 % | 0 |
| 1 | ≈ 41 % | ≈ 1.8·10⁻⁴ |
| 2 | ≈ 65 % | ≈ 2.1·10⁻⁴ |
| 3 | ≈ 65 % | ≈ 2.1·10⁻⁴ |
| 4 | ≈ 75 % | ≈ 3.7·10⁻⁴ |

An approximate product equals `a*b` plus the error of each approximate
compressor times 2^12, 2^13 and 2^14. The result wraps modulo 2^32.

## Choices this implementation makes

These points are not settled by the original description. They are chosen
here:

* **Cell placement in the tree.** Apart from the six 15-4 compressors and
  the rule that only columns 12–14 are approximate, the placement of cells
  (including exact cells in stage 0) is this implementation's own.
* **Fourth reduction stage.** See the previous section.
* **Column numbering.** The text puts the first 15-4 compressor on "the
  thirteenth column", whose thirteen partial products make it column 12
  counted from 0; that is the default. A simulation trace published with
  the original design prints the six compressor outputs as one 24-bit
  value, and those values are exactly what compressors on columns 11 to 16
  produce. Setting `CMP_LSB_COL = 11` gives that variant. The multiplier
  testbench checks that this variant reproduces the trace's values. For the
  accurate multiplier the two placements give the same product; for the
  approximate ones they move the error by one bit position.
* **Adders.** Both parallel adders are ripple-carry.
* **Operand format.** Operands are unsigned. There is no Booth recoding.
* **Overflow.** The wrap of the 4-bit adder inside the 15-4 compressor and
  the wrap of the 32-bit product are kept as described above.

## Files

| file | contents |
|------|----------|
| `rtl/mult_pkg.sv` | `design_e`, the sizes, the reduction schedule functions |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | 1-bit adders |
| `rtl/compressor_4_2.sv` | exact 4-2 compressor |
| `rtl/compressor_5_3.sv` | 5-bit counter, accurate and designs 1–4 |
| `rtl/compressor_15_4.sv` | 15-bit counter |
| `rtl/parallel_adder.sv` | ripple-carry adder, `WIDTH` bits |
| `rtl/pp_generator.sv` | partial products grouped by column |
| `rtl/reduction_tree.sv` | scheduled compressor tree |
| `rtl/multiplier_16x16.sv` | one multiplier |
| `rtl/mult15_4_top.sv` | the five multipliers side by side |
| `tb/tb_ref_pkg.sv` | reference models used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example, to build and run the
end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mult_pkg.sv tb/tb_ref_pkg.sv tb/tb_mult15_4_top.sv \
    --top-module tb_mult15_4_top
./obj_dir/Vtb_mult15_4_top
```

To run another test, replace `tb_mult15_4_top` with the name of another
testbench. The testbenches compare the RTL against models that share none
of its gate equations:

* The 5-3 compressor is modelled as the true count plus a per-pattern error
  table.
* The 15-4 compressor is modelled with plain arithmetic.
* The multiplier is modelled as `a*b` plus the weighted compressor errors.

The tests cover the following:

* The 5-3 and 15-4 compressors are tested exhaustively in all designs.
* The multiplier is tested with corner cases and random operands in all
  designs and at both column placements. This includes the four reference
  operand pairs 65535×65535, 5×5, 273×337 and 10×500.
* The end-to-end test runs at the default sizes. It checks that each
  approximate design produces both exact and inexact products. It also
  checks that the 15-4 adder wraps at least once, and that a zero-padded
  compressor column is at some point completely filled with ones.
