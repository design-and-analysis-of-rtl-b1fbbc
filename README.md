# Approximate 16 x 16 Wallace tree multiplier with 4:2 compressors and a Kogge-Stone adder

This is an unsigned 16 x 16 bit multiplier. It gives up a little accuracy to
save area and keep the adder tree shallow. It works in three parts. AND gates
form the 16 partial product rows. A Wallace tree of *approximate* 4:2
compressors, full adders and half adders reduces the rows to two. A 32-bit
Kogge-Stone parallel prefix adder then adds those two rows into the product.

The approximate compressor is a little smaller than an exact one and has no
carry chain between columns. Its cost is accuracy: in 2 of its 16 input
combinations it counts one too few. As a result the product is never larger
than A*B. Some operand pairs give the exact product, and the rest give a
slightly smaller one (measured figures below).

The whole design is combinational. It has no clock and no registers, and
`sum` follows `A` and `B` after the logic delay.

```
 A[15:0] B[15:0]
    |       |
 +--v-------v--+   16 rows, row j = (A & {16{B[j]}}) << j
 |   pp_gen    |
 +------+------+
        | 16 x 32-bit rows
 +------v---------------------------------------------+
 | wallace_reduce                                     |
 |   stage 0: 16 -> 8 rows   (52 cmp, 8 FA, 8 HA)     |
 |   stage 1:  8 -> 4 rows   (26 cmp, 4 FA, 12 HA)    |
 |   stage 2:  4 -> 2 rows   (12 cmp, 4 FA, 12 HA)    |
 +------+-----------------+---------------------------+
        | row_s (sums)    | row_c (carries)
 +------v-----------------v------+
 | kogge_stone_adder, 32 bits    |   98 black + 31 grey cells, 5 levels
 +--------------+----------------+
                v
            sum[31:0]
```
("cmp" means an approximate 4:2 compressor.)

## The approximate 4:2 compressor

An exact 4:2 compressor adds four bits of equal weight plus a carry-in from
the column below. It produces a sum bit, a carry bit and a carry-out to the
column above. The approximate version (`approx_compressor_4_2`) drops the
carry-in and carry-out. It maps four bits x1..x4 onto just a sum bit `s`
(weight 1) and a carry bit `c` (weight 2):

```
w1  = x1 | x2
w2' = (x1 & x2) | x3
w3  = x4
{c, s} = full_adder(w1, w2', w3)
```

The sum of `x1 | x2` and `x1 & x2` is exactly `x1 + x2`. Folding `x1 & x2`
into `x3` with an OR is the only approximation. It loses one unit when
x1 = x2 = x3 = 1, so the output is 2 instead of 3, or 3 instead of 4. Those
are the only two wrong cases out of 16, and both err downwards by exactly 1.
Two consequences follow:

* the multiplier's result is always `<= A*B`;
* which input a row is wired to matters. The compressor is wrong only when
  its *first three* inputs are all 1.

## The reduction tree (`wallace_reduce`, schedule in `wtm_pkg`)

The tree works on rows of 2N-bit words. In each stage it cuts the rows into
groups of four, in order: rows 0-3, rows 4-7, and so on. Each column of a
group is handled according to how many *live* bits it holds there:

| live bits in the column | cell                        | outputs                        |
|-------------------------|-----------------------------|--------------------------------|
| 4                       | approximate 4:2 compressor  | sum -> column c, carry -> c+1  |
| 3                       | full adder                  | sum -> column c, carry -> c+1  |
| 2                       | half adder                  | sum -> column c, carry -> c+1  |
| 1                       | wire                        | sum row, column c              |

Each group of four (or three) rows therefore leaves two rows: a sum row and
a carry row shifted up by one column. A group of only one or two rows passes
through unchanged. Stages repeat until two rows are left. For 16 rows this
takes three stages: 16 -> 8 -> 4 -> 2.

A bit is *live* if it can ever be non-zero:

* partial product row j covers columns j..j+N-1;
* after a stage, a sum bit is live where its column had at least one live
  bit;
* a carry bit is live where the column below it had at least two.

`wtm_pkg::live_mask` works these masks out as elaboration-time constants.
The generate loops in `wallace_reduce` use them to place exactly one cell, or
a wire, or a constant 0, per column. No logic is spent on the empty corners
of the partial product parallelogram.

Inside a compressor, the live rows of a group are connected in order as
x1..x4. The compressor is wrong only on its first three inputs. So an error
in stage 0 needs three consecutive multiplier bits B[4g], B[4g+1] and
B[4g+2] to be 1, together with the matching bits of A. Later stages err when
the sum and carry rows coming from two groups line up in the same way.

The carry out of the top column is always 0 and is dropped. The rows never
sum to 2^(2N) or more, because each cell is either exact or rounds down.

## The Kogge-Stone adder (`kogge_stone_adder`)

This is a standard parallel prefix adder with no carry-in, working in three
steps:

1. **Pre-computation.** `P_i = a_i ^ b_i` and `G_i = a_i & b_i`.
2. **Prefix computation.** There are `log2(WIDTH)` levels with spans 1, 2,
   4, and so on. At span d, each bit i >= d merges its group with the group
   that ends at bit i-d:
   * where the merged group reaches bit 0 (d <= i < 2d), a **grey cell**
     (`grey_cell`) forms only the group generate. That is the final carry
     out of bit i;
   * above that, a **black cell** (`black_cell`) also forms the group
     propagate;
   * bits below d pass through.
3. **Post-computation.** `S_i = P_i ^ C_(i-1)`, with `C_(-1) = 0`.

At 16 bits this places 34 black and 15 grey cells. At the multiplier's
32 bits it places 98 black and 31 grey cells in 5 levels. The module
exports these counts as the localparams `N_BLACK` and `N_GREY`.

## Accuracy (measured in simulation)

| configuration | operands                  | inexact products | mean relative error | worst relative error |
|---------------|---------------------------|------------------|---------------------|----------------------|
| 16 x 16       | 20000 random pairs        | about 85 %       | 1.1 % (over non-zero products) | 21.6 % |
| 8 x 8         | all 65536 pairs           | 17718 (27 %)     | 0.90 % (over all pairs)        | 21.9 % |

The worst cases are small products, where a single unit lost in a middle
column is a large fraction. Some operand pairs give the exact product, for
example 41088 x 43273 = 1778001024.

## Where this design makes its own choices

The overall structure comes from the reference architecture: AND-gate partial
products, reduction with FA, HA and 4:2 compressors, and a Kogge-Stone final
adder. So do the compressor's internal gates, the P/G/sum equations, the port
names `A`, `B`, `sum` and the 16-bit size. The following are choices made
here:

* **Reduction schedule.** The reference names the cells but not how they
  are arranged. The groups-of-four schedule, the live-bit rule and the
  row-to-input order are this design's.
* **Where the approximation is used.** The approximate compressor is used in
  every column with four live bits, including the most significant ones.
  An exact-compressor variant, or a mixed one with exact cells in the upper
  columns, is not provided. Using exact cells in the upper columns would cut
  the error a great deal.
* **Number format and timing.** Operands are unsigned. There are no pipeline
  registers.
* **Final adder width.** The final adder is 2N bits wide, with no carry-in.
  Its carry-out is unused.

## Files

| file | contents |
|------|----------|
| `rtl/wallace_mult_42_ksa.sv` | top: `A`, `B` -> `sum`, parameter `N` (default 16) |
| `rtl/pp_gen.sv` | partial products (AND array) |
| `rtl/wallace_reduce.sv` | reduction tree |
| `rtl/wtm_pkg.sv` | constant functions for the tree schedule (rows per stage, live masks) |
| `rtl/approx_compressor_4_2.sv` | approximate 4:2 compressor |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | counters |
| `rtl/kogge_stone_adder.sv` | Kogge-Stone adder, parameter `WIDTH` (default 32) |
| `rtl/black_cell.sv`, `rtl/grey_cell.sv` | prefix cells |
| `tb/wtm_ref_pkg.sv` | bit-matrix reference model of the approximate product, used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_wtm8_exhaustive.sv` | the multiplier at N = 8, all operand pairs |

The reference model in `tb/wtm_ref_pkg.sv` is written independently of the
RTL. It counts live bits per column of a plain bit matrix, applies the "one
less when the first three of four are 1" rule, and adds up the final rows as
integers.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and exits. For
example, to run the full 16-bit test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/wtm_pkg.sv tb/wtm_ref_pkg.sv tb/tb_wallace_mult_42_ksa.sv \
    --top-module tb_wallace_mult_42_ksa -Mdir obj -o sim
./obj/sim
```

Swap in another `tb_*.sv` file and its module name to run the other tests.

`tb_wallace_mult_42_ksa` checks the product of 41088 x 43273 and 20000
random pairs against the reference model. It also checks that three things
each happen at least once:

* an inexact product;
* an exact product;
* a final addition whose carry travels 8 or more bit positions.

It finishes in about a second.

## Changing it

* **Operand width.** `N` may be set anywhere from 2 to 64. The tree schedule
  and the adder width follow `N` automatically. The 64 limit comes from
  `wtm_pkg::MAX_W`.
* **Adder width.** `kogge_stone_adder` works for any `WIDTH >= 2`.
* **Cell choice per column.** To try another cell arrangement, for example
  exact compressors above some column, edit the `CNT == 4` branch in
  `wallace_reduce`. Then update the `cnt == 4` rule in `tb/wtm_ref_pkg.sv`
  to match.
