# Symmetric-stacking counters and a 128 x 128 Vedic Wallace multiplier

A multiplier spends most of its delay and power adding partial products.
Column compression does this by counting: the bits of one weight go into
a counter, and the counter puts out their number as a few bits of increasing
weight. A counter built from full adders has chains of XOR gates on its
critical path. This design counts differently. It first **stacks** the input
bits, so that all the ones sit together as a thermometer code. It then reads
the binary count off the stacks with AND/OR logic. The resulting 6:3 and 7:3
counters have no XOR gate on the path to their carry outputs.

On top of these counters sit two multipliers:

* `cbw_mult`: an N x N **counter-based Wallace (CBW)** multiplier, 8 x 8 by
  default. It compresses the partial-product columns mainly with 7:3 counters.
* `vedic_wallace_mult`: the top level, a **128 x 128 multiplier**. It uses the
  Vedic "vertically and crosswise" (Urdhva Tiryakbhyam) split, level by
  level, down to 256 of those 8 x 8 CBW multipliers.

Everything is unsigned and purely combinational: there is no clock, no
register and no reset anywhere in `rtl/`.

## Hierarchy

```
vedic_wallace_mult        N=128: 256 leaf multipliers + 85 combine adders
├── cbw_mult  (x256)      8x8 counter-based Wallace multiplier
│   └── cbw_counter       K-input column counter, K = 2..7
│       ├── counter73     7:3 stacking counter ──┐
│       ├── counter63     6:3 (also 5:3, 4:3) ───┴── stacker6 ── stacker3 (x4)
│       ├── counter32     3:2 counter (full adder) ── stacker3
│       └── (half adder inline for 2:2)
└── vedic_combine (x85)   adds four half-size products: 3:2 row + adder
    └── counter32
cbw_pkg                   constant functions that plan the CBW tree
```

## Bit stacking

**`stacker3`** turns three bits into a three-bit stack:

* `y[0] = x0 | x1 | x2` (at least one is set)
* `y[1] = maj(x0, x1, x2)` (at least two are set)
* `y[2] = x0 & x1 & x2` (all three are set)

**`stacker6`** joins two such stacks symmetrically:

1. Stack `x[2:0]` into `h` and `x[5:3]` into `i`.
2. Write `h` reversed, then `i`: `h2 h1 h0 i0 i1 i2`. The ones of both stacks
   now form one unbroken run, ending at the h/i boundary on one side and
   starting there on the other.
3. Combine bits that are three places apart:
   ```
   j = {h0|i2, h1|i1, h2|i0}        k = {h0&i2, h1&i1, h2&i0}
   ```
   A pair ORs and ANDs the same two bits, so `|j| + |k|` equals the input count.
   A run of length L has exactly `max(0, L-3)` pairs with both bits set. So
   `j` fills up completely before any bit of `k` is set.
4. Restack `j` and `k` with two more `stacker3` cells. The output `y` is
   `{stack(k), stack(j)}`, and `y[n-1]` is set exactly when at least `n`
   inputs are set.

Example: the input has three ones in the low group and one in the high group
(`h = 111`, `i = 001`). The reversed row is `1 1 1 1 0 0`. That gives
`j = 111` and `k = 001`, which restack to `y = 001111`.

`stacker6` also outputs `h`, `i`, `j` and `k`, because the counters work from
them.

## The counters

**6:3 (`counter63`)** uses only `h`, `i` and `k`. It skips the last
restacking layer:

| output | logic | meaning |
|---|---|---|
| `S` | `He ^ Ie`, where `He = ~h0 \| (h1 & ~h2)` and `Ie` is the same on `i` | odd count. A group of three has even parity when it holds 0 or 2 ones |
| `C2` | `k0 \| k1 \| k2` | count >= 4 |
| `C1` | `(h1 \| i1 \| h0&i0) & ~C2 \| h2&i2` | count is 2, 3 or 6 |

The one XOR sits on `S`, which is not the slowest output.

**7:3 (`counter73`)** computes two versions of `C1`/`C2` from the six-bit
stacks, and `x6` picks one with a multiplexer:

* For `x6 = 0` they are the 6:3 equations above.
* For `x6 = 1` they are `C2 = j0&j1&j2` (six-bit count >= 3) and
  `C1 = (h0|i0) & ~(j0&j1&j2) | h2&i1 | h1&i2` (six-bit count is 1, 2, 5 or 6).
* `S` is the 6:3 `S` XORed with `x6`.

**5:3 and 4:3** counters are `counter63` with the spare inputs tied to 0. The
**3:2** counter `counter32` is a full adder read off a `stacker3`:
carry = `y[1]`, sum = `y[0] & ~y[1] | y[2]`. The **2:2** counter is a half
adder. `cbw_counter #(K)` selects among them by the number of inputs `K`.

## The counter-based Wallace tree (`cbw_mult`)

This is the hardest part to follow, because the tree is planned while the
design is elaborated rather than written out by hand.

1. **Partial products.** Column `c` (weight 2^c) of stage 0 holds every
   `a[i] & b[c-i]`, so its height is `c+1` up to column `N-1` and then falls
   again.
2. **One reduction stage.** A column of height `h >= 2` gets:
   * `floor(h/7)` 7:3 counters on rows 0..6, 7..13, and so on;
   * then one counter for the remainder `r = h mod 7`: 6:3, 5:3, 4:3, 3:2 or
     2:2 for `r` = 6, 5, 4, 3 or 2.

   When `r = 1`, that last bit passes to the next stage unprocessed, as does a
   column with a single bit. Each counter keeps its `S` in column `c`, sends
   `C1` to column `c+1`, and sends `C2` (counters with four or more inputs
   only) to column `c+2`.
3. **Next-stage height.** Column `c` of the next stage holds, in this row
   order:
   * the sums of column `c`'s counters;
   * the `C1` outputs of column `c-1`;
   * the `C2` outputs of column `c-2`;
   * the bits passed on from column `c`.

   `cbw_pkg::run_schedule` repeats this until no column is taller than two.
   `cbw_mult` builds a table `PLAN[stage][column]` of heights once and derives
   every wire index from it.
4. **Final adder.** A `+` adds the two remaining rows. Carries that would land
   at or above weight 2^(2N) are dropped. They are always zero, because the
   product fits in 2N bits.

Resulting trees:

| size | stages | tallest column per stage | counters |
|---|---|---|---|
| 8 x 8 | 3 | 8, 4, 3, 2 | 3 7:3, 2 6:3, 2 5:3, 3 4:3, 11 3:2, 17 2:2 |
| 16 x 16 | 4 | 16, 8, 4, 3, 2 | 27 7:3, 12 6:3, 8 5:3, 7 4:3, 29 3:2, 47 2:2 |
| 128 x 128 (possible, not used) | 6 | 128, 56, 24, 11, 6, 3, 2 | |

The 16 -> 8 step matches the worked example of the method: two 7:3 counters
and one 2:2 counter per column of sixteen leave 3 + 3 + 2 = 8 rows.

Each stage's bits live in their own generate-block variable,
`g_lvl[s].bits[column][row]`. As a result no signal feeds back into itself,
which keeps simulators from reporting false combinational loops. Rows above a
column's height are tied to 0.

## Vedic levels (`vedic_combine`, `vedic_wallace_mult`)

With `a = {aH, aL}` and `b = {bH, bL}`:

```
a*b = aH*bH * 2^N + (aL*bH + aH*bL) * 2^(N/2) + aL*bL
```

`vedic_combine` places `{aH*bH, aL*bL}` in one row, since the two vertical
products do not overlap. The two crosswise products go in two more rows,
shifted by N/2. Only columns N/2 .. 3N/2-1 hold three bits. A single row of
`counter32` cells reduces those columns to two rows, and a `+` adds them.

`vedic_wallace_mult` unrolls the recursion with generate loops:

* Level 0 multiplies every pair of 8-bit blocks `a_i * b_j` with `cbw_mult`:
  16 x 16 = 256 products.
* Level `l` forms the `(8<<l)`-bit block products from four products of level
  `l-1`:
  ```
  prod[i][j] = combine(prod'[2i][2j], prod'[2i][2j+1], prod'[2i+1][2j], prod'[2i+1][2j+1])
  ```
* Four levels (16, 32, 64 and 128 bits) end in the single 256-bit product.

`N` must be `LEAF` times a power of two.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `vedic_wallace_mult` | `N` | 128 | operand width |
| `vedic_wallace_mult` | `LEAF` | 8 | width of the Wallace leaf multipliers |
| `cbw_mult` | `N` | 8 | any N up to 128 (limited by `cbw_pkg::MAX_COLS`) |
| `vedic_combine` | `N` | 128 | output is 2N bits |
| `cbw_counter` | `K` | 7 | 2..7 inputs |

After coarse synthesis, the 8 x 8 `cbw_mult` comes to about 550 word-level
cells. The full 128 x 128 top comes to about 163 000.

## How far it follows its source, and where it departs

Taken from the symmetric-stacking method:

* the three-bit stacker;
* the symmetric six-bit merge;
* the 6:3 and 7:3 counter equations;
* the CBW reduction rule: mostly 7:3 counters, other counters for the
  remainder, one unprocessed bit for a remainder of one, and the next-stage
  row count;
* the sizes: 8 x 8 Wallace and 128 x 128 Vedic Wallace.

This design's own choices:

* Two-bit columns are also reduced with 2:2 counters. If they were passed on
  unchanged, height-3 columns would ripple and an 8 x 8 tree would need 8
  stages instead of 3.
* The order in which counter outputs are stacked into the next stage.
* 5:3 and 4:3 counters are `counter63` with inputs tied to zero. Dedicated
  smaller circuits would be faster.
* The 3:2 counter is built on a stacker.
* Final adders are `+`. A synthesis tool chooses the adder architecture.
* The Vedic hierarchy halves all the way down to the 8 x 8 leaf, and each
  level is added by one 3:2 row and an adder.
* No pipelining and unsigned operands only. Speed, power and area figures are
  not reproduced: this is RTL only.

## Testbenches

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog that counts a failure
if the run hangs.

| testbench | what it checks |
|---|---|
| `tb_stacker3` | all 8 inputs |
| `tb_stacker6` | all 64 inputs: `y`, `h`, `i`, `|j|+|k|`, and "`j` fills first" |
| `tb_counter63`, `tb_counter73`, `tb_counter32` | every input; every count value occurs |
| `tb_cbw_counter` | all six counter sizes, exhaustively |
| `tb_cbw_mult` | 8 x 8 on all 65 536 operand pairs; 16 x 16 on 4 004 pairs; stage counts 3 and 4 |
| `tb_vedic_combine` | N = 128 with real sub-products and with random rows |
| `tb_vedic_wallace_mult` | the 128 x 128 top at its default parameters, on 3 524 operand pairs (corner, uniform, dense and sparse) |

`tb_vedic_wallace_mult` also counts events inside the first leaf and the top
adder, and fails if any of them never happens:

* the 7:3 counter selecting its `x6 = 1` version and its `x6 = 0` version;
* that counter counting seven;
* the 6:3 counter taking the `k` path (count >= 4);
* the 6:3 counter counting six;
* the top 3:2 row producing carries.

To simulate with Verilator (5.x), from the folder above `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_cbw_mult rtl/cbw_pkg.sv tb/tb_cbw_mult.sv
./obj_dir/Vtb_cbw_mult
```

Use the same command for the other testbenches, changing the top module and
file. The 128 x 128 testbench takes several minutes to compile, because the
design holds 256 multiplier trees, and a few seconds to run. To lint a module:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/cbw_pkg.sv rtl/<module>.sv
```

Remaining lint warnings are unused-bit reports: the `C2` output of counters
with three or fewer inputs, and the internal vectors of `stacker6` that a
counter does not read.
