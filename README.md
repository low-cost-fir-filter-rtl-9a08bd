# Low-cost FIR filter with a faithfully rounded truncated MCMA

A finite impulse response filter computes `y[n] = sum_i a_i * x[n-i]`. With
a 12-bit input and 10-bit coefficients the exact result is about 22 bits wide,
but the next stage usually wants far fewer. Computing all 22 bits and then
discarding the bottom ones wastes adders. This filter never builds the bits it
would throw away. All products go into **one** partial-product bit matrix.
The low bits whose removal cannot spoil the output are dropped from that
matrix before any addition. One constant row puts back the expected value of
what was dropped, plus the rounding half-LSB.

The output is *faithfully rounded*. It is the exact result rounded either
down or up, so the error stays below one output LSB. It is not always the
nearest value, and that freedom is what saves the hardware.

The structure is the direct form of a linear-phase filter. Only the 12-bit
input samples sit in registers. Symmetric taps are added before the products.
The multiple-constant multiplication/accumulation (MCMA) is one truncated,
pipelined carry-save sum.

```
 x[11:0] ─► R1 ─► R2 ─► R3 ─► R4 ─► R5 ─► R6 ─► R7 ─► R8 ─► R9      tap_delay_line
            │     │     │     │     │     │     │     │     │
            └──── pre-adders: R1+R9, R2+R8, R3+R7, R4+R6, R5 ──┘      sym_preadd
                        u0    u1    u2    u3   u4
 ┌───────────────────────────── mcmat ─────────────────────────────┐
 │ pp_matrix: 12 CSD rows of ±u_i·2^k, low bits removed, +1 bias row │
 │ csa_tree : 13 rows ─► 2 rows (3:2 carry-save, 5 levels)           │
 │ ══ pipeline register (sum row, carry row) ══                      │
 │ cpa_round: one 22-bit adder, keep bits [21:7]                     │
 │ ══ output register ══                                  ─► y[14:0] │
 └───────────────────────────────────────────────────────────────────┘
```

## Interface and timing

`fir_filter` has the ports `clk`, `reset`, `x[11:0]` and `y[14:0]`.
Samples and results are signed two's complement.

* One sample is taken on every rising edge of `clk`. There is no enable and
  no handshake.
* Take the rising edge that captures sample `x[n]`. With the default
  `PIPE = 1`, `y[n]` becomes visible right after the second rising edge
  after it. With `PIPE = 0` it appears after the first.
* `reset` is synchronous and active high. It clears every register, so `y`
  reads 0 until real samples have gone through.
* The output is `y[n] ≈ S[n] / 2^7`, with `S[n] = sum_{i=0}^{8} h_i · x[n-i]`
  and `h_i` the integer coefficients. It always holds that
  `|y·2^7 − S| < 2^7`.

The coefficients are 10-bit integers to be read as fractions of 2^9. The
output LSB is therefore 1/4 of an input LSB. That gives 13 integer bits and
2 fraction bits in `y`.

## Default sizes and coefficients

| parameter | default | origin |
|---|---|---|
| `X_W` input width | 12 | published design (port `x[11:0]`) |
| `OUT_W` output width | 15 | published design (port `y[14:0]`) |
| `C_W` coefficient width | 10 | published design |
| `TAPS` | 9 (order 8, 5 distinct coefficients) | published design (9 products, 5 truncated multipliers) |
| `COEF` | `'{-3, -7, 26, 136, 208}` | this design's choice |
| `LSB_POS` weight of the output LSB | 7 | this design's choice |
| `PIPE` | 1 | pipelining follows the published design; the cut position is this design's choice |

No coefficient values were published. The defaults are a 9-tap
Hamming-windowed low-pass with cut-off 0.2·fs. It is scaled to a DC gain of
512/512 and rounded, giving the full response `-3 -7 26 136 208 136 26 -7 -3`.
`LSB_POS = 7` is the smallest shift for which the worst-case output fits in
15 signed bits: `552 · 2048 / 128 = 8832 < 2^14`.

Other coefficients are set through the `COEF` parameter. `pp_matrix`, and
so every module above it, stops elaboration with an error in two cases: a
coefficient does not fit `C_W` bits, or `sum |COEF| · 2^X_W` could overflow
the output.

## One matrix for all products

Each coefficient is recoded in canonical signed-digit (CSD) form. Each
non-zero digit `d = ±1` at position `k` adds one row `d · u_i · 2^k`, where
`u_i` is a 13-bit pre-added sample. The defaults give 12 rows:

| coefficient | CSD | rows |
|---|---|---|
| −3 | −4 + 1 | 2 |
| −7 | −8 + 1 | 2 |
| 26 | 32 − 8 + 2 | 3 |
| 136 | 128 + 8 | 2 |
| 208 | 256 − 64 + 16 | 3 |

Sign extension is not built. A 13-bit two's-complement value is
`−s·2^12 + rest`, which is the same as `(1 − s)·2^12 + rest − 2^12`. So each
row stores its sign bit complemented and leaves the constant `−2^(12+k)`
behind.

A negative row stores `−u = ~u + 1`. Its sign bit is stored as is, its other
bits are complemented, and the leftover constant is `−2^(12+k) + 2^k`.

All leftover constants are summed, at elaboration, into one extra row, the
*bias row*. All arithmetic is modulo 2^22 (`W_ACC = LSB_POS + OUT_W`).
Columns 22 and above are dropped outright, because they cannot affect the
kept bits.

## Which bits may be removed

This is the part that needs care. Let the matrix hold the exact sum `S`. The
bias row adds an offset `E`, and the removed bits take away some amount `D`.
`D` lies between 0 and `DMAX`, the value of all removed bit positions. The
adder output is `S + E − D`. Dropping its low `L = LSB_POS` bits gives
`y = floor((S + E − D) / 2^L)`. Therefore:

```
y·2^L − S  ∈  ( E − DMAX − 2^L ,  E ]
```

This is strictly inside `(−2^L, 2^L)` exactly when `DMAX ≤ E ≤ 2^L − 1`.
That is the condition for faithful rounding.

Once all bits below some column `T` are gone, the bias row may only use
columns `T` and up, so it is a multiple of 2^T. `E` is the bias row minus
the exact sign-extension constants, so `E` can only be moved in steps of
2^T. A suitable `E` exists when `DMAX ≤ 2^L − 2^T`. `pp_matrix` computes the
removal from `COEF` while it is elaborated:

1. **Truncation.** `T` is the highest column, at most `L`, such that removing
   every bit below it satisfies `DMAX(T) ≤ 2^L − 2^T`.
2. **Deletion.** In column `T`, the bits of the first `Q` rows are removed
   too. `Q` is as large as the same bound still allows.
3. **Compensation and rounding.** The bias row is the multiple of 2^T nearest
   to the middle of `[bias + DMAX, bias + 2^L − 1]`. It carries the
   sign-extension constants, the expected value of the removed bits and the
   rounding half-LSB, all in one.

With the defaults: `T = 4`, `Q = 2`, `DMAX = 112 ≤ 128 − 16`. That removes
18 of the 156 partial-product bits, before any full adder is spent on them.
About one output in eight then differs from round-to-nearest, but never by a
whole LSB. The testbenches count both facts.

Only the arithmetic of the given coefficients is made faithful. The error of
quantizing ideal coefficients to 10 bits belongs to coefficient design, which
is done offline.

## Reduction, pipeline and final adder

`csa_tree` reduces the 13 rows to two with word-wide 3:2 compressors
(`csa3`). Each level turns every three rows into two, and up to two leftover
rows pass through. There are no carry chains inside the tree.

With `PIPE = 1` the sum and carry rows are registered. The long path then
splits into pre-adder + matrix + tree on one side and one 22-bit adder on the
other. This is the register cut the pipelined filter uses to shorten its
critical path.

`cpa_round` adds the two rows. It keeps bits [21:7] as `y`, which is
registered. No extra rounding logic is needed, because the rounding constant
is already in the matrix.

After synthesis the filter holds 166 flip-flops:

* 108 in the sample delay line (9 × 12);
* 43 in the pipeline (the carry row's LSB is always 0);
* 15 at the output.

## Where this RTL departs from the published design, or fills gaps

* **Register layout.** The input is registered before the first product, so
  all nine products use registered samples. This makes the delay line exactly
  the 108 flip-flops reported for the published filter. The pipeline and
  output registers come on top of that figure.
* **Pipeline cut.** The published pipelined diagram cuts a chain of
  separately added products, with one register on the delay line and one on
  the adder chain. Here the single matrix is cut between the carry-save tree
  and the final adder instead, with two registers (sum and carry).
* **Per-product truncated multipliers.** The published synthesis view shows
  five separate truncated multipliers followed by adders. The method itself
  favours one combined matrix, and that is what is built.
* **Partial-product rows, deletion rule and compensation constant.** These
  (CSD rows, then truncation to column `T` and deletion of `Q` bits, then the
  midpoint constant) are this design's concrete rules. They are proved above
  and checked by simulation.
* **Pre-adder width.** The pre-adders are 13 bits wide, so a symmetric pair
  never overflows.
* **Output scaling.** 15 output bits is the published port width; `LSB_POS`
  is chosen. For the case of only the 12 most significant bits of the 22-bit
  product, set `OUT_W = 12, LSB_POS = 10`. `tb_fir_filter_msb12` runs that
  configuration.
* **Not built.**
  * Anti-symmetric (`a_i = −a_{M−i}`) filters.
  * Odd-order filters (an even `TAPS` count) are accepted by the pre-adder
    and the top, but no testbench runs them.
  * The transposed-form filter, which the method is only compared against.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | default sizes, default coefficients, `csd_digit()` |
| `rtl/fir_filter.sv` | top: delay line, pre-adders, MCMA |
| `rtl/tap_delay_line.sv` | sample shift register |
| `rtl/sym_preadd.sv` | symmetric-pair adders |
| `rtl/mcmat.sv` | matrix, carry-save tree, pipeline register, final adder, output register |
| `rtl/pp_matrix.sv` | CSD rows, sign handling, truncation/deletion, bias row |
| `rtl/csa_tree.sv`, `rtl/csa3.sv` | carry-save reduction |
| `rtl/cpa_round.sv` | final adder and bit selection |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fir_filter_msb12` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends itself.
Verilator 5 example, from the top of the tree:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv \
          tb/tb_fir_filter.sv --top-module tb_fir_filter
./obj_dir/Vtb_fir_filter
```

For any other testbench, replace the file name and the top module. `-Irtl`
lets Verilator find each module in the file of the same name.

What the testbenches check:

* **`tb_fir_filter`** runs the filter at its defaults. It compares every
  output against an exact model, requiring faithful rounding and the
  two-edge latency. It also:
  * checks that an impulse of 128 returns the coefficients exactly;
  * drives full-scale inputs, including the coefficient-sign pattern that
    gives the largest output;
  * resets in the middle of random data.

  It fails if any of these mechanisms never happened: latency, rounding up,
  rounding down, a result that is not the nearest one, a reset, full scale.
* **`tb_pp_matrix`** checks faithful rounding straight from the matrix rows
  over 20 000 random and extreme inputs.
* **`tb_mcmat`** checks both `PIPE` settings and their latencies.
* **`tb_csa_tree`, `tb_cpa_round`, `tb_sym_preadd`, `tb_tap_delay_line`**
  check their units against plain arithmetic.

## Changing the design

* **Coefficients.** Pass `COEF` (the `NCOEF = (TAPS+1)/2` distinct values,
  centre tap last) to `fir_filter`. Rows, truncation column, deletions and
  bias row all follow automatically. Coefficients with few non-zero CSD digits
  are cheap, which is why coefficients quantized to different word lengths
  cost only what they use. Update the `H` table in the top-level testbenches
  to match.
* **Widths.** `X_W`, `C_W`, `OUT_W` and `LSB_POS` are free parameters, within
  the overflow check.
* **Pipeline.** `PIPE = 0` removes the pipeline register, giving one edge
  less latency and a longer combinational path.
