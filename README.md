# Approximate hybrid dividers: restoring array + logarithmic divider

An exact array divider is accurate but large and slow: an n-by-n/2 array has
on the order of n²/2 subtractor cells, and its critical path snakes through
every row. A Mitchell logarithmic divider (LD) is small and fast, but its
error is large. The hybrid divider in this repository uses each one where it
pays off. The most significant quotient bits come from a few rows of an exact
restoring array. The remaining bits come from an LD that works on the array's
remainder.

Two unsigned, purely combinational dividers are provided. By default both are
16-by-8: a 16-bit dividend, an 8-bit divisor and a 16-bit quotient.

* **AXHD** (approximate hybrid divider): a restoring array with full-width
  rows, followed by an LD.
* **E-AXHD** (eliminated AXHD): the same division. Its array rows are
  narrowed by truncating the divisor. The quotient matches the AXHD bit for
  bit, with fewer cells and a shorter path.

## The split at the replacement depth H

Write the dividend as `x = X1·2^H + X2`, where `X1 = x[N-1:H]` and
`X2 = x[H-1:0]`. If the array divides `X1` exactly, `X1 = Q1·y + R1` with
`R1 < y`. Then

```
x / y = Q1·2^H + (R1·2^H + X2) / y
```

`Q1` already holds the top `N-H` quotient bits, and nothing else can add to
them. The second term is the quotient of `T = R1 || X2` (concatenation) by
`y`, and it is below `2^H` because `T < y·2^H`. The LD approximates it, and
its low `H` bits are placed under `Q1`:

```
            x[N-1:H]            y                      x[H-1:0]
               |                |                          |
        +------v----------------v------+                   |
        | restoring array, N-H rows    |                   |
        | (M cells per row; E-AXHD:    |                   |
        |  N-H+1 cells, truncated y)   |                   |
        +------+-----------------+-----+                   |
            Q1 |              R1 |                         |
               |                 +------> T = R1 || X2 <---+
               |                              |        y
               |                      +-------v--------v--+
               |                      | logarithmic divider|
               |                      +---------+----------+
               |                                | low H bits = Q2
               +-----------> q = Q1 || Q2 <-----+
```

Only the LD contributes error, so H sets the trade-off. `H = 0` gives an exact
array divider and `H = N` a plain LD. The depth is a parameter from 0 to N.
The default is `H = 12`, a point where the hybrid is small yet its error has
nearly reached its final level. `T` always fits in N bits. When `H < N-M` it
is `M+H` bits. When `H > N-M`, `R1 <= X1 < 2^(N-H)`, so the upper bits of
`R1` are zero.

| signal | meaning                   | width (default) |
|--------|---------------------------|-----------------|
| x      | dividend                  | N (16)          |
| y      | divisor                   | M (8)           |
| X1, Q1 | array dividend / quotient | N-H (4)         |
| X2, Q2 | low dividend / LD bits    | H (12)          |
| R1     | array remainder           | M, or N-H+1 in the E-AXHD |
| T      | LD dividend               | N (16)          |
| q      | quotient                  | N (16)          |

## The logarithmic divider

This part is the hardest to follow. It uses Mitchell's approximation
`log2(1+m) ≈ m` for `0 <= m < 1`. An operand `a = 2^k (1+m)` is represented by
the fixed-point word `k.m`. Here `k` is the position of the leading one, and
`m` is the bits below it, left aligned as a fraction. The LD is built from
four blocks:

1. **`lod`** finds `k` for both operands (4 bits for the dividend, 3 for the
   divisor).
2. **`blc`** packs `{k, m}`. The 16-bit dividend gives a 19-bit word
   (4 + 15) and the 8-bit divisor a 10-bit word (3 + 7).
3. **`log_subtractor`** subtracts the two words in one ripple chain of
   one-bit subtractor cells. The divisor fraction is padded with zeros to
   line it up with the dividend's.
4. **`lbc`** shifts `1.m` left by `k` and drops the fraction. The result is
   truncated, not rounded.

Because integer and fraction are subtracted as one word, a fraction borrow
lowers the exponent by one:

```
m1 >= m2 :  q = 2^(k1-k2)   · (1 + m1 - m2)
m1 <  m2 :  q = 2^(k1-k2-1) · (2 + m1 - m2)
```

A negative difference (the borrow out of the top cell) means `T < y` and
gives 0. Worked example at `H = 14`: `x = 43382`, `y = 84`. The array sees
`X1 = 10₂ < 84`, so `Q1 = 0` and `R1 = 10₂`. `T = x = 43382` has `k1 = 15`
and `y` has `k2 = 6`. The fraction difference is `m1 - m2 = 374/32768 >= 0`,
so `q = 2^9 · (1 + 374/32768) = 517.8`, which truncates to **517**. The exact
quotient is 516. The testbenches check this case.

## The restoring array

`restoring_array_divider` has one row per dividend bit, so an `XW`-bit
dividend gives an `XW`-bit quotient. With a row for every bit the array cannot
overflow. Row i appends dividend bit `x[XW-1-i]` to the partial remainder
from the row above, which gives a (YW+1)-bit trial dividend `D`. Its YW low
bits go through a ripple of `exdcr` cells that subtract the divisor.

The quotient bit is

```
q_i = D[YW]  OR  NOT borrow_out
```

The first row's `D[YW]` is 0. The same `q_i` then selects, in every cell of
the row, either the difference or the unchanged minuend. That selection is
the "restoring" step. An `exdcr` is an `exsc` full subtractor
(`d = x^y^bin`, `bout = ~(x^y)&bin | ~x&y`) plus that 2-to-1 selection. The
borrow does not depend on `q`, so feeding `q` back across the row forms no
loop. The remainder is `YW` bits, because it is always below the divisor.

## The eliminated variant (E-AXHD)

The array dividend `X1` has `N-H` bits. A divisor of `N-H+1` or more
significant bits therefore always gives `Q1 = 0` and `R1 = X1`. It does not
matter which such divisor it is, only that it is large. `divisor_truncator`
uses this with its own `lod` on `y`:

* **leading one at position `k >= W` (`W = N-H+1`):** pass on the `W` bits
  that start at the leading one. The value stays `>= 2^(W-1) > X1`.
  Example for `W = 5`: `10010010 → 10010`.
* **otherwise:** `y` fits in `W` bits, so pass on its low `W` bits
  unchanged. Example: `00000110 → 00110`.

The array then has `W` cells per row instead of `M`, and the result is
unchanged. The LD still uses the full divisor. For the 16-by-8 divider this
saves the following cells:

| H           | ≤9 | 10 | 11 | 12 | 13 | 14 | 15 |
|-------------|----|----|----|----|----|----|----|
| cells saved | 0  | 6  | 10 | 12 | 12 | 10 | 6  |

When `N-H+1 >= M` nothing is saved, and the E-AXHD builds the same circuit as
the AXHD.

## Special operands

Neither zero operand has a logarithm. This design makes two choices for them:

* `y = 0` returns an all-ones quotient from every part. The array does this
  anyway: every trial subtraction succeeds.
* A zero LD dividend gives 0.

The dividers do not produce a remainder.

## Timing

Every module is combinational, with no clock and no reset. The delay is
`N-H` array rows (each a borrow ripple plus an OR gate), then the LD: the LODs
and converters, a 19-bit ripple subtraction and a shifter. At `H = 12` the
exact part is 4 rows. Register the inputs and outputs in the surrounding
design as the timing budget requires.

## Accuracy measured on this RTL

From `tb_error_metrics`. The 8-by-4 case is exhaustive. The 16-by-8 case
uses all dividends against 32 divisors spread over 1..255. MRED counts pairs
with a zero exact quotient as 0. NMED is the mean error divided by 2^n − 1.

| 8-by-4 H | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| MRED % | 0 | 0.52 | 1.25 | 2.15 | 3.05 | 3.41 | 3.51 | 3.51 |
| MAE    | 0 | 1 | 1 | 2 | 3 | 6 | 11 | 11 |

| 16-by-8 H | 2 | 4 | 6 | 8 | 10 | 12 | 14 | 16 |
|---|---|---|---|---|---|---|---|---|
| NMED (1e-6) | 0.62 | 4.2 | 17 | 64 | 168 | 251 | 283 | 283 |
| MRED % | 0.05 | 0.29 | 0.89 | 2.28 | 3.60 | 3.88 | 3.91 | 3.91 |
| MAE    | 1 | 2 | 6 | 22 | 88 | 323 | 399 | 399 |

Compared with the error figures published for this architecture, the trends
agree: zero error at depth 1 of the 8-by-4 divider, error growing with H, and
little change once H passes n/2. The absolute MRED and MAE here are larger,
by roughly a factor of two in MRED. Three possible causes have not been
resolved: truncation in the antilogarithm, how the borrow of the fraction
subtraction is treated, and the operand sets used.

`tb_pixel_division` divides `64 × pixel` by a second image's pixel on two
generated 64×64 scenes (change detection and background removal). It reports
the PSNR against exact division. Depth 1 is lossless. The PSNR falls as H
grows and then stays fixed from about depth 8 on. There every quotient is
below 2^H, and the hybrid behaves like a plain LD.

## Where this RTL makes its own choices

* **Fraction borrow.** The k.m subtraction is one word, so a fraction borrow
  lowers the exponent (the Mitchell form above). A closed-form description
  that always uses `2^(k1-k2)(1+m1-m2)` would differ when `m1 < m2`. It was
  not followed because it makes the 8-by-4 divider inexact at depth 1.
* **Zero operands** are handled as described above.
* **Remainder width.** The array remainder is M bits (or W bits), not the
  full dividend width. It is always below the divisor.
* **Tie at `k = W`.** The truncator treats a leading one exactly at `k = W`
  as "large". Either choice is exact there.
* **Separate LODs.** The E-AXHD has separate LODs for truncation and for the
  LD, as in its block diagram. Synthesis may share them.
* **Both dividers side by side.** The top, `hybrid_divider_top`, drives both
  from the same operands. Keep the output you need; synthesis removes the
  other.
* **Not reproduced:** gate-level power, delay and area figures. They depend
  on a specific 45 nm library.

## Modules

```
hybrid_divider_top          N, M, H
├── axhd                    N, M, H
│   ├── restoring_array_divider (XW=N-H, YW=M) ── exdcr ── exsc
│   └── log_divider (XW=N, YW=M)
│       ├── lod ×2, blc ×2
│       ├── log_subtractor ── exsc
│       └── lbc
└── eaxhd                   N, M, H
    ├── divisor_truncator (M, W=N-H+1) ── lod
    ├── restoring_array_divider (XW=N-H, YW=W)
    └── log_divider
```

`axhd_pkg` holds the default sizes and width helpers. `tb/axhd_ref_pkg.sv`
holds behavioural reference models: integer division plus Mitchell division
in 32-bit fixed point. All testbenches compare against them.

Other configurations are parameter overrides:

* 8-by-4: `N=8, M=4`.
* 16-by-32 (a wide divisor, such as a softmax denominator): `M=32`.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=… failures=…`.

```
verilator --binary --timing -Irtl -Itb --top-module tb_hybrid_divider_top \
    rtl/axhd_pkg.sv tb/axhd_ref_pkg.sv tb/tb_hybrid_divider_top.sv
./obj_dir/Vtb_hybrid_divider_top
```

`tb_hybrid_divider_top` runs the default 16-by-8, depth-12 top. It checks
both outputs against the model and against each other. It also fails if any
of these mechanisms never occurred:

* a nonzero array quotient
* a zero or below-divisor LD dividend
* a fraction borrow
* both truncation cases
* an approximation error
* divide by zero

The other testbenches:

* one per block, named `tb_<module>`;
* `tb_error_metrics`, the accuracy tables above;
* `tb_pixel_division`, the PSNR figures;
* `tb_divider_16by32`, the 16-by-32 configuration;
* `tb_eaxhd_cells`, the E-AXHD row widths against the cells-saved table.

Each runs in seconds.
