# Table-driven reciprocal, square root and reciprocal square root

This is a combinational unit that takes one IEEE 754 single-precision operand `v`.
It returns `1/v`, `sqrt(v)` or `1/sqrt(v)`, chosen by a 2-bit function code.
It needs no iteration. The 24-bit significand is split in two:

* a short head **x**, made of the leading 9 fraction bits;
* a tail **y**, made of the remaining 14 bits.

The function is then evaluated as a second-order Taylor expansion around x:

    g(z) ~ g(x) + y*g'(x) + y^2*g''(x)/2          z = x + y,  0 <= y < 2^-9

Look-up ROMs indexed by x supply `g(x)`, `g'(x)` and `g''(x)/2`. A small ROM
supplies `y^2`. Two multipliers and two 32-bit adders form the sum. In parallel,
a separate exponent ROM produces the result exponent and handles the special
operands.

The architecture comes from a published design for off-the-shelf TTL parts
(flow-through ROMs, multipliers and adders). The block structure, the table
sizes, the split of the operand, the exponent treatment and the use of
truncation all follow it. The number formats inside the tables, the handling of
signs, the exact special-case rules and the output stage are this
implementation's own choices. They are marked as such below and in each file's
header.

## Datapath

```
 v[22:14] = x (9) ──┐
 fn (2), parity ────┴─ {fn,parity,x} (12) ─┬─ ROM 0  4K x 32  g(x)         ─────────────┐
                                           ├─ ROM 1  4K x 16  |g'(x)|   ─┐              adder 1 ─┐
 v[13:0]  = y (14) ────────────────────────┼─────────────────────────── MPY 14x16 ─────┘          │
                                           └─ ROM 2  4K x 8   |g''(x)/2| ─┐                       adder 2 ── fraction
 y[13:6] (8) ──────── ROM 3  256 x 8   y^2 ──────────────────────────── MPY 8x8 ──────────────────┘
 v[22:0] ── 23-bit zero compare ── fzero ─┐
 {fn, fzero, v[30:23]} (11) ───────────── exponent ROM 2K x 8 ───────────────────────────────────── exponent
 sign, exponent, fzero, fn ── control ── parity, term signs and scales, NaN, result sign ── output stage ── result
```

| module | part | size at the defaults |
|---|---|---|
| `taylor_rom0` | ROM 0, g(x) | 4096 x 32 |
| `taylor_rom1` | ROM 1, \|g'(x)\| | 4096 x 16 |
| `taylor_rom2` | ROM 2, \|g''(x)/2\| | 4096 x 8 |
| `square_rom` | ROM 3, y^2 | 256 x 8 |
| `exp_rom` | exponent ROM | 2048 x 8 |
| `zero_compare` | 23-bit compare with zero | — |
| `mpy` | multiplier, used twice (14x16 and 8x8) | — |
| `term_adder` | 32-bit adder/subtractor, used twice | — |
| `unary_ctrl` | parity line, term signs, table scale lines, NaN flag, result sign | — |
| `result_pack` | packs sign, exponent and fraction; forces NaN, zero and infinity | — |
| `unary_unit` | the top level | 247,808 ROM bits |
| `unary_pkg` | function codes, constants, table formulas, exponent map | — |

Function codes: `0` reciprocal, `1` square root, `2` reciprocal square root.
Code `3` is a spare area kept in every ROM for a future function. It currently
returns NaN.

## Keeping every function in [1, 2): areas, parity and the exponent ROM

This is the part that is easiest to get wrong. For `v = 2^k * z` with
`1 <= z < 2`, each result must again be a significand in [1, 2) times a power
of two. The tables therefore do not hold `1/z` or `sqrt(z)` directly. They hold
a scaled function g, and there is one scaled function per **area**. An area is
selected by the function code and by the **parity** line, which is 1 when the
unbiased exponent k is odd:

| function | k even (parity 0) | k odd (parity 1) | result exponent (biased, e = k + 127) |
|---|---|---|---|
| reciprocal | `2/z` in (1, 2] | same | `253 - e`, or `254 - e` if z = 1 |
| square root | `sqrt(z)` in [1, 1.414) | `sqrt(2z)` in [1.414, 2) | `(e+127)/2` (k even), `(e+126)/2` (k odd) |
| reciprocal square root | `2/sqrt(z)` in (1.414, 2] | `sqrt(2/z)` in (1, 1.414] | `126 - k/2`, or `127 - k/2` if z = 1 (k even); `127 - (k+1)/2` (k odd) |

The address of ROMs 0 to 2 is `{fn, parity, x}`. This gives 4 functions x 2
parities x 512 = 4K words.

Two functions reach exactly 2.0 at z = 1: the reciprocal, and the reciprocal
square root with k even. Their exponent is then one higher. The exponent ROM
therefore needs to know whether the fraction is zero, and that is what the
23-bit compare provides. The same flag separates zero and infinity from
denormals and NaNs.

The value 2.0 itself does not fit the Q1.31 word of ROM 0, so it is stored
modulo 2, as 0. The adders also work modulo 2^32. For z = 1 the fraction
therefore comes out as 0, which is correct. For z slightly above 1, the
subtraction of the first-order term wraps to `1.111...`, which is also the
correct fraction. This wrap-around replaces a 33rd bit and is exercised by the
testbenches.

For exponents 0 and 255, the parity line is forced to 0. A zero or infinite
operand then reads an area whose value at x = 1 has a zero fraction. The output
stage also clears the fraction whenever the exponent ROM returns 0 or 255, so
this forcing does not affect correctness.

## Number formats and alignment

All three Taylor terms are summed as unsigned Q1.31: 1 integer bit and 31
fraction bits.

| quantity | bits | weight of the LSB |
|---|---|---|
| ROM 0 word, g(x) | 32 | 2^-31 (Q1.31, modulo 2) |
| y | 14 | 2^-23 |
| ROM 1 word, \|g'(x)\| | 16 | 2^-15 (Q1.15) for 1/z and 1/sqrt; 2^-16 (Q0.16) for sqrt |
| y x ROM 1 | 30 | 2^-38 or 2^-39; shifted right 7 or 8 → 2^-31 |
| ROM 3 word, top 8 bits of (y[13:6])^2 | 8 | 2^-26 |
| ROM 2 word, \|g''(x)/2\| | 8 | 2^-7 (Q1.7) for 1/z; 2^-8 (Q0.8) for sqrt and 1/sqrt |
| ROM 2 x ROM 3 | 16 | 2^-33 or 2^-34; shifted right 2 or 3 → 2^-31 |
| result fraction | 23 | bits 30..8 of the final sum |

Every table word and every product is **truncated**, never rounded. This
follows the original design, which found that rounding did not lower the error
rate and would have cost hardware.

The ROMs hold magnitudes. The signs of the derivatives depend only on the
function, so the adders apply them:

* adder 1 subtracts the first-order term for the reciprocal and for the
  reciprocal square root;
* adder 2 subtracts the second-order term for the square root.

The original block diagram shows plain adders and does not say how the signs
are handled, so magnitudes plus add/subtract is this design's choice. It keeps
all 16 and 8 bits of ROMs 1 and 2 for precision.

### Table scale per function

A ROM 1 or ROM 2 word keeps an integer bit only for functions whose values
there reach 1 or more:

* ROM 1: the reciprocal, which reaches 2, and the reciprocal square root,
  which reaches 1.
* ROM 2: the reciprocal, which reaches 2.

Elsewhere the values stay below 1, and the word spends that bit on one more
fraction bit instead:

* ROM 1 of the square root, below 0.71;
* ROM 2 of both root functions, below 0.75.

The control block raises a **scale** line for those functions. The product is
then shifted one bit further right: a 2:1 select on each product. Saturation
at the largest code only ever hits the reciprocal at x = 1.

This scaling is this design's choice. It halves the square root's error rate,
and with it the measured rates match the published ones (see Accuracy). With a
uniform Q1.15 / Q1.7 format the square root had about 8.8 % LSB errors.

The alignment shifts are worked out from the parameters in `unary_unit`. When
the sizes change they stay correct, as long as `X_BITS >= 8`.

The ROM contents come from the closed form `g(z) = c * z^p` in `unary_pkg`,
with

* `c` in {1, sqrt(2), 2};
* `p` in {-1, 1/2, -1/2}.

Each table fills itself in an `initial` loop, in double precision, when the
simulation starts. An FPGA flow or a ROM generator can take the same loop. No
data files are needed.

## Special operands

| operand | 1/v | sqrt(v) | 1/sqrt(v) |
|---|---|---|---|
| +0 / -0 | +inf / -inf | +0 / -0 | +inf / -inf |
| +inf / -inf | +0 / -0 | +inf / NaN | +0 / NaN |
| negative, non-zero | normal | NaN | NaN |
| NaN or denormal | NaN | NaN | NaN |

Zero and infinity come from the exponent ROM. NaN is flagged by `unary_ctrl`,
and the output is then the quiet NaN `0x7FC00000`.

Reciprocals of operands with exponent field 253 or 254 would fall below the
normal range. These are flushed to signed zero, because denormals are not
produced. The results for -0 follow IEEE 754; the original design lists only
+0.

## Accuracy

Every result is within one unit in the last place (ulp) of the exact value
truncated to 24 bits. Most results are exact. The table below gives the **LSB
error rate**: the share of operands whose last bit differs from the truncated
exact value. It was measured over all 2^23 significands. "Positive" means the
result is one ulp too small.

| configuration | 1/z | sqrt (even / odd k) | 1/sqrt (even / odd k) |
|---|---|---|---|
| default: x 9 bits, ROM 2 8 bits, ROM 3 8 bits | 8.11 % (3.95 / 4.17) | 4.29 % (3.93 / 0.35) / 4.16 % | 8.89 % (0.75 / 8.15) / 8.79 % |
| ROM 2 7 bits (`ROM2_W=7`) | 9.16 % | 3.92 % (2.71 / 1.21) / 3.95 % | 8.06 % (1.30 / 6.75) / 7.97 % |
| x 10 bits, ROM 3 6 bits (`X_BITS=10, ROM3_W=6`) | 4.76 % (2.49 / 2.27) | 2.37 % / 2.27 % | 4.64 % (0.48 / 4.17) / 4.59 % |

The original study reports the following for the same three configurations
(k even, positive / negative in brackets):

| configuration | 1/z | sqrt | 1/sqrt |
|---|---|---|---|
| default | 7.8 % (2.8 / 5.0) | 4.4 % (4.1 / 0.3) | 8.3 % (1.0 / 7.3) |
| ROM 2 7 bits | — | 4.0 % (2.9 / 1.1) | 7.7 % (2.8 / 4.9) |
| x 10 bits | 4.6 % (2.2 / 2.4) | 2.2 % | 4.1 % (0.8 / 3.3) |

For the square root the match is close, down to the split between positive and
negative errors. The reciprocal and the reciprocal square root come within
about half a percentage point. The reciprocal square root leans further to
negative errors (result one ulp too large) than reported. The original work
does not give its word formats, so these remaining differences cannot be traced
further.

Dropping ROM 2's last bit moves the root functions' errors towards a more even
split between positive and negative, as reported. The 10-bit configuration
halves every rate, at twice the size of ROMs 0 to 2.

## Timing

There is no clock. The result depends combinationally on `v` and `fn`, as in
the original parts-based circuit: a ROM access, a multiply and two additions in
series. That circuit was specified at about 180 ns typical and 300 ns worst
case, with 35 ns ROMs, 50 ns multipliers and 45 ns adders. The critical path
here is the same: ROM 1 → 14x16 multiplier → two 32-bit adders. To pipeline
the unit, put registers after the ROMs and after the multipliers.

## Parameters of `unary_unit`

| parameter | default | meaning |
|---|---|---|
| `X_BITS` | 9 | fraction bits in x. ROMs 0–2 have 2^(X_BITS+3) words. y has 23 − X_BITS bits |
| `ROM1_W` | 16 | ROM 1 word width (1 integer bit, none for sqrt) |
| `ROM2_W` | 8 | ROM 2 word width (1 integer bit for 1/z, none for the roots) |
| `ROM3_IN` | 8 | number of leading y bits that address ROM 3 |
| `ROM3_W` | 8 | ROM 3 word width |

An `initial` check stops the elaboration if a combination would need a negative
alignment shift.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Build one with
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl rtl/unary_pkg.sv \
          tb/tb_unary_unit.sv --top-module tb_unary_unit
./obj_dir/Vtb_unary_unit
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`; the package is
named explicitly because it is imported, not instantiated.

| testbench | what it checks |
|---|---|
| `tb_unary_unit` | the top level at its default sizes, one operand per clock cycle. Exact results (1/2, sqrt 2, 1/sqrt 4, ...). Every special operand. 120,000 random operands within one ulp. LSB error rate below 10 %. Counts that each mechanism occurred: both parities, the modulo-2 wrap, exact powers of two, underflow flush, NaN, denormal, negative root, spare code |
| `tb_unary_sweep` | the exhaustive accuracy sweep above, for the three configurations side by side (about 10 s) |
| `tb_taylor_rom0/1/2` | every ROM word against the derivative written out by hand for each area |
| `tb_square_rom`, `tb_exp_rom` | every word. The exponent ROM is checked against a double-precision evaluation |
| `tb_unary_ctrl` | all 4096 input combinations against the IEEE class of the operand |
| `tb_mpy`, `tb_term_adder`, `tb_zero_compare`, `tb_result_pack` | corner and random operands against integer models |

## Departures from the original design, and open points

* **Omitted on purpose:** the residual ROM 4 for the third- and fourth-order
  terms. It appears only in the conceptual form of the architecture, and the
  original study found it useless at 24-bit accuracy.
* **Own choices:**
  * the table word formats, including the per-function scale;
  * magnitudes plus add/subtract;
  * the address bit order `{fn, parity, x}`;
  * taking ROM 3's input from the top 8 bits of y;
  * the parity rule for special exponents;
  * the result sign logic;
  * the quiet-NaN encoding;
  * NaN for the spare code;
  * flushing reciprocal underflow to zero;
  * clearing the fraction of zero and infinite results.
* **Where the sign comes from:** the original diagram does not show the result
  sign's path. Here it comes from `unary_ctrl`.
* **Accuracy:** the rates are within about half a percentage point of the
  published ones (see Accuracy). The reciprocal square root is slightly worse
  than reported.
* **Table contents are computed, not loaded.** A synthesis tool has to evaluate
  the `initial` loops, which use real arithmetic (`$sqrt`, `**`). Tools that
  cannot do this need the tables written out as data files from the same
  formulas.
