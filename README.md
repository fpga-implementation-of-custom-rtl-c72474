# Compact floating-point divider and binary logarithm

Two small, fully pipelined floating-point units for FPGAs. Both reduce their
hard part to one cheap thing: a degree-2 polynomial of the mantissa fraction,
split into four segments. The divider computes `x / y` as `x * (1/y)`, with
the reciprocal of the divisor mantissa taken from the polynomial. The
logarithm computes `log2(x)` as the unbiased exponent plus a polynomial for
`log2(1.m)`, then converts that fixed-point sum back to floating point.
There is no iteration and no rounding, and each unit needs only a handful
of multipliers. Each unit accepts one operation per clock. The divider
answers 6 cycles later and the logarithm 7 cycles later.

The exponent width `E`, the mantissa width `M` and the fractional width of
every polynomial coefficient are parameters. The defaults are IEEE-754
single precision (`E=8, M=23`) with coefficient widths chosen for an
accuracy target of about 2^-16 in the polynomial. Half precision (`E=5,
M=10`) and wider "uniform" coefficient widths are reached by overriding
parameters.

The units trade exactness for size. Results are truncated, not rounded.
They are good to roughly 11–12 bits at single precision, which is the
accuracy of the four-decimal polynomial coefficients. Special values are
not handled (see "What is not handled").

## Number format

A value is `{sign, exponent[E-1:0], fraction[M-1:0]}` and means
`(-1)^sign * 1.fraction * 2^(exponent - bias)`, with `bias = 2^(E-1) - 1`.
This is the IEEE-754 layout. Every encoding, including exponent 0 and
all-ones, is read as a normal number.

## The polynomial unit (`poly_approx`, `coeff_rom`)

Both functions are tabulated over the fraction `m` in `[0, 1)`:

| segment (`1.m`) | 1/(1+m): c0 | c1 | c2 | log2(1+m): c0 | c1 | c2 |
|---|---|---|---|---|---|---|
| [1.00, 1.25) | 0.7099 | -0.9736 | 0.9995 | -0.573  | 1.4288 | 0.0003 |
| [1.25, 1.50) | 0.3874 | -0.8222 | 0.9811 | -0.3829 | 1.3381 | 0.0115 |
| [1.50, 1.75) | 0.2342 | -0.6729 | 0.9444 | -0.2739 | 1.2312 | 0.0379 |
| [1.75, 2.00) | 0.1523 | -0.5517 | 0.8995 | -0.2056 | 1.1299 | 0.0756 |

The two leading fraction bits select the row. The polynomial is evaluated
on the whole fraction `m`, not on the offset inside the segment. These
coefficients only fit in that form: for example 1/(1+m) at m = 0.25 is
0.7099·0.0625 − 0.9736·0.25 + 0.9995 ≈ 0.8005.

Evaluation is Horner form in two multiply-adds:

```
y = trunc_FB1(c0 * m) + c1
z = trunc_FB2(y  * m) + c2
```

`FB0`, `FB1` and `FB2` are the fractional widths of `c0`, `c1` and `c2`. The
coefficients are stored as `floor(c * 2^FBk)`. Each product is truncated to
the fractional width of the coefficient it is added to. So these three
numbers alone set the multiplier sizes and the error, and they are the knobs
a bit-width optimisation turns. With truncation every signal contributes at
most one unit in its last place. For `y = c0*m + c1` the error bound is

```
(1 + 2^-M) * 2^-FB0 + |c0| * 2^-M + 2^-FB1  <  target
```

Choosing different widths per coefficient ("multiple fractional
bit-widths") instead of `M` for all ("uniform") meets the same target with
smaller multipliers. The widths used here came from such a search:

| mantissa M | divider FB0/FB1/FB2 | logarithm FB0/FB1/FB2 |
|---|---|---|
| 10 | 10 / 9 / 9   | 10 / 10 / 8  |
| 13 | 12 / 12 / 12 | 13 / 13 / 11 |
| 16 | 15 / 16 / 15 | 16 / 16 / 14 |
| 19 | 19 / 18 / 18 | 19 / 19 / 17 |
| 23 | 17 / 18 / 19 (default) | 19 / 17 / 18 (default) |

The ROM contents are computed at elaboration from the real-valued table in
`fp_pkg`, so any width works without a table file. Each word is signed with
two integer bits. `y` and `z` carry three integer bits.

Pipeline (3 cycles): ROM read → `y` → `z`.

## Divider (`fp_div`)

```
sign  = sx XOR sy
r     = poly_1/(1+m)(my)           in (0.5, 1]
Q     = 1.mx * 2r                  in [1, 4), exponent ex - ey + bias - 1
if Q >= 2: fraction = bits of Q/2, exponent + 1
else:      fraction = bits of Q
```

The reciprocal is below one, so the datapath treats it as `2r` with the
exponent lowered by one. The single normalisation step is then "shift right
by one and add one to the exponent when the product reaches 2". One
multiplexer makes that choice. The fraction is truncated.

One guard is this design's own addition: `r` is clamped to `[0.5, 1]`
before the product. At the default widths the polynomial never leaves that
range. At the half-precision widths (9 fractional bits on `c1` and `c2`),
truncation can put `r` a few ulps below 0.5 near `m = 1`. Without the clamp,
`1.mx * r` could then fall below 0.5, and the result would come out a
factor of two off.

| cycle | work |
|---|---|
| 1 | operands registered, sign XOR |
| 2–4 | reciprocal polynomial; exponent difference formed alongside |
| 5 | clamp, `(M+1) x (FB2+1)` mantissa product registered |
| 6 | normalisation multiplexer, packing, output register |

## Logarithm (`fp_log2`, `fix2float`, `msb_encoder`)

```
log2(x) = (ex - bias) + log2(1.m)        for sign = 0
        = NaN                            for sign = 1
```

The polynomial gives `log2(1.m)` in `[0, 1)`. The unbiased exponent is
shifted left by `M` bits and the polynomial result (aligned to `M`
fractional bits) is added. This gives a signed fixed-point number with `M`
fractional bits and enough integer bits for any exponent. The result is
negative exactly when `ex < bias`. That comparison drives the multiplexer
that picks the magnitude (the sum or its negation) and the output sign.

`fix2float` turns sign and magnitude into floating point. A priority encoder
finds the leading one at bit `p`. The exponent is `p - M + bias`, and the
`M` bits below the leading one are the fraction; lower bits are dropped.
Take x = 6.75 = 1.6875·2^2 as an example. log2(x) = 2 + 0.7549 = 2.7549,
which in fixed point is `10.1100000101…`. The leading one is the 2^1 bit,
so the exponent is 1 + bias and the fraction starts `0110000010…`.

A negative input gives NaN (exponent all ones, fraction MSB set, sign 0).
A sum of exactly zero gives +0.0. That happens only at small `M`, where
the first segment's 0.0003 constant truncates to zero, so that log2(1.0)
is exact.

| cycle | work |
|---|---|
| 1 | input registered |
| 2–4 | log2(1.m) polynomial |
| 5 | fixed-point sum, sign multiplexer, magnitude registered |
| 6 | leading-one position registered (`fix2float` stage 1) |
| 7 | normalising shift and packing registered; NaN multiplexer after it |

## Interfaces

Both units use the same handshake-free streaming interface. Raise `in_valid`
with the operands for one cycle per operation, on as many consecutive cycles
as wanted. `out_valid` rises with the result exactly 6 (divider) or 7
(logarithm) cycles later. There is no back-pressure: the pipelines never
stall. `rst_n` is an asynchronous active-low reset that clears only the
valid bits.

`fp_top` holds one divider and one logarithm side by side, with ports
`div_in_valid, div_x, div_y → div_out_valid, div_z` and
`log_in_valid, log_x → log_out_valid, log_y`.

| parameter | default | meaning |
|---|---|---|
| `E` | 8 | exponent width |
| `M` | 23 | fraction width |
| `DIV_FB0/1/2` | 17 / 18 / 19 | divider coefficient fractional widths |
| `LOG_FB0/1/2` | 19 / 17 / 18 | logarithm coefficient fractional widths |

For half precision use `E=5, M=10, DIV_FB*=10/9/9, LOG_FB*=10/10/8`. For
uniform widths set every `FB` to `M`.

## Accuracy

These figures were measured with the testbenches against exact real
arithmetic:

| configuration | divider, max relative error | logarithm, max absolute error |
|---|---|---|
| single, default widths | 5.8e-4 (≈ 2^-10.7) | 3.0e-4 (≈ 2^-11.7) |
| single, uniform 23-bit widths | 5.8e-4 | 3.0e-4 |
| half, widths 10/9/9 and 10/10/8 | 1.3e-2 | 2.0e-2 (includes the 10-bit output's truncation at large results) |
| half, uniform 10-bit widths | 6.2e-3 | 1.8e-2 |

At single precision the error comes from the four-decimal coefficients,
not from the coefficient widths. This is why the narrower optimised widths
cost nothing measurable. At half precision the 8- and 9-bit coefficients
dominate.

## What is not handled

- Zero, subnormal, infinite and NaN inputs are treated as ordinary normal
  numbers. In particular `x / 0` and `log2(0)` give meaningless finite
  values.
- Exponent overflow and underflow of the quotient wrap around.
- No rounding anywhere; every width reduction truncates toward −∞.

## Files

`rtl/` (one module or package per file):

- `fp_pkg.sv`: coefficient table, quantisation and bias functions, and the
  `poly_func_e` selector.
- `coeff_rom.sv`: the four-segment coefficient ROM.
- `fx_align.sv`: a fixed-point rescale helper (truncating shift).
- `poly_approx.sv`: the 3-stage polynomial unit.
- `msb_encoder.sv`: the priority encoder.
- `fix2float.sv`: the 2-stage fixed-to-float converter.
- `fp_div.sv`: the divider.
- `fp_log2.sv`: the logarithm.
- `fp_top.sv`: both units side by side.

`tb/`:

- `tb_fp_ref_pkg.sv`: an integer reference model of both units and of the
  polynomial, plus conversion helpers.
- One self-checking testbench per module: `tb_coeff_rom`, `tb_msb_encoder`,
  `tb_fix2float`, `tb_poly_approx`, `tb_fp_div` and `tb_fp_log2`.
- `tb_fp_top_drv.sv`: a stimulus and checking block shared by the
  end-to-end tests.
- `tb_fp_top.sv`: the end-to-end test at the default single-precision
  parameters.
- `tb_fp_top_half.sv`: half precision. It sends every 16-bit encoding to
  the logarithm and 20000 random pairs to the divider.
- `tb_fp_top_ufb.sv`: single precision with uniform widths.
- `tb_fp_top_half_ufb.sv`: half precision with uniform widths.

Every testbench compares each result bit-exactly with the reference model
and checks the error against the exact function. It also checks the latency
in cycles, ends with a `TB_RESULT checks=N failures=F` line, and has a
watchdog. The end-to-end tests also count each mechanism: both normalisation
cases, the reciprocal clamp (half precision), all segments, and the NaN,
negative, positive and zero logarithm paths. A mechanism that was never
exercised counts as a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fp_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_fp_top.sv --top-module tb_fp_top
./obj_dir/Vtb_fp_top
```

Replace `tb_fp_top` with any other testbench name. All runs take well under
a second. The RTL is plain synthesizable SystemVerilog-2017 and also
elaborates in Yosys with the slang front end.

## Where this RTL makes its own choices

The arithmetic follows the design described above: the coefficients,
segments, widths, truncation, normalisation, sign multiplexer and
latencies. The following are choices of this implementation:

- How the 6 and 7 cycles are split into stages.
- The valid bits and the reset of only those bits.
- Two integer bits per coefficient (three for intermediates).
- The asynchronous ROM read.
- The clamp of the reciprocal.
- The NaN and zero encodings of the logarithm.
- Taking the sign of the logarithm from `ex < bias`, which equals the sign
  of the fixed-point sum because `log2(1.m) < 1`.

Register counts: the pipeline registers sit next to the multipliers, where
FPGA synthesis can usually absorb them into DSP blocks. The flip-flop count
of a given device's implementation can therefore be much lower than the
count in the RTL. This has not been checked for any particular device.

Two assertions state the invariants the normalisation relies on. The
divider's `1.mx * r` never reaches 2. After the converter's shift, the
leading one always sits directly above the fraction.

The widths were found by an offline optimiser (differential evolution over
the error bound above). That optimiser is not part of the hardware. Only
its results appear, as parameter values.
