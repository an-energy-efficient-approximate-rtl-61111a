# LPCAD: an approximate divider built from a subtraction and a tiny multiplication

Exact division is slow and large in hardware. This divider trades a small,
two-sided error for a datapath about as cheap as an adder and a short multiplier.
For half precision with the default settings, the mean relative error is about
0.75 %. There are no iterations, no tables of size 2^n and no clock: the whole
divider is a combinational path.

The method rests on two approximations:

1. **Logarithmic conversion over an extended range.** For normal operands
   A = 2^A_E (1+A_M) and B = 2^B_E (1+B_M), the significand quotient is
   (1+A_M)/(1+B_M) = 1 + x, where x = (A_M-B_M)/(1+B_M) lies in (-0.5, 1).
   Mitchell's rule log2(1+x) ≈ x only covers x ≥ 0. Here it is stretched with
   a second line, log2(1+x) ≈ 2x for x in [-0.5, 0). Converting back with
   2^y ≈ 1+y gives:

   | case        | significand of the quotient        | exponent             |
   |-------------|------------------------------------|----------------------|
   | A_M ≥ B_M   | 1 + (A_M - B_M) / (1+B_M)          | A_E - B_E + bias     |
   | A_M < B_M   | 2 + 2 (A_M - B_M) / (1+B_M)        | A_E - B_E + bias - 1 |

2. **Piecewise-constant reciprocal.** 1/(1+B_M) is replaced by a constant C.
   C is chosen by the top K fraction bits of the divisor and has K+1 fraction
   bits. The division thus becomes one small multiplication, (A_M - B_M) × C.

The constants come from an offline search that minimises the mean relative
error of the whole divider. The search has one extra constraint: C times the
upper end of its range must not exceed 0.5. That bounds the product to
(-0.5, 1), which is what lets the output skip normalisation (see below).

| K | B_M range (top K bits)    | C                                                     |
|---|---------------------------|-------------------------------------------------------|
| 2 | 00, 01, 10, 11            | 0.875, 0.75, 0.625, 0.5                               |
| 3 | 000, 001, ..., 111        | 0.9375, 0.875, 0.75, 0.6875, 0.625, 0.5625, 0.5625, 0.5 |

The errors change sign with both (A_M - B_M) and (C(1+B_M) - 1). They therefore
largely cancel on average: the bias is about 0.1 % for the default
configuration. By contrast, plain Mitchell-based dividers always overestimate.

## The floating-point datapath (`lpcad_fp_div`)

```
 a = {a_s, A_E, A_M}    b = {b_s, B_E, B_M}
         |                     |
   a_s ^ b_s --------------------------------------------> q_s
   A_M, B_M --> lpcad_mant_sub --> S = s0.s-1..s-NM --+
   B_M[top K] --> lpcad_decoder --> C = 0.c-1..c-(K+1) |
                  lpcad_trunc_mult: P = S x C <--------+
                  mux on s0: P bits -1..-NM or -2..-(NM+1) --> Q_M
   A_E, B_E, s0 --> lpcad_exp_unit: A_E + ~B_E + ~s0 + bias --> Q_E
```

**Subtractor.** S = A_M - B_M is formed as a two's-complement number in (-1, 1).
It is an adder fed with the inverted B_M and a carry-in of 1. Its sign bit s0
tells whether A_M < B_M. s0 drives both the exponent correction and the output
multiplexer.

**Why no normaliser is needed.** The mantissa path needs no normaliser and no
final "+1" or "+2" adder. In the A_M ≥ B_M case, P lies in [0, 1), so the
fraction of 1 + P is simply the bits p-1 .. p-NM. In the A_M < B_M case, the
constant rule guarantees P ∈ [-0.5, 0). In two's complement, P is then
1.1 p-2 p-3 ... Doubling P drops the p-1 bit, and adding 2 cancels the
integer bit, so 2P + 2 = 1.p-2 p-3 .... The fraction of the result is just
p-2 .. p-(NM+1). One multiplexer, steered by s0, picks between the two bit
windows of the same product.

**Exponent with a free "-1".** The exponent is A_E + NOT(B_E) + cin + bias,
with cin = NOT(s0). When A_M ≥ B_M, the carry-in completes the two's
complement of B_E. When A_M < B_M, the carry-in is dropped, which is exactly
the "-1" the renormalised significand needs. The path is two adders.

## The truncated multiplier (`lpcad_trunc_mult`)

S is signed and C is unsigned with a zero integer bit. The product therefore
has only one negative term:

    P = -s0 · Σ_j c-j 2^-j  +  Σ_j Σ_i s-i c-j 2^-(i+j)

The negative term is folded into the partial-product array with the
complemented-sign trick:
- Row j holds NOT(s0·c-j) in column 2^-j.
- The last row (j = K+1) splits its sign bit into NOT(s0·c-(K+1)) in column
  2^-K and s0·c-(K+1) in column 2^-(K+1).
- A constant 1 sits in the integer column.

All arithmetic is modulo 2. The result is P as p0.p-1 … in two's complement.
With T large enough (see below), the array computes S × C exactly; the
testbench checks this exhaustively. The rows are written as a plain sum; the
carry-save tree is left to synthesis.

## The truncation parameter T

LPCAD(K, T) names a configuration. Wide formats gain little accuracy beyond
T ≈ 8, so truncation is where most of the area is saved. In this RTL, T acts
in two places:

- `lpcad_mant_sub` uses only the top T bits of A_M and B_M. The lower bits are
  read as 0.
- `lpcad_trunc_mult` builds and sums only the product columns 2^0 … 2^-(T+1).
  These are the columns that reach the output window. Lower partial-product
  bits are dropped, so the truncated P never exceeds the exact product.

The first point has a visible effect. When A_M and B_M differ only below the
top T bits, the divider treats them as equal. It returns 1.0 × 2^(A_E-B_E) and
does not take the renormalised branch.

T must be at least K, so that every sign-correction bit lies in a kept column.
T ≥ NM + K makes the multiplier exact. Applying T at both places is this
design's reading of the truncation scheme. It reproduces the published
accuracy to within a few percent at T ≥ 8 (table below). At T = 4, this RTL
is somewhat more accurate than the published numbers.

## The integer divider (`lpcad_int_div`)

An unsigned divider wraps the same core:

1. Each operand goes through a leading-one detector (`lpcad_lopd`), which gives
   e = floor(log2 x). A barrel shifter (`lpcad_int_to_fp`) then turns the bits
   below the leading one into a fraction, so x = (1.m) · 2^e. Example:
   00101100 gives e = 5 and 1.m = 1.01100.
2. The pair, with a bias added to the exponents, enters an internal
   LPCAD(3,8) core. The core has a 15-bit fraction, and the 7-bit divisor
   fraction is zero-padded at the bottom.
3. A second barrel shifter (`lpcad_fp_to_int`) turns (1.Q) · 2^E back into an
   integer.

The internal exponent field is sized so that it can never wrap.

Choices of this design:
- The default widths are a 16-bit dividend and an 8-bit divisor.
- The result is rounded toward zero.
- A zero dividend gives 0.
- A zero divisor gives all ones and raises `div_by_zero`.

## Top level and interfaces

`lpcad_top` places the two dividers side by side; they share nothing. All
outputs are combinational functions of the inputs.

| port              | dir | width | meaning                                              |
|-------------------|-----|-------|------------------------------------------------------|
| `fp_a`, `fp_b`    | in  | 16    | half-precision dividend, divisor {sign, exp[5], frac[10]} |
| `fp_q`            | out | 16    | approximate quotient                                 |
| `fp_exp_ovf`      | out | 1     | true quotient exponent ≥ 31 (field has wrapped)      |
| `fp_exp_unf`      | out | 1     | true quotient exponent ≤ 0 (field is 0 or has wrapped) |
| `int_a`, `int_b`  | in  | 16, 8 | unsigned dividend, divisor                           |
| `int_q`           | out | 16    | approximate floor(a / b)                             |
| `int_div_by_zero` | out | 1     | `int_b` was 0                                        |

Parameters: `FP_NE`, `FP_NM`, `FP_K`, `FP_T` and `INT_WA`, `INT_WB`, `INT_K`,
`INT_T`. `lpcad_fp_div` takes `NE`, `NM`, `K`, `T` directly. Examples:
- Single precision LPCAD(3,8): `NE=8, NM=23, K=3, T=8`.
- 8-bit FP(1,3,4) LPCAD(2,5): `NE=3, NM=4, K=2, T=5`.

## Accuracy

The figures below are measured in simulation, 100 000 uniform random
significand pairs per row (`tb_lpcad_table2`). They are shown next to the
published figures for the method.

| format      | K | T  | MRED % | published | bias % | published |
|-------------|---|----|--------|-----------|--------|-----------|
| FP(1,5,10)  | 2 | 4  | 2.39   | 2.87      | -0.74  | -1.45     |
| FP(1,5,10)  | 2 | 8  | 1.27   | 1.32      | 0.06   | -0.04     |
| FP(1,5,10)  | 2 | 10 | 1.26   | 1.30      | 0.10   | 0.02      |
| FP(1,5,10)  | 3 | 4  | 2.26   | 2.53      | -1.26  | -1.58     |
| FP(1,5,10)  | 3 | 8  | 0.75   | 0.77      | 0.11   | 0.14      |
| FP(1,5,10)  | 3 | 10 | 0.73   | 0.75      | 0.16   | 0.23      |
| FP(1,8,23)  | 3 | 8  | 0.75   | 0.77      | 0.10   | 0.09      |
| FP(1,8,23)  | 3 | 23 | 0.72   | 0.74      | 0.19   | 0.20      |
| FP(1,3,4)   | 2 | 5  | 2.58   | 1.98      | -1.29  | 0.79      |
| FP(1,3,4)   | 3 | 5  | 2.28   | 1.39      | -1.67  | 0.72      |

The largest single relative error of the default FP16 LPCAD(3,8) is 5.6 %.
That figure covers all 2^20 significand pairs. For the 8-bit format, this RTL
does not reach the published figures. A 4-bit fraction that is truncated, not
rounded, already costs about 2 % on average. So those published numbers imply
a wider or rounded output that the method does not describe.

## In image processing

Three ratio-based uses of the divider are exercised by
`tb_lpcad_image_apps`, on 64x64 synthetic grayscale images that the testbench
generates (gradients, a bright blob, texture noise; pixels 1..255). The
figures compare each output with the same algorithm run with exact division:

| use                                                     | divider               | result                           |
|---------------------------------------------------------|-----------------------|----------------------------------|
| change detection: frame ratio, changed if outside [0.8, 1.25] | FP16 LPCAD(3,4) | PSNR 42.7 dB, change mask identical |
| same                                                    | FP16 LPCAD(3,8)       | PSNR 51.0 dB, change mask identical |
| foreground extraction: frame / background               | FP16 LPCAD(3,10)      | PSNR 56.7 dB                     |
| k-means, 4 grey levels, 8 iterations (centre = sum / count) | FP32 LPCAD(3,8)   | PSNR 36.7 dB                     |

Ratio images are mapped to 8 bits as min(255, 96 × ratio). Centre sums reach
about 10^6, beyond the half-precision range, which is why k-means needs the
single-precision configuration.

## Limits and departures

- **Special values.** Operands are assumed to be normal numbers. Zero,
  subnormals, infinities and NaN are not recognised. The exponent field wraps
  on overflow and underflow. The two flags `exp_ovf`/`exp_unf` are this
  design's addition, so a user can saturate or flush outside the divider.
- **Constant sets.** Only K = 2 and K = 3 are supported. Other K need a new
  run of the offline constant search. Elaboration stops with an error for any
  other K.
- **Truncation reading.** T is applied both at the subtractor inputs and at
  the multiplier columns, as described above.
- **No pipeline registers.** The method is evaluated as a single-cycle
  combinational block, and it is kept that way.
- **Baselines are not included.** The straightforward architecture (with an
  explicit shift and a final +1 adder) and the exact and other approximate
  dividers the method is compared with are not part of this RTL.

## Simulating

Every testbench checks its block against an arithmetic model in
`tb/tb_lpcad_ref_pkg.sv`. The model computes the result from the equations
above, not from the partial-product array. Each testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lpcad_pkg.sv tb/tb_lpcad_ref_pkg.sv tb/tb_lpcad_top.sv \
    --top-module tb_lpcad_top -Mdir obj_top
./obj_top/Vtb_lpcad_top
```

Replace `tb_lpcad_top` with any other testbench:

| testbench              | what it covers                                                |
|------------------------|---------------------------------------------------------------|
| `tb_lpcad_top`         | both dividers at default size, end to end: bit-exact results, ±6 % value check, and a count of every mechanism (both mantissa orders, truncation flipping the order, overflow, underflow, divide by zero, zero dividend, quotient < 1) |
| `tb_lpcad_table2`      | the accuracy sweep above, 16 configurations                   |
| `tb_lpcad_image_apps`  | change detection, foreground extraction and k-means on synthetic images (see above) |
| `tb_lpcad_fp_div`      | FP16 LPCAD(3,8) and (2,4), bit-exact, MRED and worst case     |
| `tb_lpcad_int_div`     | 16/8 integer divider                                          |
| `tb_lpcad_trunc_mult`  | all S × C: truncated against the model, full-width against S·C |
| `tb_lpcad_mant_sub`, `tb_lpcad_exp_unit`, `tb_lpcad_decoder`, `tb_lpcad_lopd`, `tb_lpcad_int_to_fp`, `tb_lpcad_fp_to_int` | unit checks, mostly exhaustive |

Every run takes seconds. `rtl/lpcad_pkg.sv` must be compiled first, because
it holds the constant sets and the bias rule.
