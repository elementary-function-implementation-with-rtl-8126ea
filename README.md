# Binary64 arctangent with a sub-range polynomial evaluator

This is a fully pipelined IEEE-754 double-precision `atan(x)` unit. Its
core is a cheap way to evaluate a short power series in floating point:
on a small input range `[0, 2^-9]` the polynomial

    P(x) = x - x^3/3 + x^5/5  =  x * Q(y),   y = x^2,   Q(y) = 1 - y/3 + y^2/5

is accurate to double precision. There, every term of `Q` lies at a
position below the leading `1` that depends only on the exponent of `y`.
That position can be looked up in a table instead of found with an
alignment shifter. `Q` is then summed in plain fixed point. The data path
has no floating-point adder, no normalisation shifter and no rounding
between the operators. Everything outside `[0, 2^-9]` is brought into that
range with two identities:

    atan(x) = pi/2 - atan(1/x)                  for |x| > 1
    atan(a) = atan(b) + atan(c / (1 + a*b))     a = b + c, b = top 9 bits of a

## Data path

```
 x ──► |x|, |x|>1 ? ──► recip_unit (1/|x|) ──► z in [0,1]
                                               │
             z < 2^-9 ─────────────────────────┼──────────────┐
             z >= 2^-9: arg_split ─ k, c, 1+ab │              │
                        recip_unit (1/(1+ab))  │              │
                        t = c * 1/(1+ab)  ─────┴──► mux ──► poly_eval ──► P
                        atan_b_table(k) ────────────────────────────────┐   │
                                                                        ▼   ▼
                     fixed-point sum  atan(b) + P   (pi/2 - sum if |x|>1)
                                                    │
                      fix_normalize + fp_round ──► sign, special values ──► y
```

There is only one polynomial evaluator. It computes `P(z)` when `z` is
already below `2^-9`. Otherwise it computes `P(t)` for the reduced argument
`t = c/(1+a*b)`, which is always below `2^-9` because `c < 2^-9` and
`1 + a*b >= 1`. The two uses share the evaluator through a multiplexer in
front of it.

Stage by stage (`rtl/atan_fp.sv`):

| stage | work |
|---|---|
| 1 | decode; `1/m` of the mantissa (used when \|x\| > 1); form `z`, rounded to 53 bits |
| 2 | choose the branch; `arg_split`: split `a = z` into `b = k/512` and `c`, form `1 + a*b` |
| 3 | second `recip_unit`: `1/(1 + a*b)`; look up `atan(b)` |
| 4 | `t = c * 1/(1+a*b)`, leading-one normalised, rounded to 53 bits; select `z` or `t` |
| 5 | `poly_eval` |
| 6 | 66-fraction-bit fixed-point sum `atan(b) + P`, and `pi/2 - sum` for \|x\| > 1 |
| 7 | normalise, round to nearest even, apply the sign and special cases |

## The sub-range polynomial evaluator (`poly_eval`)

This is the part worth understanding in detail.

**Why fixed point works.** Write `y = 2^ey * 1.fy`. For `x <= 2^-9` we have
`ey <= -18`. The monomial `a_i * y^i` equals `(a_i * 2^(i*ey)) * (1.fy)^i`.
The factor `2^(i*ey)` is a right shift of `a_i` by `i*|ey|` places. It
depends only on `ey`, so it is stored in a table (`coef_shift_table`)
instead of being applied to a product:

* the `a1 = 1/3` table moves one place per exponent step, so line `s`
  holds `round(2^(57 - 18 - s) / 3)`;
* the `a2 = 1/5` table moves two places per step, so line `s` holds
  `round(2^(57 - 36 - 2s) / 5)`.

Once a shifted coefficient falls below the last bit of the 57-bit
fraction of `a0 = 1`, that monomial no longer counts. Every smaller
exponent reads a final all-zero line. In practice `a2*y^2` disappears from
`ey = -28` down and `a1*y` from `ey = -57` down. Below that, `Q = 1` exactly and
`P(x) = x` is returned unchanged. Both tables are computed from these
formulas when the design is elaborated.

**Sizing from the error budget.** The result needs 54 bits. `g = 3` guard
bits are added, giving `FQ = 57` fraction bits for `Q`.

* `a1*y` sits at least 18 places below `a0`, so it only needs 36+g = 39
  bits. The squarer (`trunc_squarer`) therefore only needs to deliver `y`
  to 39 fraction bits. It truncates its operand to 42 fraction bits, so
  its multiplier is 43x43 rather than 53x53.
* `a2*y^2` sits at least 36 places down and needs only 18+g = 21 bits.
  `y^2` is formed from `1.fy` truncated to 21 bits.
* `Q` lies in `(1 - 2^-19.5, 1]`, so `x*Q` needs at most a one-place
  normalisation, which is a 2-way multiplexer.

* The final product `x*Q` goes through a column-truncated multiplier
  (`trunc_mult`), which never forms the 44 lowest of its 110 product
  columns. Its error is below `2^-59` of the result. It adds no
  compensation constant, so `Q = 1` still returns `x` exactly.

The output of `poly_eval` is a wide unrounded float with a 64-bit mantissa.
Rounding happens once, at the very end.

## Reconstruction for z in [2^-9, 1]

`arg_split` places `z` on a 62-fraction-bit fixed-point grid as `a`.

* `b` is the integer bit plus the top 9 fraction bits of `a`, encoded as
  `k = 512*b`. `k` is in 1..512, and `k = 512` only when `a = 1`.
* `c` is the remaining 53 bits, so `c < 2^-9`.

`a*b` is computed as the 53x10 product of `z`'s mantissa with `k`,
shifted left by 0..9 places according to `z`'s exponent. That product is
exact, and `1 + a*b` lands in `[1, 2]` already normalised, so it can go
straight into the reciprocal unit. `atan(b)` comes from a 513-entry,
66-bit ROM (`atan_b_table`), computed at elaboration with Euler's
arctangent series. `t = c * 1/(1+a*b)` is formed by a truncated multiplier
that drops 52 columns (absolute error below `2^-67`). It is normalised by a leading-one
search (`c` can have many leading zeros) and rounded to 53 bits before
it enters the polynomial evaluator.

## Reciprocal (`recip_unit`)

The reciprocal is used twice: for `1/|x|` and for `1/(1+a*b)`.

1. The top 9 fraction bits of the operand pick one of 512 intervals.
2. A second-order Taylor expansion around the interval midpoint,
   `1/x0 - dd/x0^2 + dd^2/x0^3`, gives about 30 correct bits. Its three
   tables are 512 x 37 bits each and are computed at elaboration.
3. One Newton-Raphson step, `r = r0 + r0*(1 - d*r0)`, brings the error
   below `2^-59`.

## Interface and timing

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | |
| `rst_n` | in | 1 | synchronous, active low; clears only the valid pipeline |
| `in_valid` | in | 1 | operand present |
| `x` | in | 64 | binary64 operand |
| `out_valid` | out | 1 | result present |
| `y` | out | 64 | binary64 `atan(x)` |

The unit accepts one operand per clock and has no back-pressure. The
result appears 7 clock edges after the edge that samples the operand. In
the testbench's terms, `out_valid` is seen at edge `n+7` for an operand
captured at edge `n`.

Special values:

* NaN gives a quiet NaN with the same payload.
* `+-inf` gives `+-pi/2`.
* `+-0` gives `+-0`.
* A subnormal `x` is returned unchanged, since `atan(x)` rounds to `x`
  there.

## Accuracy and verification

Every result is within one unit in the last place of the true
arctangent. It is faithful, but not correctly rounded in every case. The
largest contributions to the error are:

* the rounding of `1/|x|` to 53 bits;
* the rounding of `t` to 53 bits (both required by the evaluator's 53-bit
  input);
* the final rounding.

Each block has a self-checking testbench in `tb/`, compared against
independently computed values:

* exact integer checks for the squarer, the coefficient tables, the
  argument split and the reciprocal;
* bit-exact comparison with the simulator's own `double` conversion for
  the rounding;
* exact reference values for the `atan(b)` table.

`tb/tb_atan_fp.sv` streams about 3,500 operands through the full unit,
with random bubbles. The operands cover:

* the direct branch and the reconstruction branch;
* the `|x| > 1` branch, both with `1/x` below `2^-9` and above it;
* negative, tiny, huge and power-of-two operands;
* operands within two ulps of the branch boundaries 2^-9, 1/2, 1 and 512;
* every special value.

It compares each result with the simulator's `atan` (at most 1 ulp
apart), checks the 7-cycle latency of every result, and fails if any of
these mechanisms was never exercised. A longer run of the same bench with
300,000 operands also stayed within 1 ulp.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/atan_pkg.sv tb/tb_atan_fp.sv --top-module tb_atan_fp -o sim
./obj_dir/sim
```

Each bench ends with `TB_RESULT checks=<n> failures=<n>`.

## Where this design departs from the original

* **Pipeline depth.** The original FPGA implementation of this method
  runs at about 400 MHz with a latency of 78 cycles. Here each operator gets one stage
  (7 in total), so the logic between registers is far deeper. Adding
  registers inside `recip_unit` and `poly_eval` and lengthening the
  valid/control pipe in `atan_fp` is the way to retime it.
* **Reciprocal.** The reciprocal follows the prescribed method (a
  degree-2 piecewise polynomial plus one Newton-Raphson step), but uses
  Taylor rather than minimax coefficients. Its tables total 56,832 bits,
  which is within three 20-kbit FPGA memory blocks.
* **Choices made here where the method leaves the details open:**
  * the 66-bit fixed-point sum;
  * the guard-bit count `g = 3`, within the suggested 2-3;
  * the rounding mode (to nearest even);
  * the handling of special values;
  * the `b = 1` case of the split (`k = 512`);
  * the valid-only handshake.
* **FPGA mapping.** DSP and memory-block counts are not reproduced. The
  multipliers and ROMs are generic SystemVerilog left for synthesis to
  map.

## Files

* `rtl/atan_pkg.sv` holds the formats (`ufloat_t`: 53-bit mantissa,
  `wfloat_t`: 64-bit mantissa, both with a 13-bit signed exponent and a
  zero flag) and the constants `K = 9`, `g = 3`, `FQ = 57`, 39/21-bit
  monomial widths and `pi/2` to 66 bits.
* `rtl/atan_fp.sv` is the top.
* The other files in `rtl/` are the combinational blocks named above.
* The testbench for each is `tb/tb_<block>.sv`.
