# Radix-16 floating-point divider

This is a floating-point divider, c = a / b, for all five IEEE 754 binary
formats: half, single, double, 80-bit double extended and quad. The format is
chosen for each operation. The significands are divided by an iterative SRT
divider of radix 16. Each clock cycle yields one quotient digit worth four
bits, so a division needs a quarter of the cycles of a bit-per-cycle divider.

The digits are signed and redundant. Each digit is the sum of two parts,
q = q_h + q_l, with q_h in {0, ±4, ±8} and q_l in {0, ±1, ±2, ±4}. Every
divisor multiple is therefore a plain shift of d, and two rows of carry-save
adders form the next partial remainder. The price is that ±11 cannot be
formed. The digit set is {-12, -10 … 10, 12}. When 11 would have been the
right digit, a neighbour is used instead. The next cycle detects the error and
spends one extra cycle correcting it. On random operands this costs about one
extra cycle per quad division.

## Data flow

```
 a, b (128-bit containers), fmt, rm
   │
   ├─ fp_unpack ×2 ── sign, biased exponent, significand 1.f left-aligned to 113 bits, class
   │        │
   │        ├─ fp_special ── zero / inf / NaN result? ──────────────┐ (bypass)
   │        ├─ fp_exp_unit ── ec = ea − eb + bias, and ec−1, ec+1    │
   │        └─ r16_mant_div ── x/(4d), sticky                        │
   │              ├─ r16_qsel   digit prediction (CPA + CS_h + CS_l) │
   │              ├─ csa ×2     carry-save remainder update          │
   │              └─ qconv      digit → binary accumulation          │
   └────────────── fp_round_pack ── normalize, round, pick exponent, pack ◄┘
                                     result, flags {nv, dz, of, uf, nx}
```

`fpdiv_top` sequences the operation. It registers the operands, then unpacks
and classifies them. Exceptional operands go straight to the packer. Otherwise
the top starts the significand divider and registers the three exponent
candidates. It rounds and packs in the cycle in which the divider reports its
result.

### Latency

`done` rises L clock edges after the edge that accepts `start`. There is no
pipelining: a new operation may start once `busy` is low, and a `start`
while `busy` is high is ignored.

| format   | significand p | radix-16 digits N | L (no correction) |
|----------|---------------|-------------------|-------------------|
| half     | 11            | 4                 | 7                 |
| single   | 24            | 7                 | 10                |
| double   | 53            | 14                | 17                |
| extended | 64            | 17                | 20                |
| quad     | 113           | 29                | 32                |

Each correction cycle adds 1 to L. Operations that bypass the divider take
L = 2. N = ceil((p+3)/4) provides p result bits, a round bit, and one bit of
slack for the normalization shift.

## The significand divider (`r16_mant_div`)

### Recurrence and scaling

The significands x and d lie in [1, 2). The divider runs

```
w[0] = x/4,     w[j+1] = 16·w[j] − q[j+1]·d,     Q = Σ q[j]·16^−j  →  x/(4d)
```

The 1/4 pre-scaling keeps w[0] < 0.5 d, so the first digit already respects
the remainder bound. The quotient x/(4d) lies in (1/8, 1/2). Its leading one
tells whether x/d ≥ 1.

The remainder w is a pair of 121-bit two's-complement vectors: 7 integer bits
including the sign, and 114 fraction bits. Its value is the sum of the two
vectors, modulo 2^121. A digit cycle works as follows:

1. Both vectors are shifted left by 4 bits, which multiplies w by 16.
2. The first CSA row adds −q_h·d, which is d shifted by 2 or 3 places and
   inverted when q_h > 0.
3. The second row adds −q_l·d in the same way.

The "+1" of each two's-complement negation enters through the free least
significant bit of that row's carry vector. No carry propagates across the
word during the iterations.

### Digit prediction (`r16_qsel`)

The top 9 bits of both shifted vectors (7 integer, 2 fraction) are added by a
short carry-propagate adder. Its carry-in of 1 (= 1/4) centres the truncation
error, so the estimate ŷ is within ±1/4 of y = 16·w. The divisor estimate d̂
is the two leading hex digits of d: 1 integer and 7 fraction bits.

Two combinational circuits produce the digit side by side:

* **CS_h** sees only the five most significant bits of ŷ, a bucket of width 4.
  It takes the bucket midpoint m. It picks q_h = ±8 if |m| ≥ 6 d̂, ±4 if
  |m| ≥ 2 d̂, else 0, with the sign of m.
* **CS_l** sees the whole estimate. For each of the five possible q_h values,
  and in parallel, it forms ŷ − q_h·d̂. It then picks the q_l in
  {0, ±1, ±2, ±4} nearest to (ŷ − q_h·d̂)/d̂. Ties go to the smaller magnitude.
  The q_h from CS_h then selects one of the five candidates.

A digit can miss the nearest integer by one: ±11 does not exist, and there is
no q_l = ±3 to complement a coarse q_h. When that happens, the next remainder
leaves the normal range. The same comparator logic flags this as
|ŷ| ≥ 12.5 d̂.

### Correction cycles

When `corr` is raised, the cycle does not shift. Instead it:

* subtracts sign(y)·d from the unshifted remainder, through the same CSA path
  (q_h = 0, q_l = ±1);
* adds sign(y) to the quotient at the last digit position.

The error made at step j−1 is thus found by the same logic that predicts digit
j, and repaired at the cost of one cycle.

### Bounds

The selection was analysed exhaustively over all 512 estimates × 128 divisor
intervals, at the extreme values of y and d inside each:

| after …                     | bound on the remainder |
|-----------------------------|------------------------|
| any digit                   | \|w\| < 1.29·d         |
| a correction                | \|w\| < 0.29·d         |
| a cycle with no correction request | \|w\| < 0.8·d   |

With all digits from −12 to 12 present, the redundancy factor
12/15 would keep \|w\| ≤ 0.8·d by itself. Here the missing ±11 and the
coarse q_h let the remainder exceed that bound for one cycle, which the
correction cycle repairs. A correction is requested only when \|w\| > 0.76·d. With \|w\| < 1.29·d,
\|16·w\| < 42, well inside the 7-bit integer range. `r16_mant_div` asserts
this: \|ŷ\| < 44. If the rules in `r16_qsel` are changed, this analysis must
be redone: random tests rarely reach the worst-case corners.

### Termination and the sticky bit

After N digits, one more cycle inspects the remainder:

1. If `corr` is requested, a correction is made first.
2. A full-width adder then gives the exact remainder.
3. If the remainder is negative (it is then above −d), the quotient is reduced
   by one unit in the last place. The remainder then becomes non-negative.
4. `sticky` = the remainder is non-zero.

The quotient delivered is therefore the exact truncation of x/(4d) at 4N
bits, plus an exact sticky bit. This is what correct rounding needs.

### Quotient conversion (`qconv`)

The signed digits go into an accumulating adder/subtractor: Q ← 16·Q + q on a
digit step, and Q ← Q ± 1 on a correction. The register is 116 bits wide
(29 × 4), modulo 2^116. Its final value is always non-negative.

## Formats, exponent, rounding

`fp_unpack` cuts out the fields of the selected format. It restores the hidden
bit and left-aligns the significand in 113 bits, so that every format looks
like a quad significand to the divider. For the 80-bit format, the explicit
integer bit is not checked: the exponent field decides.

`fp_exp_unit` computes ec = ea − eb + bias (18-bit signed). It also computes
ec − 1 and ec + 1 at the same time, so that exponent arithmetic does not follow
the division.

`fp_round_pack` works in these steps:

1. If x/d < 1, it shifts the quotient left by one place (`norm_shift`).
2. It rounds to the format's p bits in one of the four IEEE directions
   (`rm`: RNE, RTZ, RUP, RDN), using a round bit and a sticky bit.
3. If the rounded significand reaches 2.0, it shifts it right (`round_carry`).
4. It picks ec − 1, ec or ec + 1 accordingly.

For a quotient of two normalized p-bit significands, that rounding carry
cannot actually happen. The path is kept, and is tested only at unit level.

### Exceptions

`fp_special` applies the IEEE 754 rules:

* A NaN operand, 0/0 or ∞/∞ gives the default quiet NaN. Invalid (nv) is
  raised for the last two, and for a signalling NaN operand.
* x/0 gives ±∞ with the division-by-zero flag (dz).
* ∞/finite gives ±∞.
* 0/finite and finite/∞ give ±0.

Overflow returns ±∞ or the largest finite number, depending on the rounding
direction. Flags of and nx are raised.

**Denormals are not supported.** An operand with a zero exponent field counts
as zero. A result whose exponent after rounding is ≤ 0 is flushed to a signed
zero with uf and nx. This flush also applies when the rounding direction
would have given the smallest denormal. NaN payloads are not propagated.

## Interface (`fpdiv_top`)

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| clk      | in  | 1     | clock, rising edge |
| rst_n    | in  | 1     | asynchronous reset, active low |
| start    | in  | 1     | start an operation; accepted when `busy` is low |
| fmt      | in  | 3     | `fmt_e`: 0 half, 1 single, 2 double, 3 extended, 4 quad |
| rm       | in  | 2     | `rm_e`: 0 RNE, 1 RTZ, 2 RUP, 3 RDN |
| a, b     | in  | 128   | dividend, divisor; right-aligned in the container |
| busy     | out | 1     | operation in progress |
| done     | out | 1     | one-cycle pulse; `result` and `flags` valid until the next `done` |
| result   | out | 128   | quotient, right-aligned, upper bits zero |
| flags    | out | 5     | `flags_t` {nv, dz, of, uf, nx} |

The shared types and per-format constants live in `rtl/fpdiv_pkg.sv`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|-----------|----------------|
| `tb_fpdiv_top` | 30 000 random and directed divisions over all formats and rounding directions, against `tb/fpdiv_ref_pkg.sv`. That reference model divides the significands with the `/` operator on wide integers. Double-precision RNE results are also compared with the simulator's `real` division. Checks the latency of every operation. Counts bypasses, corrections, normalizations, overflows, underflows and each format, and fails if any never happens. |
| `tb_r16_mant_div` | 18 000 significand divisions for all digit counts, against exact integer quotient and remainder. Checks latency N + 1 + corrections and that corrections occur. |
| `tb_r16_qsel` | all 65 536 (estimate, d̂) pairs against the selection rule in real arithmetic. Checks that every digit except ±11 is produced. |
| `tb_fp_round_pack` | random quotients, exponents at and beyond the range limits, all modes, bypass kinds, forced rounding carry |
| `tb_fp_unpack`, `tb_fp_special`, `tb_fp_exp_unit`, `tb_csa`, `tb_qconv` | unit-level checks against independent models |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/fpdiv_pkg.sv tb/fpdiv_ref_pkg.sv tb/tb_fpdiv_top.sv --top-module tb_fpdiv_top
./obj_dir/Vtb_fpdiv_top
```

The other testbenches are built the same way; `fpdiv_ref_pkg.sv` is needed
only where the testbench imports it. All run in well under a second.

## Where this design makes its own choices

The following are not fixed by the method and were chosen here:

* the digit-selection thresholds and tie rules;
* the 9-bit estimate with its centring carry-in;
* the reading of "two leading digits of d" as 8 bits;
* the x/4 pre-scaling;
* the finishing cycle with a full-width adder for an exact sticky bit;
* the start/busy/done handshake and the latencies;
* flush-to-zero in place of denormal support;
* the default NaN.

Rounding is done in the same clock cycle in which the divider reports its
result. No separate rounding step is added.

The significands are held as unsigned magnitudes with a separate sign bit. So
the widths are 11/24/53/64/113 bits, rather than one bit more per format with
the sign inside.

The critical path was not timed: the CPA, CS_h/CS_l and the two CSA rows are
one combinational cycle.

To change the selection, edit `r16_qsel` and redo the bound analysis above.
To add formats, extend `fmt_e` and the functions in `fpdiv_pkg`, and the case
statements in `fp_unpack` and `fp_round_pack`.
