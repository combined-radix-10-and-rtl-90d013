# Combined radix-10 / radix-16 digit-recurrence divider

This is one divider that handles two kinds of significand. With `radix10 = 1` it
divides 16-digit BCD fractions and returns a rounded 16-digit BCD quotient. With
`radix10 = 0` it divides binary fractions and returns a rounded 53-bit (double
precision) quotient. Either way it produces one quotient digit per clock.

Sharing the hardware works because of two facts:

* A radix-10 digit in BCD and a radix-16 digit both take 4 bits. Shifting the
  partial remainder by one digit is a 4-bit shift in both modes.
* Each quotient digit is split into two parts, `q = k*qH + qL`. Radix 10 uses
  `k = 5`, `qH in {-1,0,1}` and `qL in {-2..2}`. Radix 16 uses `k = 4`,
  `qH in {-2..2}` and `qL in {-2..2}`. So each cycle subtracts two small
  multiples of the divisor in a row: `qH*(k*d)` and then `qL*d`. Both come
  from a short list of precomputed multiples.

## The recurrence

With `r` = 10 or 16, each iteration computes

```
v[j] = r*w[j-1] - qH_j * (k*d)        qH_j = SEL_H(estimate of r*w[j-1], d)
w[j] = v[j]     - qL_j * d            qL_j = SEL_L(estimate of v[j],     d)
w[0] = x / r^2
```

The divisor must be normalized: `d` in [0.1, 1) for radix 10 and in
[0.5, 1) for radix 16. The same holds for `x`. The selection keeps
`|w| <= rho*d`, where `rho = 7/9` in radix 10 and `rho = 2/3` in radix 16. The
quotient is `sum q_j r^(2-j)`. The first digit has weight `r^1` because `w[0]`
is `x` scaled down by `r^2`.

Iterations:

* Radix 10: 19 iterations. That gives 2 leading digits, 16 significant digits
  and a round digit.
* Radix 16: 16 iterations. That gives 2 leading digits, then 14 hex digits for
  53 bits, the round bit and one bit of normalization slack.

## Partial remainder: digit carry-save

The remainder `w` has 20 digits: 2 integer digits and 18 fraction digits, so
`x/r^2` fits exactly. It is kept redundant as

* a 4-bit digit vector `S`, and
* one carry bit per digit, `C`.

Its value is `sum (S_i + C_i) r^i` modulo `r^20`. This is the r's-complement
form, so negative remainders need no sign handling.

* **Adder (`dr_csa`).** Every digit cell adds `S_i + C_i + Y_i` with a 4-bit
  adder. The sum is at most 19 in BCD and at most 31 in hex. The cell keeps the
  sum mod `r` and sends one bit to the carry slot of the next digit, and
  nothing ripples further. `radix10` only switches the correction in each cell
  (subtract 10, or plain 4-bit wrap).
* **Subtraction (`dr_mult_mux`).** A multiple is subtracted by adding its
  digit-wise 9's or 15's complement. The missing `+1` goes into the carry slot
  of digit 0, which is always free:
  * for the `qH` subtraction, the slot freed by the one-digit shift;
  * for the `qL` subtraction, the slot of digit 0 of the first adder's output.
* **Multiples (`dr_multiples`).** The divisor multiples are computed once per
  division, in the load cycle:
  * radix 10: `d`, `2d`, `5d`, formed digit by digit in BCD;
  * radix 16: `d`, `2d`, `4d`, `8d`, formed by shifting.

## Quotient-digit selection (the hard part)

Selection uses a small binary "most-significant slice" (`ms_slice`).

**The estimate of `r*w`.** The slice takes the top 5 digits of the redundant
`r*w`: 2 integer and 3 fraction digits, together with their carry bits. It
turns them into one two's complement integer in units of `r^-3`:

* radix 16: the digits just concatenate;
* radix 10: each digit is multiplied by its power of ten.

The slice reduces the sum modulo `r^5` and reads it as a signed number. The
dropped lower digits make the estimate too small by less than `r/(r-1)` units.
This bound is tighter than ordinary bit-level carry-save, because there is only
one carry bit per 4-bit digit.

**Selecting `qH`.** Four sign detectors compare the estimate with `m_H2`,
`m_H1`, `-m_H1` and `-m_H2`, and an encoder turns the results into `qH`. In
radix 10 only the middle two detectors count, so `qH` stays in {-1,0,1}.

**Selecting `qL`.** Waiting for `qH` and then estimating `v` would put two
selections in series. Instead the slice computes `rW - q*(k*D)` for all five
values of `q`, with `D` the divisor cut to 3 fraction digits. It compares each
result with `m_L2`, `m_L1`, `-m_L1`, `-m_L2`. A 5:1 multiplexer driven by `qH`
then picks the `qL`.

**The constants (`sel_constants`).** The constants depend on the divisor
interval.

* Radix 10 uses 21 intervals between 0.100 and 1.00. The first three BCD digits
  of `d` select the interval.
* Radix 16 uses the eight intervals `d = 0.1 b2 b3 b4`. They are the last eight
  rows of the same table, with their bounds rounded to decimal.

Each row holds one value per constant that satisfies both radices' bounds, so
one table serves both modes. Only its integer encoding changes:

* radix 10: `m x 1000`, which is exact;
* radix 16: `m x 4096`, rounded.

Only `m_H2`, `m_H1`, `m_L2` and `m_L1` are stored. The others follow by symmetry:
`m_H-1 = -m_H2`, `m_H0 = -m_H1`, and so on. The constants are computed once per
division and held in registers.

Per row, `(m x 100)` for `m_H2 / m_H1 / m_L2 / m_L1`:

| d interval   | m_H2 | m_H1 | m_L2 | m_L1 |   | d interval   | m_H2 | m_H1 | m_L2 | m_L1 |
|--------------|------|------|------|------|---|--------------|------|------|------|------|
| [.100,.106)  |  -   |  26  |  16  |  4   |   | [.42,.50)    |  -   | 114  |  68  | 24   |
| [.106,.120)  |  -   |  28  |  16  |  4   |   | [.50,.57)    | 320  | 132  |  80  | 24   |
| [.12,.13)    |  -   |  32  |  20  |  8   |   | [.57,.63)    | 352  | 144  |  88  | 36   |
| [.13,.14)    |  -   |  34  |  20  |  8   |   | [.63,.69)    | 384  | 158  |  96  | 36   |
| [.14,.15)    |  -   |  36  |  20  |  8   |   | [.69,.75)    | 416  | 180  | 112  | 36   |
| [.15,.17)    |  -   |  40  |  24  |  8   |   | [.75,.82)    | 448  | 188  | 112  | 36   |
| [.17,.20)    |  -   |  46  |  28  |  8   |   | [.82,.88)    | 512  | 208  | 128  | 36   |
| [.20,.22)    |  -   |  52  |  32  |  8   |   | [.88,.94)    | 512  | 224  | 128  | 36   |
| [.22,.25)    |  -   |  58  |  36  |  8   |   | [.94,1.0)    | 576  | 224  | 140  | 36   |
| [.25,.30)    |  -   |  68  |  40  |  8   |   |              |      |      |      |      |
| [.30,.35)    |  -   |  80  |  48  | 16   |   |              |      |      |      |      |
| [.35,.42)    |  -   |  96  |  56  | 16   |   |              |      |      |      |      |

**Why the slice uses three fraction digits.** With only 2 fraction digits (units
of `r^-2`), the truncated divisor in the speculative `qL` path adds up to
`8 * r^-2` of error in radix 16. That breaks the bounds in two radix-16 rows. At
3 digits every constant keeps all its margins in both radices. The testbench
`tb_sel_constants` checks this for every 3-digit decimal divisor prefix and
every binary interval, in exact integer arithmetic.

## Conversion, remainder and rounding

* **Quotient registers (`otf_convert`).** The signed digits
  (-7..7 in radix 10, -10..10 in radix 16) are turned into two registers by
  on-the-fly conversion: `Q`, and `QM = Q - 1 ulp`. Each register shifts one
  digit per cycle and never propagates a carry. The registers hold BCD in
  radix 10 and hex (that is, binary) in radix 16.
* **Final remainder (`dr_cpa`).** A dual-radix ripple adder assimilates the
  final remainder and reports its sign and whether it is zero.
* **Correction and rounding (`round_norm`).**
  1. If the remainder is negative, it takes `QM` instead of `Q`.
  2. It normalizes by one BCD digit (radix 10, quotient in (0.1, 10)) or by one
     bit (radix 16, quotient in (0.5, 2)).
  3. It rounds to nearest, ties to even, using the round digit or round bit and
     a sticky made of the lower digits and "remainder is not zero".
  4. If rounding carries out (for example 9.99..9 becomes 10.0..0), it
     renormalizes.

## Interface and timing (`dr_divider`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | start a division; ignored while `busy` |
| `radix10` | in | 1 | 1: radix 10 (BCD), 0: radix 16 (binary) |
| `x`, `d` | in | 64 | dividend and divisor fractions; MS digit / MS bit in bit 63 |
| `busy` | out | 1 | division running |
| `done` | out | 1 | one-cycle pulse, result valid (held until the next result) |
| `q_sig` | out | 64 | radix 10: 16 BCD digits; radix 16: 53-bit significand in bits 52:0 |
| `q_exp_adj` | out | 2 | signed exponent adjustment, -1, 0 or +1 |
| `q_inexact` | out | 1 | quotient is not exact |
| `dbg_qh`, `dbg_ql`, `dbg_step` | out | 3, 3, 1 | selected digit parts, for observation |

The result means:

* radix 10: `x/d ~= q_sig * 10^(q_exp_adj - 15)`;
* radix 16: `x/d ~= q_sig * 2^(q_exp_adj - 52)`.

For a 53-bit binary operand, put the significand in bits 63:11. Any 64-bit
fraction is also accepted, and the rounding is still correct.

Latency from the clock edge that samples `start` to `done`:

* radix 10: 20 cycles;
* radix 16: 17 cycles.

`start` may be raised again in the `done` cycle. Sequencing is done by
`div_ctrl` in three steps:

1. Load cycle: captures the operands and radix, the multiples and the
   constants, and sets `w[0]`.
2. Iteration cycles, one quotient digit each.
3. One rounding cycle.

Assertions check that `done` never comes during a division and that the
estimate of `r*w` stays within its bound.

## Files

`rtl/` (one unit per file):

| file | contents |
|------|----------|
| `div_pkg.sv` | sizes, digit types, constant table, constant encoding |
| `dr_divider.sv` | top: registers and wiring of the datapath |
| `div_ctrl.sv` | sequencer |
| `dr_multiples.sv` | divisor multiples |
| `dr_mult_mux.sv` | choice of `-q * multiple` (complement plus carry-in) |
| `dr_csa.sv` | dual-radix digit carry-save adder |
| `sel_constants.sv` | divisor interval and selection constants |
| `ms_slice.sv` | binary estimate, `qH` selection, speculative `qL` selection |
| `otf_convert.sv` | on-the-fly conversion |
| `dr_cpa.sv` | remainder sign and zero flag |
| `round_norm.sv` | correction, normalization and rounding |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_util_pkg.sv`, which converts digit vectors to and from integers.
`tb_dr_divider` runs the complete divider at its default sizes. It runs 4154
divisions: directed cases, divisors on every table boundary, random 53-bit and
64-bit binary operands, random BCD operands, and back-to-back operations that
switch radix. It checks each division against a 128-bit integer reference and
checks the latency. It also counts the design's mechanisms (radix switch,
`qH = +-2`, `qL = +-2`, negative final remainder, normalization shift,
round-up, exact result) and fails if any of them never occurs.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/div_pkg.sv tb/tb_util_pkg.sv rtl/*.sv tb/tb_dr_divider.sv \
    --top-module tb_dr_divider -o sim
./obj_dir/sim
```

Each testbench runs in well under a second.

## Parameters

* `NDIG` (default 16): operand digits.
* `PBIN` (default 53): binary precision.

Widths and iteration counts derive from these two. The MS slice is fixed at
5 digits with 3 fraction digits (`div_pkg::MS_FRAC`). The selection-constant
table does not depend on the operand size.

## Where this design departs from, or adds to, the reference architecture

* **Radix-16 latency.** Radix 16 takes 17 cycles, where the reference figure is
  16. The `w[0] = x/r^2` start costs two leading digits, and 53 bits plus a
  round bit need 14 more hex digits. Radix 10 takes 20 cycles, which matches.
* **The MS slice is not a separate register slice.** Here the slice is rebuilt
  every cycle by converting the top residual digits to binary. The reference
  architecture keeps it as a separate binary slice that receives one converted
  digit per iteration. The results are the same; the critical path is not.
* **No `qH` register.** `qH` is selected and used in the same cycle, straight
  from the registered remainder. The reference architecture stores `qH` in
  flip-flops between its selection and its use. The speculative `qL` blocks
  and the 5:1 multiplexer are built as described.
* **Operand checks.** An assertion flags radix-10 operands that are not valid
  BCD or have a zero leading digit, and radix-16 operands whose leading bit is
  clear.
* **Slice precision.** The slice uses 3 fraction digits instead of 2, so the
  constants are scaled by `r^3`. The reason is given above.
* **`rho` in radix 16.** Radix 16 is checked with `rho = 2/3`: the largest digit
  is 10, and 10/15 = 2/3. That is the value the constant table satisfies.
* **Unspecified details.** The inside of the adder cell, the negation scheme,
  the operand formats, round-to-nearest-even, the start/busy/done handshake and
  the synchronous reset are this design's own choices.
* **Not modelled.** Exponent handling, signs and special values (zero,
  infinity, NaN) are not modelled. The unit divides normalized significands
  only.
