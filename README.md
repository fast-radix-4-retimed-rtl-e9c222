# Radix-4 divider with retimed selection by comparisons

This is a significand divider for double precision. It produces one radix-4
quotient digit from {-2, -1, 0, 1, 2} per clock and keeps the partial
remainder (the *residual*) in carry-save form. A 53-bit rounded quotient takes
30 cycles after `start`.

In a divider of this kind, choosing the next digit is the slow step. The
usual selection logic is a small table indexed by a few bits of the residual
and of the divisor. Here that table is replaced by comparisons:

* The divisor does not change during a division. So the four *selection
  constants* m_2, m_1, m_0, m_-1 that belong to it are looked up once and kept
  in registers.
* Each comparison "estimate >= m_k" is split into a carry-free (carry-save)
  subtraction of m_k and a sign detection.
* Most of the subtraction is moved one iteration earlier. The estimate for
  the next digit is 4w[j] = 16w[j-1] - 4q_j d. Subtracting m_k from the
  16w[j-1] part does not depend on the current digit q_j, so it runs in
  parallel with the multiplexer that chooses q_j. Only one half-adder row and
  the sign detectors still wait for the digit.
* The two state registers go where they shorten the cycle most. R2 holds the
  carry-save residual. R1 holds a half-finished sign detection, not the digit
  itself. The digit is decoded from R1 at the start of each cycle.

## Division step by step

The unit divides x by d, where both are normalised significands 0.1xxx with
53 bits (x, d in [1/2, 1)). Write n = NDIG = 27: that is 54 quotient bits,
53 plus one for rounding, at two bits per digit.

| cycle (clock edges after the edge that takes `start`) | what happens |
|---|---|
| edge 0 (`start` taken) | R2 <- w[-1] = x/16. R1 <- a state that decodes to q_0 = 0. The divisor register and the constant registers are loaded. Q/QM are cleared. |
| edges 1 .. n+1 | iteration j = 0..n: the unit decodes q_j from R1 and writes w[j] = 4w[j-1] - q_j d into R2. It writes the partial signs for q_{j+1} into R1 and appends q_j to the quotient. |
| edge n+2 | q_{n+1} is applied, which gives w[n+1]. |
| edge n+3 = 30 | The residual is added up, its sign corrects the quotient, then the quotient is normalised and rounded. `done` pulses and the result registers are loaded. |

Starting from w[-1] = x/16 and q_0 = 0 keeps w[0] = x/4 within the
convergence bound w <= (2/3) d. As a result the digits build x/(4d), and one
extra iteration is needed.

## The selection path (`qsel_retimed`)

This is the part that differs from a textbook divider.

**Estimate.** The digit q_{j+1} is chosen from yhat = 4w[j] truncated to
t = 4 fractional bits, following the selection rule

    q_{j+1} = k   if   m_k <= yhat < m_{k+1}

The unit never forms yhat itself. For each k it forms yhat - m_k directly:

    yhat - m_k = trunc_4( [ trunc_5(16 w[j-1]) - m_k ] + trunc_5(-4 q_j d) )

All selection-path words are 10 bits wide: 5 integer and 5 fractional bits,
arithmetic modulo 32. `ws16`/`wc16` are bits F..F-9 of the two residual
vectors. At those weights 16w[j-1] runs from 2^4 down to 2^-5. The narrow
multiplexer takes the matching 10 bits of d and 2d. Because bit-inversion
commutes with slicing, its output is exactly the slice of the wide
multiplexer's output that the residual adder will add.

**Why the result is exact, not just close.** In a carry-save adder, a result
bit at weight 2^-4 depends only on the inputs at 2^-4 and 2^-5. The unit
therefore works at 5 fractional bits, then drops the 2^-5 sum bit. What is
left equals, bit for bit, the truncated estimate that a conventional unit
would take from the stored 4w[j], minus m_k. m_k has no 2^-5 bit, so it does
not disturb that bit. This is why the constants can be the ordinary ones of a
table-based radix-4 divider.

**Adders.** Each comparison uses two 3:2 rows. Each row is built as two
half-adder rows (`csa_split`).

* The first row adds the two residual vectors and -m_k.
* The first half-adder row of the second 3:2 row adds the two results.
* The second half-adder row adds the narrow-multiplexer term.

Everything before that last row depends only on R2 and the constant
registers.

**Sign detectors.** Each detector is 6 bits wide. In the selection table some
signs do not matter in some ranges of yhat: z_2 is only looked at when
z_1 >= 0, and z_-1 only when z_0 < 0. This bounds the values that must be
represented:

| comparison | integer + fractional bits | window of the 10-bit vectors |
|---|---|---|
| z_2 = yhat - m_2  | 2 + 4 | bits 6..1 |
| z_1 = yhat - m_1  | 3 + 3 | bits 7..2 |
| z_0 = yhat - m_0  | 3 + 3 | bits 7..2 |
| z_-1 = yhat - m_-1 | 2 + 4 | bits 6..1 |

Dropping one more fractional bit for z_1 and z_0 adds error to the estimate,
up to 1/4 instead of 1/8. The constants m_1 and m_0 are chosen so that they
still select correctly. They are multiples of 1/8, except in the first
divisor row.

**Register R1 and the coder.** A 6-bit sign is a5 ^ b5 ^ carry-into-bit-5.
`sd_upper` computes h = a5 ^ b5 and the carry-lookahead terms of bits 4:3
(G, P) and 2:0 (G). These 4 bits per comparison, 16 flip-flops in all, are
register R1. After the clock edge, `sdc_lower` finishes each sign as
h ^ (G_hi | P_hi & G_lo) and codes the digit:

    z_1 >= 0 :  q = 2 if z_2 >= 0, else 1
    z_1 <  0 :  q = 0 if z_0 >= 0, else -1 if z_-1 >= 0, else -2

The loop that limits the cycle time is: R1 -> sign completion and coder ->
narrow multiplexer -> one half-adder row -> sd_upper -> R1. The residual
loop has only one 3:2 row plus the wide multiplexer.

## Selection constants

These are in units of 1/16, for dhat = the divisor truncated to 0.1bbb:

| dhat | 8/16 | 9/16 | 10/16 | 11/16 | 12/16 | 13/16 | 14/16 | 15/16 |
|---|---|---|---|---|---|---|---|---|
| m_2  | 12 | 14 | 15 | 16 | 18 | 20 | 20 | 22 |
| m_1  | 3 | 4 | 4 | 4 | 6 | 6 | 6 | 8 |
| m_0  | -5 | -6 | -6 | -6 | -8 | -8 | -8 | -8 |
| m_-1 | -13 | -15 | -16 | -18 | -20 | -20 | -22 | -24 |

Each entry satisfies, for every divisor d in [dhat, dhat + 1/16):

    m_k >= (k - 2/3) d
    m_k + err - grid <= (k - 1/3) d

Here err is the largest estimate error (1/8 with 4 fractional bits, 1/4 with
3) and grid is the step of the truncated value (1/16 and 1/8). Some rows admit
more than one value; the table picks one. `tb_sel_const_preload` checks these
inequalities with real arithmetic. The constants live in `div_pkg` and are
stored negated, in the 10-bit selection format.

## Number formats

* Residual (R2, wide multiplexer, residual adder): W = 60 bits, two's
  complement, in carry-save form. It has 3 integer bits and F = N + 4 = 57
  fractional bits; bit F has weight 2^0. The two extra low bits, beyond the
  53 + 2 that 4w needs, make w[-1] = x/16 exact. Arithmetic is modulo 8, which
  is safe because |4w| < 8/3.
* Digits: `qdig_t` = {neg, two, one}, already decoded for the multiplexers.
* Quotient: `otf_conv` keeps Q and QM = Q - ulp in plain binary (QW = 56
  bits), updated on the fly as each digit arrives. After the last digit, QM
  is the quotient corrected for a negative residual. The quotient approximates
  x/(4d) * 2^56, so its leading one is at bit 54 (when x >= d) or at bit 53
  (when x < d).

## Termination and rounding (`div_final`)

One carry-propagate addition turns the final residual into a single number.
Its sign picks Q or QM. The result is normalised (`q_lt1` = 1 when x < d, so
the significand is shifted up by one) and rounded to nearest, ties to even.
The sticky bit comes from the lower quotient bits and from "residual not
zero". `inexact` reports that the rounded result is not exact.

## Interface of `radix4_div`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | take x and d; ignored while busy |
| x, d | in | N | significands, MSB must be 1 (an assertion checks it) |
| busy | out | 1 | high from the cycle after start until the rounding cycle; low again when done pulses |
| done | out | 1 | one-cycle pulse, 30 cycles after start |
| q_sig | out | N | rounded significand, MSB set, held until the next result |
| q_lt1 | out | 1 | x < d: quotient = q_sig * 2^-N, otherwise q_sig * 2^-(N-1) |
| inexact | out | 1 | rounding changed the value |

Exponent subtraction, signs and special operands (zero, infinity, NaN,
subnormal) are outside this unit.

Parameters: `N` (53) sets the significand width. `NDIG` ((N+2)/2 = 27),
`F`, `W` and `QW` are derived from it. The selection path does not depend
on N.

## Files

| file | block |
|---|---|
| `rtl/div_pkg.sv` | types, selection-path format, constant table |
| `rtl/radix4_div.sv` | top level |
| `rtl/div_ctrl.sv` | sequencer (start, recurrence cycles, rounding cycle, done) |
| `rtl/residual_unit.sv` | register R2 and the residual update through the wide multiplexer |
| `rtl/qsel_retimed.sv` | retimed digit selection, register R1 |
| `rtl/sel_const_preload.sv` | constant registers |
| `rtl/qd_mux.sv` | divisor-multiple multiplexer (wide and narrow instances) |
| `rtl/csa_split.sv` | 3:2 row made of two half-adder rows |
| `rtl/sd_upper.sv`, `rtl/sdc_lower.sv` | the two halves of the sign detector and coder |
| `rtl/otf_conv.sv` | on-the-fly quotient conversion |
| `rtl/div_final.sv` | residual sign, correction, normalisation, rounding |

Every module has a testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the project root:

    verilator --binary --timing --assert -Irtl -y rtl rtl/div_pkg.sv \
        tb/tb_radix4_div.sv --top-module tb_radix4_div -Mdir obj_top
    ./obj_top/Vtb_radix4_div

`tb_radix4_div` runs the full 53-bit design. It divides:

* corner cases;
* divisors at both edges of every constant row;
* exact quotients;
* 20000 random operand pairs.

Each result is compared with exact wide-integer division rounded to
nearest-even, and each must arrive 30 cycles after `start`. After every
recurrence step the testbench also checks the convergence bound
|w| <= (2/3) d. It counts how often each digit value, each constant row, a
negative final residual, both normalisation cases, rounding up and exact
results occur, and fails if any of them never happens. It runs in about half
a second. The block testbenches are built the same way, with their own top
module.

## How far it can be trusted, and what is this design's own

Verified in simulation:

* the whole divider against exact division, about 25000 operand pairs at
  N = 53, with the residual bound checked after every step;
* the digit-selection unit on its own (`tb_qsel_retimed`), on 200000 random
  residuals and divisors across all rows: the chosen digit must meet the
  containment condition (q - 2/3) d <= y <= (q + 2/3) d. The check does not
  depend on how the unit is built. It catches a single wrong table entry;
* every block against an independent reference, several exhaustively;
* each testbench shown to fail on a deliberately broken copy of its module.

Nothing here has been synthesised to a cell library. The cycle-time benefit
(a critical path of about 16 inverter delays, against about 22 for a
conventional table-based radix-4 unit) is the method's claim and has not been
measured here.

Choices that the method leaves open, made here:

* **Constant table.** Derived as above. For dhat = 15/16 it uses
  m_-1 = -24/16. The magnitude 22/16 that a symmetric table would give does
  not meet the conditions under this unit's error model.
* **Where R1 cuts the sign detector.** The method puts the register inside
  the sign detector and coder but does not say where. Here the cut comes
  after the group carry terms.
* **Wide multiplexer width.** It is 60 bits rather than 56, so that x/16 fits
  exactly.
* **Rounding mode.** Nearest-even, plus the `q_lt1` and `inexact` outputs.
* **Handshake.** The start/busy/done handshake, the reset values and the
  digit encoding are all this design's choice.

Not included: square root, which could share the recurrence, and any radix
other than 4.
