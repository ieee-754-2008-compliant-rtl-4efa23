# Decimal64 floating-point divider (AQA, 15 cycles)

This is a synthesizable SystemVerilog divider for IEEE 754-2008 decimal64 numbers in the DPD
encoding. It takes two 64-bit operands and a rounding mode. Fifteen clock cycles later it returns
the correctly rounded quotient, at the preferred exponent the standard asks for, together with the
five exception flags.

The core is a decimal version of the *Accurate Quotient Approximation* (AQA) algorithm. The
divisor's reciprocal is looked up once in a table. The quotient is then built three decimal digits
at a time by multiplications only, with no quotient-digit selection and no comparisons. All wide
arithmetic stays in carry-save form in the redundant 4221 decimal code. The design follows the
architecture of the thesis "IEEE 754-2008 Compliant Decimal Floating Point Divider". The places
where it departs from that design are listed under [Departures](#departures-from-the-original-design).

## Top-level interface (`dfp_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `start` | in | 1 | one-cycle pulse while `busy` is low; captures `fx`, `fy`, `rm` |
| `fx`, `fy` | in | 64 | dividend and divisor, decimal64 DPD |
| `rm` | in | 3 | rounding mode, see below |
| `busy` | out | 1 | high while a division is in progress |
| `done` | out | 1 | one-cycle pulse; `fq` and `flags` are valid and hold until the next result |
| `fq` | out | 64 | quotient, decimal64 DPD |
| `flags` | out | 5 | `{invalid, div_by_zero, overflow, underflow, inexact}` (`dfp_pkg::dfp_flags_t`) |

`done` rises exactly 15 cycles after the clock edge that accepted `start`. A new `start` is
accepted once `busy` is low again. Divisions are not pipelined.

Rounding modes (`dfp_pkg::round_mode_e`): 0 ties-to-even, 1 ties-away-from-zero, 2 toward +inf,
3 toward -inf, 4 toward zero, 5 ties-toward-zero (half-down), 6 away from zero. Codes 0 to 4 are the
IEEE 754-2008 modes. The code assignment is this design's choice.

## How a division proceeds

### Front end (cycle 1)

`dfp_unpack` decodes each operand into sign, 10-bit biased exponent and 16 BCD digits.
`operand_normalizer` then shifts each coefficient left until its top digit is non-zero and reports
the number of leading zeros. Special operands are classified in the same cycle: NaN, infinity, zero
divisor and zero dividend. They bypass the arithmetic, but the result still appears after 15
cycles. `exponent_calc` forms the intermediate biased exponent:

    e_int = Ex - Ey + LZy - LZx + 398 - 15

This is the exponent of a 16-digit coefficient whose first digit is the first significant quotient
digit when X >= Y. One more is subtracted later if X < Y.

### The AQA recurrence (cycles 2 to 11)

Let Xn and Yn be the normalized coefficients, read as fractions 0.1 <= X, Y < 1.

1. **Reciprocal lookup.** `bcd2bin4` turns the four leading divisor digits `a` (1000..9999) into
   a binary address. `recip_rom` returns `S = floor(10^7 / (a + 1))`, the four leading digits of
   1/Yh. Here Yh is the divisor prefix padded with nines, so S never overestimates 1/Y. The table
   has 9000 entries of 16 bits and is computed from this formula at elaboration.
2. **Divisor prime.** `Y' = Yn * S` is formed on the shared 38 x 16 digit multiplier and
   resolved by a BCD adder to 20 digits. It is slightly below 1. The multiples 0..9 of Y' and of
   S are precomputed once (`dec_multiples`).
3. **Iterations.** The remainder R has one integer digit and 24 fraction digits and starts as X.
   Rh is its six leading digits. Each iteration computes

        R <- (R - Rh * Y') * 1000        (partial_remainder, then a 3-digit shift)
        Q <- Q * 1000 + Rh * S           (quotient_generator)

   Rh * Y' is six partial products selected from the precomputed multiples and
   nines-complemented. They are added to R with a constant in a 4221 carry-save tree, and one
   BCD adder resolves the new remainder. This is the critical path. Q is never resolved during the
   loop. It stays as two 4221 vectors, and each step adds the six partial products of Rh * S into
   them. Because Y' <= 1 and Rh <= R, R never goes negative. Because S <= 1/Y, the running
   quotient never overshoots. Seven iterations give a quotient Q/10^26 that lies below X/Y by
   less than 10^-19.

### Final quotient selection (cycles 12 to 14)

The quotient vectors are added. If the digit in front of the point is 0, then X < Y and the
window moves one digit down. The 17-digit truncation T (16 result digits and a guard digit) is
Q' in the original notation, and `Q'' = T + 1` (one unit in the guard position). The true quotient
lies in [T, T + 1), so the choice needs only the sign of one remainder:

    R = Xn * 10^(16 or 17) - Q'' * Yn        (multiplier again, then a 4221 tree)

* R = 0: Q'' is the exact quotient. It is chosen and marked exact.
* R > 0: Q'' is still below the true value, so it is chosen, and the result is inexact.
* R < 0: Q'' is too large, so T is chosen, and the result is inexact (sticky).

Exactness is read straight off the carry-save remainder by `zero_vector_counter`. The sign is
taken from the resolved remainder's top digit, which is 9 in ten's complement.

### Tail zeros and the preferred exponent (cycles 2 to 7)

For an exact quotient the standard wants the exponent as close as possible to Ex - Ey. The divider
therefore predicts how many trailing zeros the exact quotient keeps at that exponent, in parallel
with the recurrence. `tail_zero_detector` takes the trailing zeros TZx and TZy of both operands
from their digit flags and strips them. It then counts the factors 2 and 5 of each stripped
coefficient. Multiplying by 5^53 turns every factor 2 into a trailing decimal zero. Multiplying by
2^22 does the same for every factor 5. Both products run on the shared multiplier, and
`zero_vector_counter` counts the zeros of the carry-save product without resolving it. The value

    FRTZ = max(0, TZx - TZy - max(0, Y2 - X2) - max(0, Y5 - X5)),  limited to 15

tells `shift_round` how many of the quotient's trailing zeros to keep.

### Shift, round, pack (cycle 15)

`shift_round` chooses a right shift of the 17-digit quotient:

* **Exact result:** drop trailing zeros down to FRTZ. The shift is capped so the exponent never
  passes 767. If the value is too large for the exponent range, this clamping pads with zeros.
* **Tiny result** (exponent below the minimum): shift by at least the underflow distance. The
  result becomes subnormal or rounds to zero or to the smallest subnormal.

The digit at the guard position and a sticky bit (lower digits, or an inexact quotient) decide a
+1 increment, which a 16-digit BCD adder applies. A carry out renormalizes to 1000...0 and raises
the exponent. Overflow returns infinity or the largest finite number, depending on mode and sign.
Flags follow IEEE 754-2008. Underflow means tiny before rounding and inexact. Inexact is set by any
lost digit and by overflow. `dfp_pack` then encodes the DPD result.

### Special operands

| case | result | flags |
|---|---|---|
| either operand NaN | quiet NaN with the payload of the first NaN operand | invalid if either is a signalling NaN |
| 0/0, inf/inf | quiet NaN | invalid |
| inf/finite | signed infinity | - |
| finite/inf | signed zero, smallest exponent | - |
| finite non-zero / 0 | signed infinity | div_by_zero |
| 0 / finite non-zero | signed zero, exponent Ex - Ey clamped to the format | - |

## Decimal building blocks

* **4221 and 5211 codes.** Each digit is four bits weighted 4-2-2-1 (or 5-2-1-1). Every pattern is
  a valid digit, and inverting the bits gives the nines complement, so subtraction is inversion
  plus a constant. A 4221 number is doubled by recoding each digit to 5211 and shifting left by one
  bit.
* **`dec_csa_tree`.** A decimal 3:2 carry-save adder is a bitwise full adder on 4221 vectors plus
  the doubling of the carry vector. The module builds a tree of them for any number of inputs at
  elaboration time.
* **`dec_multiples`.** Forms 0X..9X in 4221. 2X, 4X and 8X come from repeated doubling. 5X is
  built digit by digit. 3X, 6X, 7X and 9X each add an "individuals" vector and a "tens" vector with
  a BCD adder.
* **`dec_multiplier`.** The 38 x 16 digit multiplier: multiples, one partial product per
  multiplier digit, and a 16-input tree. Its result is left as two vectors. Every user reads what
  it needs from that pair.
* **`bcd_adder` with `bcd_carry_extractor`.** Digits are first added as plain 4-bit sums. The
  carry into every digit is found from digit propagate (sum = 9) and generate (sum > 9) signals in
  sum-of-products form. A 0, 1, 6 or 7 correction then fixes each digit.

## Cycle schedule

| cycle | shared multiplier | fixed-point divider | other |
|---|---|---|---|
| 1 | - | - | unpack, classify, normalize, exponent |
| 2 | X * 5^53 | reciprocal lookup | |
| 3 | Yn * S | | capture X's 2s |
| 4 | X * 2^22 | load Y' multiples, R = X | |
| 5 | Y * 5^53 | iteration 1 | capture X's 5s |
| 6 | Y * 2^22 | iteration 2 | capture Y's 2s |
| 7 to 11 | - | iterations 3 to 7 | capture Y's 5s (7) |
| 12 | - | - | resolve Q, form T and Q'' |
| 13 | Q'' * Yn | - | |
| 14 | - | - | remainder zero/sign |
| 15 | - | - | shift, round, pack, `done` next edge |

## Departures from the original design

* **Quotient selection.** The original text picks Q'' when the remainder X - Q''*Y is negative or
  zero. That contradicts its own error bound: a negative remainder means Q'' is too large. This
  design picks Q'' when the remainder is zero or positive.
* **Hidden-carry correction.** The original quotient generator adds a "minus one" vector when the
  two intermediate-quotient vectors carry out of their tenth digit. Here both vectors are
  non-negative and add up to a value below 10^10, so that carry cannot happen, and the correction
  is left out.
* **Underflow by more than 16 digits.** The original sets the quotient to zero. Here the sticky bit
  still rounds it, so toward-+inf and away-from-zero modes return the smallest subnormal, as the
  standard requires.
* **BCD adder correction.** The correction is +6 when a digit overflows, plus the incoming carry.
  A 9-sum digit with no carry in gets nothing.
* **Address width.** The BCD-to-binary converter has a 14-bit output, since 9999 needs 14 bits.
* **Flags and modes.** Rounding and flag rules follow IEEE 754-2008 directly. Two extra rounding
  modes, ties-toward-zero and away-from-zero, fill the 3-bit mode field.
* **Control details of this design's own.** The start/busy/done handshake, the synchronous reset,
  the exact order of the products on the shared multiplier, and the results for x/inf and 0/y.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block with integer
arithmetic in `tb/tb_dfp_ref_pkg.sv`, which is independent of the RTL: binary big-number division,
the IEEE rounding rules, and DPD tables written from the standard. Each testbench prints
`TB_RESULT checks=N failures=M`.

`tb_dfp_divider` drives the full divider at its default size. It runs 22 directed cases and 3000
random divisions across all rounding modes. The random cases are weighted towards exact quotients,
powers of 2 and 5, overflow and underflow ranges, near-one ratios, and zero, infinity and NaN
operands. It checks every result bit, every flag and the 15-cycle latency. It also counts each
mechanism: trailing-zero shifts, underflow shifts, choosing Q' and Q'', X < Y and X >= Y, rounding
increments, and each exception. A mechanism that never occurs counts as a failure.

The original design was verified against a published suite of 949,966 decimal division cases.
That suite is not included here.

Simulate with Verilator, for example:

    verilator --binary -Irtl -Itb --top-module tb_dfp_divider \
        rtl/dfp_pkg.sv tb/tb_dfp_ref_pkg.sv tb/tb_dfp_divider.sv
    ./obj_dir/Vtb_dfp_divider

Replace the top and the last file name to run a block testbench, for example `tb_bcd_adder`.
`NOPS` in `tb_dfp_divider` sets the number of random divisions.

## Size

Coarse synthesis of the top gives about 22,000 generic cells, 1,323 flip-flop bits and the
144,000-bit reciprocal table. The 38 x 16 digit multiplier, shared by the tail-zero count, Y' and
Q'' * Y, is the largest block.

## Files

| file | content |
|---|---|
| `rtl/dfp_pkg.sv` | constants, rounding-mode enum, flag struct, digit-code and DPD helpers |
| `rtl/dfp_divider.sv` | top: control, special cases, quotient selection, final remainder |
| `rtl/dfp_unpack.sv`, `rtl/dfp_pack.sv` | DPD to BCD and back |
| `rtl/operand_normalizer.sv`, `rtl/exponent_calc.sv` | front end |
| `rtl/fixed_point_divider.sv` | AQA loop, with `partial_remainder.sv`, `quotient_generator.sv` |
| `rtl/bcd2bin4.sv`, `rtl/recip_rom.sv` | reciprocal lookup |
| `rtl/tail_zero_detector.sv`, `rtl/zero_vector_counter.sv` | preferred-exponent tail zeros |
| `rtl/shift_round.sv` | shift, rounding, overflow and underflow |
| `rtl/dec_multiplier.sv`, `rtl/dec_multiples.sv`, `rtl/dec_csa_tree.sv` | radix-10 multiplication |
| `rtl/bcd_adder.sv`, `rtl/bcd_carry_extractor.sv` | carry-extraction BCD adder |
| `tb/` | one testbench per block, the end-to-end test and the reference package |
