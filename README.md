# Indian-arithmetic co-processor

A long-precision arithmetic co-processor whose five units each compute in
hardware one of the digit-serial methods of Indian ("Vedic") mental
arithmetic:

| unit | method | digits |
|---|---|---|
| `mul_unit` | Urdhva Tiryak ("vertically and crosswise") multiplication | base 256, unsigned |
| `sqr_unit` | Dwandwa (duplex) squaring | base 256, unsigned |
| `div_unit` | straight division with look-ahead and correction | base 8, signed digits −7..7 |
| `sqrt_unit` | Dwandwa square root with look-ahead and correction | base 8, signed digits −7..7 |
| `divis_unit` | Ekadhika osculation (divisibility test) | base 256, unsigned |

These methods suit variable-length numbers because they work in place. Each
result digit comes from a short dot product of operand digits: a *cross
product* for multiplication and division, a *Dwandwa* for squaring and roots.
No partial products are stored. A host computer sends operands four bits at a
time, starts a unit and reads the result back the same way. The host also does
the pre- and post-processing: normalising divisors, converting to and from
signed digits, finding the Ekadhika and finishing the short divisibility test.

The top level, `indian_coproc`, places all five units side by side behind one
nibble port, and `unit_sel` chooses the active unit. The original system loaded
one unit at a time into a small FPGA. In this design, selecting a unit plays
the part of that reconfiguration.

## Host port and the assembling unit

`nibble_assembler` connects the 4-bit host path to the unit memories.

- **Wide mode** (multiplication, squaring, divisibility): two nibbles, low
  nibble first, form one byte digit.
- **Narrow mode** (division, square root): each nibble is one 4-bit
  two's-complement digit.

Writes go to consecutive addresses from 0. `clr` restarts the write and read
counters. Each `nib_req` pulse moves the read side to the next nibble.

A typical operation on the top level runs as follows:

1. Set `unit_sel`. Pulse `clr`, set `bank` (A or B) and send operand A as
   nibbles with `nib_valid`. Repeat for operand B.
2. Raise `reg_sel`, pulse `clr` and send five bytes (two nibbles each, low
   first) into the operand registers:
   - address 0: length A;
   - address 1: length B;
   - address 2: precision (division and square root);
   - address 3: `a0`;
   - address 4: the 5-bit `ext_remd` (square root).

   Then lower `reg_sel`.
3. Pulse `start` and wait for `done`.
4. Pulse `clr`, then read the result from `nib_out`. Each `nib_req` pulse moves
   to the next nibble.

| unit | operand A | operand B | result |
|---|---|---|---|
| multiplication | multiplicand | multiplier | product at addresses 0.., least significant digit first |
| squaring | number | — | square at addresses 0.., least significant digit first |
| division | dividend | divisor | quotient at addresses 0.., most significant digit first |
| square root | number | — | root digits at addresses 0.. (address 0 holds `a0`) |
| divisibility | dividend | Ekadhika | reduced number, `res_len` digits, least significant digit first |

The units keep the original layouts: multiplication, squaring and divisibility
store digits least significant first, and division and square root store them
most significant first. For divisibility the top adds `res_base` to the read
address automatically.

`wr_we`, `wr_waddr` and `wr_wdata` show the active unit's result writes as
they happen. Division and square-root corrections appear there as rewrites of
earlier addresses.

`corr_count` reports the corrections made (division and square root) or the
osculations done (divisibility).

## Cross product and Dwandwa engines

`cross_product` computes Σ X[i]·Y[j] over two address ranges that move in
opposite directions. It has two multipliers and reads each dual-port memory at
both ends of its range, so it handles two digit pairs per cycle and one pair
when the pointers meet. A vector of length L takes ⌈L/2⌉ accumulate cycles plus
one `done` cycle.

`dwandwa` computes the duplex of a digit range. That is twice the sum of
mirrored pairs, plus the square of the middle digit when the range length is
odd. It uses one multiplier and doubles each product with a shift, so it has
the same ⌈L/2⌉ + 1 timing.

Both engines take a `SIGNED` parameter. The base-8 units use them with 4-bit
two's-complement digits.

## Multiplication and squaring

Product digit k is the cross product of the digit pairs with i + j = k, plus
the carry from digit k − 1. The low byte is written out and the rest becomes
the next carry.

The start and end pointers follow the Urdhva Tiryak pattern:

- The end pointer of the first operand advances until it reaches that
  operand's last digit. After that, the start pointer of the second operand
  advances.
- The same rule applies with the two operands swapped.

The final carry becomes the top digit. Squaring works the same way, with
Dwandwas over one number.

Cycles: 3 + Σ_k (⌈L_k/2⌉ + 2), where L_k is the length of the k-th vector. A
10 × 10 multiplication takes 96 cycles and a 20 × 20 one takes 291. The
testbenches check these formulas exactly.

## Straight division (the hardest part)

The dividend B and divisor A are base-8 signed-digit numbers. The divisor is
normalised by the host so that its leading digit a0 is 4..7. Quotient digits
q_t are produced one per step. Only a0 is ever divided by. The other divisor
digits enter through cross products with earlier quotient digits.

At step t:

- partial dividend `D = 8·S + b_t − (LA_{t−1} + q_{t−1}·a1)`, where S is the
  previous remainder;
- look-ahead `LA_t = Σ_{j≥1} q_{t−j}·a_{j+1}`. This is the part of the next
  cross product that is already known. The cross-product engine computes it
  while the current digit is being decided;
- modified partial dividend `D' = D − (LA_t >>> 3)`.

**Correction determiner.** If |D'| < 8·a0, the new digit is
`q_t = trunc(D'/a0)`, computed by `nr_divider` on magnitudes with the sign
applied afterwards. The remainder is `S = D − q_t·a0`.

**Correction unit.** If |D'| ≥ 8·a0, the previous digit was too small or too
large. The unit moves q_{t−1} by δ = sign(D') and updates D and LA to match.
It then checks again and may correct again.

If the previous digit is already at ±7, it wraps by ∓8 and the change carries
into the digit before it. A correction that touches J digits changes the
state by:

- `D −= δ·(8·a0 + a1 + … + aJ)`
- `LA += δ·((1 − 8)·(a2 + … + aJ) + a_{J+1})`

At the first digit, where there is nothing left to correct, the digit
saturates at ±7.

Cycles: 2 + Σ_t (⌈L_t/2⌉ + 5), with L_t = min(n − 2, t). Add 4 cycles for each
correction, plus one more cycle for each extra digit a correction carries into.
The quotient is correct to a few units in its last digit. The testbench checks
|B·8^(n−1) − Q·A| < 4|A|.

## Square root

The host supplies the following:

- the leading group G of the number (at most 63);
- its integer root r0 = A0 (`a0`);
- the external remainder `ext_remd` = G − A0²;
- the remaining digits.

With T = 2·A0, root digit r_k comes from:

- `D = 8·S + b_k − Dw_k`, where `Dw_k = LA_{k−1} + 2·r1·r_{k−1}` (r1² when
  k = 2);
- `LA_k` = the Dwandwa of r2..r_{k−1}, computed by the Dwandwa engine on the
  root memory;
- `D' = D − (LA_k >>> 3)`. If |D'| < 8T, `r_k = trunc(D'/T)` and
  `S = D − T·r_k`.

Otherwise the correction unit moves r_{k−1} by δ and applies the exact change:

- `D −= δ·8T + 2·r1·δ`, plus an extra −δ when k = 2;
- `LA += 2·r2·δ`, plus an extra +δ when k = 3.

A correction can rewrite the same root address several times. If r_{k−1} is
already at ±7, or k = 1, r_k saturates at ±7.

Cycles: 2 + Σ_k (⌈max(0, k − 2)/2⌉ + 5), plus exactly 3 cycles per correction.
The testbench checks |N − R²| < (2·A0 + 16)·8^p.

The unit assumes that A0 is the integer root of the whole number. With signed
digits, the host should keep G one unit inside [A0², (A0+1)² − 1].

## Divisibility by osculation

For an odd divisor M, the Ekadhika is E = (M·k + 1)/256, where k is chosen so
that M·k ends in the digit FFh. Then 256·E ≡ 1 (mod M).

The unit repeats `P ← ⌊P/256⌋ + E·(P mod 256)`. This multiplies P by 256⁻¹
modulo M, so divisibility by M never changes. It stops when P has at most r + 1
digits, where r is the length of E. The host then tests that short number.

Each osculation is a multiply-and-add pass:

- The product E[k]·d plus the multiplier carry gives a low byte.
- That byte is added to P[k+1] with the adder carry.
- The sum is written back in place.

Dropping the last digit is done by moving the base address up by one. The pass
continues while Ekadhika digits or carries remain. When a carry reaches the top
digit, the length does not shrink on that pass.

Cycles: 3 + Σ_osc (2 + r + t), where t counts the extra carry digits. For the
sizes 40/20, 60/30 and 120/70 this measures 423, 931 and 3532 cycles, against
421, 931 and 3531 from the closed-form estimate with t = 0.

Example: 111E76270103h with Ekadhika 031694h (divisor 0B2289h) reduces to
13662AAEh.

## Timing against the original's figures

The table below converts measured cycle counts to time at the clock rates
reported for each unit of the original FPGA build. Division and square root
depend on how many corrections occur; the rows use random operands, with the
correction count in brackets.

| operation | size | cycles here | µs here | µs, original's table |
|---|---|---|---|---|
| multiplication, 15.576 MHz | 10 × 10 | 96 | 6.16 | 7.64 |
| | 20 × 10 | 166 | 10.66 | 14.70 |
| | 20 × 20 | 291 | 18.68 | 28.18 |
| squaring, 14.272 MHz | 10 | 96 | 6.73 | 8.34 |
| | 20 | 291 | 20.39 | 30.76 |
| division, 16.313 MHz | n = 10, p = 10 | 76 (0) | 4.66 | 4.00 |
| | n = 10, p = 20 | 166 (0) | 10.18 | 8.00 |
| | n = 20, p = 10 | 77 (0) | 4.72 | 5.44 |
| | n = 20, p = 20 | 227 (6) | 13.92 | 7.815 |
| square root, 17.039 MHz | n = 10, p = 10 | 72 (0) | 4.23 | 3.528 |
| | n = 20, p = 20 | 192 (0) | 11.27 | 9.991 |
| divisibility, 13.902 MHz | 40 / 20 | 423 | 30.43 | 31.85 |
| | 60 / 30 | 931 | 66.97 | 69.24 |
| | 120 / 70 | 3532 | 254.06 | 259.05 |

The testbenches print these numbers. Multiplication and squaring come out
faster than the original's closed-form estimates, because those estimates
count one product per cycle. Division and square root come out slower,
because each digit spends a few extra cycles in the check, decide and write
steps. Divisibility matches its closed-form count to within a few carry
cycles.

## Sizes

| parameter | default | why |
|---|---|---|
| `MUL_DEPTH`, `SQR_DEPTH` | 32 digits per operand, 64 result digits | hold the 20-digit cases used to rate the original |
| `DIV_DEPTH`, `SQRT_DEPTH` | 32 digits | hold the 20-digit, 20-digit-precision cases |
| `DIVIS_DEPTH` | 128 digits | holds a 120-digit dividend with a 70-digit Ekadhika |

The original gives its memories only as FPGA CLB counts. The depths of 32 are
this design's choice.

## Where this design departs from the original

- **All units at once.** All five units are instantiated together and selected
  by `unit_sel`, not reconfigured.
- **Operand registers.** Lengths, precision, A0 and the external remainder
  travel through the nibble port as the original does. The register
  addresses and the `reg_sel` strobe are this design's own.
- **Cycle counts.** They follow the two-multiplier and ⌈L/2⌉ structure
  described for the engines. The closed-form cycle figures printed for the
  original multiplier (mn + m + n − 1) and squarer (n² + 2n − 1) correspond to
  one product per cycle, and those are not reproduced. Division and square
  root take a few more cycles per digit than the original's
  ⌈np/4 + 3.5p + 3p/n⌉ and ⌈np/4 + 3.5p⌉.
- **External remainder.** The square root's external remainder is G − A0².
  The original describes it as "the remainder of the leading digits divided by
  2·A0", which does not fit the method. Its printed example digits for 33420₈
  are therefore not reproduced. The root is checked by value instead.
- **Correction details.** In division and square root, the carried
  corrections and the saturation at ±7 are this design's own way of handling
  a digit that cannot move further.
- **Divisibility start.** The divisibility unit reads the first multiplier
  digit from its own memory instead of taking it as an input.

## Files and simulation

- `rtl/ia_pkg.sv` holds shared types: the unit-select enum, the bank enum and
  the digit widths.
- `rtl/dp_ram.sv` is the memory used throughout. It has one synchronous write
  port and two asynchronous read ports.
- Every unit has a self-checking testbench, `tb/tb_<module>.sv`. Each one
  compares against an independent model in the testbench, checks the cycle
  counts above, and ends with a `TB_RESULT checks=… failures=…` line.
- `tb/tb_indian_coproc.sv` runs the whole design at its default sizes through
  the nibble port. It covers all five units, the worked examples and the
  largest sizes. It also follows the write stream and compares it with the
  digits read back. It fails unless each of these occurs at least once:
  division corrections, carried corrections, root corrections, saturated root
  digits, top-digit carries in the osculation, result addresses rewritten by
  a correction, and wide/narrow switches.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -Irtl rtl/ia_pkg.sv tb/tb_indian_coproc.sv \
  --top-module tb_indian_coproc -o sim && ./obj_dir/sim
```
