# Error-coded arithmetic: an AN-code processor and an inverse-residue adder

An arithmetic unit that works directly on error-detecting codes lets a plain,
cheap checker outside the unit catch any fault that spoils a result. It does
not need a duplicate unit. This repository holds two such units:

* **AN-code processor.** Every operand and every result is a multiple of
  A = 15. With 32-bit words the operands are 15·X for a 28-bit
  one's-complement integer X. The processor does clear add, add, subtract,
  multiply and divide on 4-bit bytes. Every intermediate and final result is
  sent on a 4-bit output bus. An external checker tests each result for
  "divisible by 15" with a 4-bit end-around-carry accumulator.
* **Inverse-residue adder.** A plain two's-complement main adder of n = k·a
  bits sits next to a small modulo-15 check adder. Each operand X carries a
  separate 4-bit check symbol X'' = 15 − (X mod 15). A checker tests whether
  the result and its check symbol agree.

Both are written in synthesizable SystemVerilog (`rtl/`). Each block has a
self-checking testbench (`tb/`). The top, `star_arith_top`, places the two
units side by side. The AN processor's output bus drives one checker.

## Number representation in the AN processor

* A coded word is 32 bits and holds 15·X in one's complement.
  - Negative numbers are bitwise complements.
  - Zero is written as all ones ("negative zero").
  - An all-zero word is not a valid code word. It is used to detect a dead
    bus.
* Residue check: a word is a multiple of 15 exactly when the sum of its
  eight nibbles, taken modulo 15 with end-around carry and starting from
  0000, is 1111. That is the only test the checker makes.
* Additive operations keep the code. The sum or difference of multiples of
  15 is a multiple of 15, including the end-around carry of one's-complement
  addition.
* Multiply and divide must be adjusted, because 15X · 15Y = 225·XY carries
  an extra factor of 15. Two helper operations provide that adjustment:
  - `an_mul15` multiplies a word by 15 in a single addition: 16·Z plus the
    complement of Z, with end-around carry.
  - `an_div15` divides an exact multiple of 15 by 15. It builds the quotient
    one nibble at a time, from the least significant nibble up. Each nibble
    is the complement of the running sum of the nibbles below it.

## Byte timing

One clock is one *byte time*. A *processor cycle* is 10 byte times
(`CYCLE_BYTES`). Operands enter on `di`, least significant nibble first, in
byte times 0–7 of the first cycle. The `start` clock is byte time 0.

Output signals on `do_byte`:

| Signal | Meaning |
|---|---|
| `do_valid` | A numeric byte that the checker adds into its sum |
| `perform_check` | The last byte of a result; the checker tests the sum now |
| `cc_valid` | A condition-code byte in two-out-of-four code |

| Condition | Code |
|---|---|
| positive | 0011 |
| zero | 0101 |
| negative | 0110 |
| additive overflow | 1001 |
| quotient overflow | 1010 |
| zero divisor | 1100 |

A final result is always followed by one condition-code byte.

### Clear add, add, subtract

These run byte by byte through the three-input adder.

* Each clock, the ACC-MD register rotates one nibble into the adder. The DI
  nibble and the carry register CBR join it there.
* The sum nibble goes back into ACC-MD and into the output buffer AOB. It
  appears on DO one clock later, in byte times 1–8.
* If no end-around carry occurs, the operation takes one cycle and the
  condition code is sent at byte time 9.
* If an end-around carry occurs:
  - The carry nibble 0001 is sent with perform-check, because the raw sum
    plus 1 is itself a multiple of 15.
  - A second cycle adds the carry into ACC-MD and sends the corrected word.
* Additive overflow is flagged when both operands have the same sign and
  the result has the other sign.
* Clear add adds the operand to all-zeros. It therefore never produces an
  end-around carry and always takes one cycle.

### Multiply (multiplicand in ACC-MD, multiplier on DI)

1. **Load cycle.** The multiplier enters MQ. A zero operand ends the
   operation in the next cycle, with the result zero.
2. **Eight radix-16 steps, low multiplier nibble first.**
   - The recoder (`an_recoder`) rewrites each multiplier nibble as at most
     two signed powers of two, for example 7 = 8 − 1 and 6 = 4 + 2.
   - Each non-zero term costs one *addition cycle*: ±1, ±2, ±4 or ±8 times
     ACC-MD is added to the partial product PR.
   - One's complement is handled by feeding the multiplier's sign into the
     recoder as the first carry. The top nibble is read as a signed digit.
3. **Contraction-and-shift cycle**, one per step.
   - It first subtracts 15·Nᵢ, choosing Nᵢ in 0..15 so that the result is a
     multiple of 16. Because 15 ≡ −1 mod 16, Nᵢ is minus the low nibble of
     PR, modulo 16.
   - It then shifts PR one nibble right and stores Nᵢ in MQ in place of the
     used multiplier nibble.
   - After eight steps, MQ holds N = Σ Nᵢ·16ⁱ and
     2³²·PR = 15X·15Y − 15N. PR is therefore 15 times the upper half of
     15·XY − N.
4. **Three terminal cycles.**
   - Divide PR by 15. This result is sent without a check.
   - Send N. The check now covers the sum of both. In the same cycle the
     roundoff logic (`an_roundoff`) finds the lower half of the true
     product from N alone, as K = −N·15⁻¹ mod 2³².
   - Add the roundoff constant. The design rounds to nearest, with halves
     rounded up.

Cycle count: 1 + Σ(kᵢ + 1) + 3, where kᵢ ∈ {0, 1, 2} is the number of
non-zero terms of digit i. The range is 14 to 28 cycles, or 2 cycles with a
zero operand.

### Divide (divisor in ACC-MD, dividend on DI)

The division runs on magnitudes. The sign circuit records both operand
signs and applies the quotient sign at the end.

1. **Load cycle.** A zero divisor ends the operation with the "zero
   divisor" code and returns the divisor to the checker. A zero dividend
   ends it with a zero result.
2. **One cycle forms 15·|15X|.** Because the dividend is multiplied by 15,
   the final quotient is itself coded.
3. **Eight steps of five cycles, most significant quotient nibble first.**
   - One cycle shifts the remainder one nibble left.
   - Four non-restoring cycles try 8D, 4D, 2D and D, where D is the divisor
     magnitude. Each produces one quotient bit.
   - If the very first trial (8D in step 1) succeeds, the quotient does not
     fit. The operation stops one cycle later with an all-ones pseudoresult
     and the "quotient overflow" code, after 5 cycles in all.
4. **The last quotient nibble q₀ is not found bit by bit.**
   - The upper seven nibbles fix q₀ modulo 15, because the whole quotient
     must be a multiple of 15. `an_q0_select` computes that residue as N.
   - The candidates are q₀ = −N and q₀ = 15 − N.
   - Cycle A tries R − (15 − N)·D.
   - Cycle B, if that trial went negative, uses R + N·D instead.
   - Cycle C writes the quotient.
   - Cycle D only resends the remainder, so the step keeps its five-cycle
     length.
5. **Two terminal cycles.** One applies the sign (a zero quotient becomes
   all ones). The other moves the quotient into ACC-MD.

Total: 2 + 5·8 + 2 = **44 cycles**.

All adder results in multiply and divide go out on DO. Each carries its own
perform-check, so the checker tests every partial result as well as the
final one.

## The checker (`an_checker`)

The checker has two parts:

* A 4-bit check-sum register with a modulo-15 adder. It adds each byte
  that arrives with `add`.
* A two-out-of-four tester for condition-code bytes.

When a byte arrives with `check`, the checker includes that byte and tests
the sum against 1111. It then clears the sum for the next result. A
`reset` input clears the sum at the start of each operation. The status
flags are registered.

## The inverse-residue adder (`ir_processor`)

* The main adder (`ir_main_proc`) adds modulo 2ⁿ. For subtract it adds the
  complement plus 1.
* Its carry out of the top bit, Cₙ, goes to the check adder
  (`ir_check_proc`) as a correction signal. Dropping 2ⁿ from the true sum
  changes the residue by 1, because 2ⁿ ≡ 1 mod 15 when a divides n.
* The check adder adds the check symbols X'' and Y'' modulo 15 and
  corrects them by Cₙ. For subtract it uses the complement of Y'' and one
  further correction.
* The checker (`ir_checker`) adds the nibbles of Z and Z'' modulo 15 and
  raises `error` unless the total is 1111.
* The document describes only addition for this unit. Subtraction is this
  design's extension.

## Departures from the source, and choices it leaves open

* **Word-level multiply and divide cycles.** Clear add, add and subtract
  are truly nibble-serial. Multiply and divide cycles compute one whole
  adder pass per processor cycle and stream its nibbles on DO during that
  cycle. This keeps the documented cycle counts and output order, but the
  adder is 40 bits wide, not 4.
* **End-around carry in multiply and divide.** In those cycles the carry is
  added into PR at once. It is also sent as the tenth nibble, so the
  checker sees the raw sum and the carry exactly as in a serial
  implementation.
* **Wider PR.** PR is 40 bits: PR, PRE and one guard nibble. This gives
  room for 16 times the first partial remainder.
* **Last quotient digit.** The source states the rule that picks q₀ from
  the residue N: q₀ = −N for 1 ≤ N ≤ 13, with a trial of q₀ = 1 only for
  N = 14. This design tries 15 − N for every N. With the narrower rule, a
  remainder lying between 15 and 16 divisors yields a quotient that is one
  code unit (15) too small. The testbenches meet the positive choice
  often.
* **Rounding of the product** is to nearest, with halves rounded up. The
  source does not fix the rule.
* **Details the source leaves open:**
  - the condition-code assignments;
  - nibble order on DI and DO;
  - the start/opcode handshake;
  - reset, which is asynchronous and active low, with ACC-MD set to all
    ones;
  - the silent load cycles;
  - clearing the checker's sum after each check.
* **Not built.** The host computer's three voted copies of the checker,
  which live in its test-and-repair processors, and the rest of that
  computer. The top has a single checker.
* **Divide operand range.** The quotient must fit 28 bits after the
  dividend is multiplied by 15. In practice, |dividend| must be below about
  |divisor|/30 (in coded units) to avoid quotient overflow.

## Files

| File | Content |
|---|---|
| `rtl/an_pkg.sv` | shared types: opcodes, phase enum, condition codes, one's-complement helpers |
| `rtl/an_processor.sv` | the AN-code processor (sequencer and datapath) |
| `rtl/an_adder3.sv`, `an_recoder.sv`, `an_mul15.sv`, `an_div15.sv`, `an_roundoff.sv`, `an_q0_select.sv`, `an_sign_ckt.sv` | its datapath parts |
| `rtl/an_checker.sv` | external mod-15 checker |
| `rtl/ir_main_proc.sv`, `ir_check_proc.sv`, `ir_checker.sv`, `ir_processor.sv` | inverse-residue adder |
| `rtl/star_arith_top.sv` | top: AN processor with checker, and the inverse-residue adder |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/an_proc_ref_pkg.sv`, `tb/ir_ref_pkg.sv` | reference models (integer arithmetic) used by the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a hung run with a failure. To run the end-to-end test at
default sizes:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/an_pkg.sv tb/an_proc_ref_pkg.sv tb/ir_ref_pkg.sv rtl/*.sv \
  tb/star_arith_top_tb.sv --top-module star_arith_top_tb
./obj_dir/Vstar_arith_top_tb
```

The end-to-end test checks:

* random clear-add, add, subtract, multiply and divide sequences against
  integer reference models, including result values, cycle counts and
  condition codes;
* that the checker never fires on correct results;
* that every mechanism occurs at least once: end-around carry, additive
  overflow, two-term digits, skipped steps, zero operands, restoring and
  non-restoring bit cycles, both q₀ choices, quotient overflow, zero
  divisor, Cₙ corrections, and detected inverse-residue errors.

`tb/an_timing_tb.sv` measures how long each operation takes, both in
cycles and in clocks. It covers:

* clear add: 1 cycle;
* add or subtract: 1 or 2 cycles;
* multiply, shortest and longest cases: 14 and 28 cycles;
* multiply with a zero operand: 2 cycles;
* divide: 44 cycles;
* singular divides: 2 cycles;
* quotient overflow: 5 cycles.

The other testbenches are built the same way with their own top module.
Some testbenches use `$urandom`. Simulations are two-state, so every
register that is read has a reset.
