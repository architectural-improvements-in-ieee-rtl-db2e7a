# IEEE 754 multipliers with one-adder rounding, denormal shifting and hybrid precision

This is combinational SystemVerilog for two IEEE 754 floating-point
multipliers. Both are aimed at machine-learning processors, where most
products are narrow and power matters.

* **`hybrid_fpmul`** multiplies binary16, binary32 or binary64 numbers in one
  binary64-sized datapath. A 2-bit input picks the format for each operation.
  Three ideas carry it:
  1. **Rounding with a single adder.** The carry-save product is never
     added up in full. The upper half goes to one compound adder that can
     return Sum, Sum+1 or Sum+2. A few gates working on the lower half choose
     among these three. The result is correctly rounded in every IEEE mode.
  2. **Denormals handled by shifting the carry-save vectors.** One signed
     shift is applied to the sum and carry vectors *before* rounding. It
     normalizes subnormal operands (shift left) and denormalizes tiny results
     (shift right). So there is no second rounding step and no separate
     normalization stage.
  3. **Hybrid precision by alignment.** A binary32 or binary16 product is
     moved right by a fixed amount (29 or 42 bits). Its rounding position
     then lands where the binary64 rounding position is. The multiplier,
     shifter and rounding adder are the same for all three formats. Only a
     few bit positions (the overflow bit, the exponent bias, the packing)
     depend on the format.
* **`comb_fpmul`** is a simpler binary32 / binary16 multiplier. Both formats
  share a 24-bit significand datapath. A binary16 operand uses only the top 11
  bits of it, so the lower part of the array does not toggle. Rounding is
  done the classic way: compute a round value, shift it into place, add.

`fpmul_top` places the two units side by side, each with its own ports.

## Numbers and encodings

Both units use the same encodings.

| Signal | Encoding |
|---|---|
| `rm` (rounding mode) | `00` nearest-even, `01` toward zero, `10` toward +inf, `11` toward -inf |
| `fm` (hybrid format) | `0` binary16, `1` binary32, `2` binary64 (`3` acts as binary64) |
| `op` (combined unit) | `0` binary32, `1` binary16 |
| `flags[4:0]` | `{I, X, V, O, U}`: I = infinite result from finite operands, i.e. divide by zero (never raised by a multiply), X = inexact, V = invalid, O = overflow, U = underflow |

* **Operand placement.** Narrow operands and results sit in the *upper* bits
  of the word.
  * In `hybrid_fpmul`, a binary16 number is in `a[63:48]` and a binary32
    number is in `a[63:32]`. The unused low bits of `z` are zero.
  * In `comb_fpmul`, binary16 is in `a[31:16]`, and `z[15:0]` is zero.
* **Rounding classes.** Directed modes are first folded with the result sign
  into three classes: RN, RZ and RI (round away from zero). RP becomes RI for
  a positive result and RZ for a negative one; RM does the reverse. See
  `fp_pkg::round_class`.
* **Special values.**
  * Any NaN result is the canonical quiet NaN (sign 0, fraction MSB set).
  * V is raised for a signaling NaN input and for infinity × zero.
  * Overflow gives infinity, or the largest finite number in class RZ, with
    O and X set.
  * U is raised when the result is inexact and the rounded result is
    subnormal or zero.

There are no clocks or registers. Each unit is one combinational path from
operands to result, and you add pipeline registers where you need them.

## The rounding unit (`rounding_unit`, `round_select`, `special_ca`)

This is the least obvious part of the design.

**How the product is split.** The 106-bit carry-save product (after
shifting, a 161-bit field) is cut at the rounding position.

* **Upper part `SH`/`CH` (54 bits).** This is the significand plus one
  overflow bit, because the product of two significands in [1,2) lies in
  [1,4).
* **Lower part `SL`/`CL`.** It only has to give three bits:
  * `c`, the carry that `SL+CL` passes up into the upper part;
  * `g`, the guard bit (the MSB of `SL+CL`);
  * `t`, the sticky bit (the OR of the rest).

**Why increments of 0, 1 or 2 are enough.** The rounded significand is
`SH+CH + c + r`, where `r` is the rounding increment (0 or 1). If the product
overflows into [2,4), the increment lands one position higher. Counted at
the lower position, the total correction can therefore reach 3. The design
reduces this range to 0–2 with a prediction bit:

* `p = MSB(SL) | MSB(CL)` is added to the upper part in advance. It is
  forced to 0 in RZ. If either MSB is set, the lower sum either carries out
  or has its guard bit set, and either way an increment was probably due.
* A full adder combines `SH[0]`, `CH[0]` and `p` into an LSB `lp` and a
  carry. A row of half adders re-encodes the other bits so that this carry
  fits in.
* The compound adder then only has to supply `PH+p`, `PH+p+1` and
  `PH+p+2`, where `PH = SH+CH`.

**How the compound adder works (`special_ca`).** It uses only two carry
chains. It computes `A+B` and `A+B+2`. Since `b[0]` is 0, both sums have the
same LSB `L`, so:

* `sel1` chooses between the upper bits of the two sums;
* `sel0` chooses between `L` and `~L` for the LSB.

Sum+1 is "take `A+B` and set `L`" when `L=0`, or "take `A+B+2` and clear
`L`" when `L=1`.

**How the selects are worked out (`round_select`).** The selects come from
`p, c, g, t, lp`. Both an overflow and a no-overflow version are computed,
and `v0` picks one. `v0` is the MSB of `PH+p` at the format's overflow
position (bit 52 / 23 / 10). It arrives last, so it only drives the final
mux. In round-to-nearest, a tie clears the result LSB with the terms
`f0 = ~g | t` (no overflow) and `f1 = ~lp | g | t` (overflow).

The equations are listed in `rtl/round_select.sv`. `tb_round_select` checks
them exhaustively against the increment derived directly from the IEEE
rules.

**Which equation differs from the source.** There is one place where this
RTL differs from the equations as published. For RN with overflow, the
`sel0` select here is `~p | c`. That is what the surrounding derivation
requires. The published form `p | c` fails the exhaustive check, and it is
kept as the deliberate fault in the fault-injection test of
`round_select`.

## One shift for denormals and for alignment (`shift_amount`, `cs_shifter`)

**Unpacking.** `hyb_unpack` left-aligns each significand to 53 bits.

* A subnormal operand gets exponent 1 and no hidden bit.
* The leading-zero count `lz` of the significand is taken off the exponent.
  So `Ez` (from `hyb_exp_add`) already describes a *normalized* product,
  even if it is below the normal range.

**The shift.** `shift_amount` then forms one signed number:

```
shift = min(max(1 - Ez, 0), cap) - (Xlz + Ylz) + align
cap   = 13 / 26 / 55          (binary16 / binary32 / binary64)
align = 42 / 29 / 0
```

* **Denormalizing term.** `min(max(1-Ez,0),cap)` moves a tiny result right
  until its exponent is `emin`. The cap is reached only when everything
  would be shifted into the sticky bit anyway.
* **Normalizing term.** `-(Xlz+Ylz)` moves the product of subnormal
  operands left.
* **Alignment term.** `align` puts a narrow product's rounding position at
  the binary64 one.

**The shifter.** `cs_shifter` extends both 106-bit vectors with 55 zero bits
below the LSB (161 bits). It shifts them right for a positive `shift` and
left for a negative one. Nothing shifted right is lost: it becomes part of
the lower part that feeds `g` and `t`. The sum and carry vectors can be
shifted separately because their sum fits the field.

**Exponent and packing.** After rounding, `hyb_exp_add` picks `Ez` or `Ez+1`
from the same overflow bits as the significand. `hyb_pack` builds the
result.

* A denormalized result gets exponent 0. If rounding carried it into the
  normal range, it gets exponent 1 instead.
* Overflow and the special operands are handled on top of this.

## Exponent path of the hybrid unit (`exp_widen`, `hyb_exp_add`)

**Widening.** Exponents of all three formats are first rebased to the
binary64 bias by `exp_widen`. The operation is bit-level: keep the MSB, fill
the new upper bits with its inverse, keep the rest. This equals adding
`1023-15` or `1023-127` for a normal exponent.

**The sum.** `hyb_exp_add` folds `Ex + Ey - 1023` with a carry-save adder
and forms `Sum` and `Sum+1` in parallel.

**Back to the native bias.** The sums are converted back by subtracting
1008 (binary16) or 896 (binary32). This is a plain subtraction.

## The combined binary16/32 unit (`comb_exp_add`, `comb_mant_mul`)

**Exponent.** A binary16 exponent is widened to 8 bits (`+112`, with
`exp_widen #(5,8)`). `comb_exp_add` then computes `Ea+Eb-127` and
`Ea+Eb-126` at the same time. The second is chosen when the significand
needed a normalizing shift.

**Significand (`comb_mant_mul`).** The 24×24 product `P` is normalized by at
most one position. Sticky, last and guard bits are taken at the binary32
positions, or 13 bits higher for binary16:

| | binary32 | binary16 |
|---|---|---|
| L / G | `NP[23]` / `NP[22]` | `NP[36]` / `NP[35]` |
| sticky, no overflow | `P[21:0]` | `P[34:25]` |
| sticky, overflow | `P[22:0]` | `P[35:25]` |

The round value is computed per mode:
`G&(L|T)` (RN), `0` (RZ), `~S&(G|T)` (RP), `S&(G|T)` (RM). In binary16 mode
it is shifted left by 13. A 24-bit adder then adds it. A carry out of that
adder renormalizes the result and bumps the exponent.

## Departures and design choices

**Follows the source:**
* the rounding scheme, the select logic and the compound adder;
* the prediction bit and the tie fixes;
* the shift-amount formula, its caps and alignments;
* the 161-bit shifted field;
* the format-dependent overflow bits;
* the exponent widening;
* the combined unit's sticky, round-value and shift steps.

**Choices made here:**
* **Operators instead of hand-built structures.**
  * `cs_multiplier` is a linear array of carry-save rows that produces sum
    and carry vectors. The source does not fix a reduction tree.
  * `comb_mant_mul` uses a plain `*` operator.
  * Carry, guard and sticky of the lower half come from a plain addition
    `SL+CL`. A faster carry/sticky network would compute the same bits.
  * The barrel shifter and the back-conversion of the exponent are plain
    shift and subtract operators.
* **Exception handling.** Special values, overflow saturation, the flags and
  the NaN format are this design's own. The source leaves them out of the
  proposed units. The I flag exists for a uniform flag vector and is never
  raised.
* **The combined unit flushes subnormals.** Subnormal operands read as zero,
  and tiny results become a signed zero with U and X. Subnormals are fully
  supported only in `hybrid_fpmul`.
* **Encodings.** The `fm` values follow the 0/1/2 mux inputs of the hybrid
  datapath. The `rm` and flag encodings are chosen here.

**Not built:** the reference rounding schemes that the design is compared
against, and the standard-cell library and tool flow used for area and power
figures. There is no timing model. The RTL is combinational, and the
gate-delay estimates of the source are not reproduced.

## Verification

**How the testbenches check.** Every module has a self-checking testbench in
`tb/`.

* Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
* The reference is `tb/fp_ref_pkg.sv`. It multiplies the significands as
  exact integers and rounds with the IEEE rules, including subnormals,
  overflow and all four modes. It shares no code with the RTL.
* Operands come from `tb/fp_gen_pkg.sv`. The generator favours zeros,
  infinities, NaNs, subnormals, extreme exponents and all-ones or
  near-one significands.

**The main testbenches:**

| Testbench | What it does |
|---|---|
| `tb_hybrid_fpmul` | 50,000 random vectors per format, plus directed vectors that force a rounding carry into the next binade |
| `tb_comb_fpmul` | 50,000 vectors per mode |
| `tb_fpmul_top` | Runs both units at default parameters. It counts each mechanism: every format, rounding mode and combined-unit mode, left carry-save shifts (subnormal operands), denormalized results (right shifts), prediction bit set, ties, rounding carries, overflows, invalid operations, normalizing shifts and flushes in the combined unit. It fails if any count stays at zero. |
| `tb_round_select` | Exhaustive |
| Other block testbenches | Check each block against an independent model, some at reduced widths |

**Fault injection.** Each testbench was also run against a copy of its
module with one deliberate bug, and each one caught it.

**Limits.** Vectors from an external IEEE test-vector generator were not
used. The reference model in `tb/` takes their place.

## Simulating

Every testbench builds with plain Verilator 5. For example:

```
verilator --binary --timing -Irtl -Itb \
  rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/fp_gen_pkg.sv \
  tb/tb_fpmul_top.sv --top tb_fpmul_top -o sim
./obj_dir/sim
```

`-Irtl` lets Verilator find the other modules by file name.

**Changing a block's test.** Replace `tb_fpmul_top` with the testbench
of the block you want. The block testbenches that take parameters
(`tb_lzc`, `tb_cs_multiplier`, `tb_special_ca`, `tb_rounding_unit`,
`tb_cs_shifter`, `tb_exp_widen`) set them in the instantiation.

**Warnings.** Verilator reports a few unused-signal warnings. They come from
bits that are not needed in every format, for example the low product bits
that only feed the sticky OR in some modes. They are harmless.

## Files

| File | Contents |
|---|---|
| `rtl/fp_pkg.sv` | rounding-mode, class and format types, flag struct, `round_class` |
| `rtl/fpmul_top.sv` | both multipliers side by side |
| `rtl/hybrid_fpmul.sv` | binary16/32/64 multiplier |
| `rtl/hyb_unpack.sv` | field extraction, subnormal normalization count, classes |
| `rtl/exp_widen.sv` | exponent rebasing by bit extension |
| `rtl/lzc.sv` | leading-zero counter |
| `rtl/cs_multiplier.sv` | carry-save significand multiplier |
| `rtl/hyb_exp_add.sv` | exponent sum, Sum/Sum+1, back-conversion |
| `rtl/shift_amount.sv` | signed shift for denormals and alignment |
| `rtl/cs_shifter.sv` | left/right shifter for the carry-save vectors |
| `rtl/rounding_unit.sv` | one-adder rounding of the carry-save product |
| `rtl/round_select.sv` | select and tie logic |
| `rtl/special_ca.sv` | Sum / Sum+1 / Sum+2 compound adder |
| `rtl/hyb_pack.sv` | packing, exceptions, flags |
| `rtl/comb_fpmul.sv` | combined binary32/binary16 multiplier |
| `rtl/comb_exp_add.sv` | exponent sum and +1 for the combined unit |
| `rtl/comb_mant_mul.sv` | significand product, sticky, round value, rounding add |
