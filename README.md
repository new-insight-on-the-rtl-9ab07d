# BCC decimal arithmetic unit: binary coded chiliad operands with DPD only at the ports

Decimal floating-point data is normally stored in the densely packed decimal
(DPD) encoding. DPD packs three decimal digits into 10 bits (1000 of 1024
codes are used), but arithmetic cannot work on it directly. A conventional
decimal unit therefore expands every operand to BCD and compresses every
result back to DPD, once per operation.

A *binary coded chiliad* (BCC) digit stores the same three decimal digits in
the same 10 bits, as the plain binary number `100*B + 10*C + D` (0..999).
This is a radix-1000 digit, and a binary adder can add it directly. The
design in this repository keeps all operands in a BCC form of the standard
decimal word. It converts between DPD and BCC only where data enters or
leaves the unit:

```
 Decimal-64 word (DPD) ──► dpd_to_bcc_word ──► BCC-64 word ─┐
                                                            │ registers / memory
                      BCC-64 ──► bcc_fp_adder ──► BCC-64 ◄──┘ (outside the unit)
 Decimal-64 word (DPD) ◄── bcc_to_dpd_word ◄── BCC-64 word
```

The top module `bcc_dfp_unit` holds these three parts side by side and
brings out all of their ports. How values are routed between them is the
job of the surrounding processor. It might load from memory, convert once,
run many additions in BCC, and convert the result once when it is stored.

All logic is combinational. None of the blocks has a clock, a reset or a
register.

## Word formats

A Decimal-k word has three fields:

| field | bits (k = 64) | contents |
|---|---|---|
| sign | 63 | sign of the coefficient |
| combination field G | 62:50 (w+5 = 13 bits) | the exponent's two leading bits, the most significant digit (MSD) and the special-value codes |
| trailing significand T | 49:0 (J = 5 declets) | the 15 lower coefficient digits, three per declet |

A **BCC-64** word is bit-for-bit the same, except that each declet of T holds
a binary value 0..999 instead of a DPD code. The sign and the combination
field do not change. A BCC-64 word therefore still fits in a 64-bit register.

The combination field is decoded in the standard way (`cf_extractor`,
`cf_compactor`). G0 is the most significant bit of the field.

| G0..G4 | MSD | exponent (w+2 bits) |
|---|---|---|
| G0G1 ≠ 11 | `0 G2 G3 G4` (0..7) | `G0 G1 G5..G(w+4)` |
| `11 G2 G3 G4`, G2G3 ≠ 11 | `100 G4` (8, 9) | `G2 G3 G5..G(w+4)` |
| `11110` | infinity | – |
| `11111` | NaN (signalling if G5 = 1) | – |

Every size is derived from the storage width `K` in `bcc_pkg`:
w+5 = K/16+9, J = (15K/16−10)/10, p = 3J+1 digits, bias = Emax+p−2. K
defaults to 64. K = 32 and K = 128 also elaborate. K = 128 gives 11 declets,
34 digits and a 114-bit significand adder.

## Converting one declet

The two converters go through BCD in both directions:

* **`dpd_to_bcc` = `dpd_expander` + `bcd_to_bcc`**
* **`bcc_to_dpd` = `bcc_to_bcd` + `dpd_compressor`**

### DPD ⇄ BCD

`dpd_expander` and `dpd_compressor` are two-level AND/OR networks, one
equation per output bit. Each digit is either *small* (0..7, which needs
three bits) or *large* (8 or 9, which needs one bit).

* Compression reads the small/large pattern from the digits' MSBs a, e, i.
  * It sets `v` if any digit is large.
  * It uses `wx`, and `st` when two or more digits are large, to say which.
  * It places the remaining significant bits in the free positions.
* Expansion does the reverse, driven by the bits v, w, x, s, t.
* Bits d, h and m pass straight through in both directions.
* For three large digits, the compressor writes the two free bits as 00.
* The expander accepts all 1024 codes, including the 24 redundant ones.

### BCD → binary (`bcd_to_bcc`)

The value `100B + 10C + D` is expanded bit by bit:

```
800a + 400b + 200c + 100d + 80e + 40f + 20g + 10h + 8i + 4j + 2k + m
```

Each decimal weight is a sum of powers of two (800 = 512+256+32, and so on).
This gives a *weighted bit set* with these columns:

| column | 2^9 | 2^8 | 2^7 | 2^6 | 2^5 | 2^4 | 2^3 | 2^2 | 2^1 | 2^0 |
|---|---|---|---|---|---|---|---|---|---|---|
| bits | a | a b | b c | c d e | a d f | b e g | c f h i | d g j | h k | m |

The reduction to the final sum works like this:

1. A valid BCD digit never has both a and b set. Column 8 is therefore just
   `a|b`, and column 4's `e` and `g` combine the same way.
2. Two levels of full adders reduce the set to two rows.
3. An 8-bit carry-propagate adder adds the two rows over columns 8..1.
4. Bit 9 is `a` XOR the adder's carry out. Both can never be 1, because the
   value is at most 999.

### Binary → BCD (`bcc_to_bcd`)

This block is an unrolled shift-and-add-3 array with ten steps. Before each
shift, every BCD digit of 5 or more has 3 added. Synthesis removes the cells
that can never fire.

## The significand adder (`bcc_sig_adder`)

This block is the core of the design. A Decimal-64 significand has 16
digits, stored as one BCD digit (the MSD, 4 bits) on top of five BCC digits
(50 bits). Packed side by side, the significand is a 54-bit word. (A BCD
significand of the same length needs 64 bits.)

The adder uses one 54-bit binary adder. Two things make decimal carries come
out of it correctly:

**Speculation.** A BCC digit must carry into the next digit when its sum
reaches 1000. A binary 10-bit field carries only at 1024. When a digit sum
is likely to reach 1000, the adder adds the gap 1024 − 1000 = 24 in advance.
The prediction uses only the seven MSBs of the two digits:

```
spec = a[9:3] + b[9:3] >= 124        (so a + b >= 992)
```

The digit of operand b then becomes `b + 24`. This never overflows 10 bits,
because b ≤ 999. The whole word is then added in binary. A digit that
carries passes its carry to the next digit on its own, and what remains in
the digit is already the correct `a + b + cin − 1000`.

Because 24 = 11000₂ has three trailing zeros, the three LSBs of each digit
take no part in the prediction.

**Correction.** A digit can speculate and still not carry, because its sum
was only 992..999. The result field then holds 1016..1023, which is
`11111_11xxx₂`. Subtracting the 24 again only clears bits 4 and 3. No second
adder is needed.

A digit that did not speculate has a + b ≤ 998, so it can neither carry nor
need a correction.

**Detecting the carry.** The carry out of each digit is read from the binary
adder as `sum ^ a ^ b'` at the next digit's LSB.

**The MSD.** The MSD is handled the same way, with BCD numbers in place of
the BCC ones:

* it adds 6 = 16 − 10;
* it predicts with `a[3:1] + b[3:1] >= 4`;
* its correction clears bits 2 and 1 (14, 15 → 8, 9).

The `spec` output shows which digits speculated.

## Floating-point addition (`bcc_fp_adder`)

The adder works in four steps:

1. `cf_extractor` splits each operand into MSD, exponent and number class.
2. The operand with the smaller exponent is shifted right.
3. `bcc_sig_adder` adds the two significands.
4. `cf_compactor` rebuilds the result with the larger exponent.

The alignment shift in step 2 is easy only when the exponent difference is a
multiple of 3. The shift then moves whole BCC digits, and the MSD moves into
the top BCC digit. Any other difference would have to split BCC digits, which
this design does not do.

What the block does **not** do:

* **Opposite signs** (subtraction): the result is a quiet NaN, with
  `unsupported` set.
* **Exponent differences that are not multiples of 3**: quiet NaN and
  `unsupported`. Keeping exponents in base 1000 avoids this case altogether.
* **Rounding**: shifted-out digits are truncated, and `inexact` reports
  whether any of them were nonzero.
* **Normalisation**: a sum with a 17th digit wraps, and `overflow` is set.

Special operands follow the usual rules:

* a NaN operand gives a quiet NaN with a zero payload;
* infinity plus a finite number, or plus an infinity of the same sign, gives
  that infinity;
* infinity plus an infinity of the opposite sign gives a quiet NaN and sets
  `invalid`.

## What follows the source description and what does not

**Taken from the published BCC work:**

* the BCC-64 format;
* the DPD expansion and compression equations, used as printed (the tests
  check all inputs against the DPD case tables);
* the weighted bit set of the BCD-to-binary converter and its reduction to
  two rows plus an 8-bit adder;
* converters that go through BCD;
* the 54-bit adder width;
* speculation of +24 from the 7 MSBs;
* conversions only at the I/O ports.

**Chosen here:**

* The exact counter placement in `bcd_to_bcc`. Only full adders are used, no
  (4;2) compressors.
* The shift-and-add-3 structure of `bcc_to_bcd`. The published converter
  follows a design that is not reproduced here.
* In the speculative adder:
  * the prediction threshold of 124;
  * adding the 24 into operand b;
  * the correction by clearing bits;
  * the same treatment of the MSD.
* All of the floating-point adder's alignment and special-value behaviour,
  and everything it does not do (see above).
* Purely combinational timing.

**Not built:**

* a multiplier;
* the I/O processor;
* the register file and memory;
* exponents in base 1000. They would make every alignment a whole-digit
  shift. This design keeps the standard base-10 exponent instead and
  supports only the differences that happen to be multiples of 3;
* sharing the 54-bit adder with binary double-precision addition. The widths
  are close enough to allow it (53 bits against 54), but no binary
  floating-point path exists here;
* a conventional DPD unit that expands and compresses around every
  operation. It is only the comparison point, but its expander and
  compressor exist here as `dpd_expander` and `dpd_compressor`.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/dec_ref_pkg.sv` are built from the DPD case tables and from integer
arithmetic, not from the RTL's equations.

| testbench | what it covers |
|---|---|
| `tb_dpd_expander`, `tb_dpd_to_bcc` | all 1024 declets |
| `tb_dpd_compressor`, `tb_bcd_to_bcc`, `tb_bcc_to_bcd`, `tb_bcc_to_dpd` | all 1000 values |
| `tb_cf_extractor` | every combination field for K = 64 and K = 32 |
| `tb_cf_compactor` | every MSD × exponent, plus the special classes |
| `tb_bcc_sig_adder` | 20 000 random 16-digit additions, biased towards the speculation threshold and all-nines carry chains; speculation with and without a carry must both occur. Also 5000 additions on the 114-bit (34-digit) instance |
| `tb_bcc_fp_adder` | 20 000 random additions: equal exponents, 1..7-digit shifts, non-multiple-of-3 shifts, opposite signs, infinities and NaNs |
| `tb_dpd_to_bcc_word`, `tb_bcc_to_dpd_word` | random words for K = 32, 64 and 128 |
| `tb_bcc_dfp_unit` | end to end at the default K = 64 (see below) |
| `tb_telco_billing` | billing workload (see below) |

`tb_bcc_dfp_unit` sends 6000 operand pairs through the whole unit: DPD in,
then BCC addition, then DPD out. It counts the following events and fails if
any of them never happens:

* each of the eight DPD small/large cases;
* speculation with a carry;
* speculation that had to be corrected;
* alignment shifts and inexact alignments;
* overflow;
* unsupported operations;
* infinities, NaNs and invalid operations;
* MSDs of 8 and 9.

`tb_telco_billing` runs a telephone-billing loop for n = 1000, 2000, …,
10000 calls:

```
P = secs × rate;  B = P × tax1;  D = P × tax2;  C = P + B + D;  T = T + C
```

* The three additions per call run on the BCC adder.
* The products come from a behavioural model in the testbench. That model
  works directly on BCC words and rounds to 10⁻⁶, half to even.
* Every charge C and the final total T are checked after conversion back to
  DPD.
* The testbench checks that exactly 2n + 4 conversions happened. A unit that
  expands DPD for every operation would need 18n + 3.

To run a testbench with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bcc_pkg.sv tb/dec_ref_pkg.sv tb/tb_bcc_dfp_unit.sv \
    --top-module tb_bcc_dfp_unit
./obj_dir/Vtb_bcc_dfp_unit
```

Replace the testbench name to run another one. Each one finishes in well
under a second.

## Modules

| file | role |
|---|---|
| `bcc_pkg.sv` | number-class enum, `bcd3_t`, format width functions of K |
| `dpd_expander.sv`, `dpd_compressor.sv` | DPD ⇄ three BCD digits |
| `bcd_to_bcc.sv`, `bcc_to_bcd.sv`, `full_adder.sv` | three BCD digits ⇄ binary 0..999 |
| `dpd_to_bcc.sv`, `bcc_to_dpd.sv` | one declet DPD ⇄ BCC |
| `dpd_to_bcc_word.sv`, `bcc_to_dpd_word.sv` | whole-word port converters |
| `cf_extractor.sv`, `cf_compactor.sv` | combination field ⇄ MSD, exponent, class |
| `bcc_sig_adder.sv` | speculative 54-bit BCC significand adder |
| `bcc_fp_adder.sv` | BCC-64 floating-point adder |
| `bcc_dfp_unit.sv` | top: input port, adder, output port |

In a synthesized port converter, a few output bits are plain wires from the
input: the sign, the combination field, and the LSB of each digit (the LSB
of a BCC digit equals the LSB of its units digit). This is inherent to the
formats, not a fault.
