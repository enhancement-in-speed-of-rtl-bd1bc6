# Reduced-delay BCD adder

Decimal arithmetic done in hardware avoids both the slow decimal/binary
conversions and the inexact binary representation of decimal fractions. The
adder at the heart of such a unit is usually the textbook BCD adder: per digit,
a 4-bit binary adder, a "greater than 9" detector and a second 4-bit adder that
adds 6. Its weakness is that each digit's correction needs the corrected carry
of the digit below, so a carry can ripple through every digit of the word,
one full digit delay at a time.

This RTL implements a faster organisation. Every digit pair is added at the
same time with no carry in. Each digit is then classified as *generating*,
*propagating* or *stopping* a decimal carry. A carry-lookahead style prefix
network computes all digit carries at once. Finally, each digit adds a small
correction (0, 1, 6 or 7) to its binary sum. The critical path is two 4-bit
additions, the carry network and a couple of gates, whatever the word length.

The default instance adds two 16-digit (64-bit) BCD numbers plus a carry in.

## The three cases of a digit

Let `t = a + b` be the binary sum of two BCD digits (0..18), formed **without**
the carry in:

| case | `t`   | carry out of the digit        | signal                  |
|------|-------|-------------------------------|-------------------------|
| 1    | < 9   | never, even with a carry in   | none                    |
| 2    | > 9   | always, whatever the carry in | DG (digit generate)     |
| 3    | = 9   | exactly when there is a carry in | DP (digit propagate) |

So the carry out of digit *i* obeys the same recurrence as a binary adder's:

    carry[i] = DG[i] | DP[i] & carry[i-1]        carry[-1] = cin

In `bcd_digit_analyzer`, with `c4 s3 s2 s1 s0` the 5-bit sum:

    DG = c4 | s3&s2 | s3&s1          (t > 9)
    DP = s3 & s0

`DP` is deliberately not an exact "t = 9" test. It is also true for 11, 13
and 15, but those sums already raise `DG`, and `DG | DP & c` does not change
when `DP` is set alongside `DG`. The same is true inside the prefix network,
whose combine `(G, P) o (G', P') = (G | P&G', P&P')` never lets an extra `P`
bit override a `G`. This saves decoding all four sum bits.

## Carry network

`bcd_carry_network` computes the recurrence above with a Kogge-Stone parallel
prefix network. First `cin` is merged into digit 0's generate
(`G0 = DG0 | DP0 & cin`). Then `ceil(log2(DIGITS))` levels combine spans of
1, 2, 4, ... digits. With 16 digits that is four levels of AND-OR, and the
generate outputs of the last level are the digit carries. Any other
carry-lookahead structure (Brent-Kung, Sklansky, two-level lookahead) computes
the same function and could be substituted without touching the other
modules.

## Correction: adding 0, 1, 6 or 7

The first-level binary sum of a digit is missing two things: the carry in,
and, if the digit carries out, the skip over the six unused codes
1010..1111. Both are known once the network has run, so one 4-bit addition
fixes the digit (`bcd_correction_adder`):

    digit = t[3:0] + 0110*carry_out + carry_in        (mod 16)

| carry_out | carry_in | added |
|-----------|----------|-------|
| 0         | 0        | 0     |
| 0         | 1        | 1     |
| 1         | 0        | 6     |
| 1         | 1        | 7     |

The correction adder's own carry is dropped, because the decimal carry is
already `carry_out`. Example, 0526 + 0485:

| digit | a + b | class | carry in | carry out | added | result |
|-------|-------|-------|----------|-----------|-------|--------|
| 0     | 11    | DG    | 0        | 1         | 6     | 17 mod 16 = 1 |
| 1     | 10    | DG    | 1        | 1         | 7     | 17 mod 16 = 1 |
| 2     | 9     | DP    | 1        | 1         | 7     | 16 mod 16 = 0 |
| 3     | 0     | -     | 1        | 0         | 1     | 1      |

The result is 1011, which is 526 + 485.

## Module hierarchy

    hs_bcd_adder                 top: n1 + n2 + cin -> sum, cout
      bcd_carry_unit             all first-level adders + carry network
        bcd_digit_analyzer  x D  4-bit add (no carry in), DG and DP
          binary_adder4
        bcd_carry_network        Kogge-Stone prefix over DG/DP
      bcd_correction_adder x D   add 0/1/6/7
        binary_adder4
    bcd_pkg                      bcd_digit_t, BCD_CORR (0110)

All files are in `rtl/`, one module or package per file.

## Interface and timing

`hs_bcd_adder #(parameter int unsigned DIGITS = 16)`

| port   | dir | width      | meaning |
|--------|-----|------------|---------|
| `n1`   | in  | 4*DIGITS   | first operand, digit *i* in bits [4i+3:4i] |
| `n2`   | in  | 4*DIGITS   | second operand, same packing |
| `cin`  | in  | 1          | carry into digit 0 |
| `sum`  | out | 4*DIGITS   | BCD sum, same packing |
| `cout` | out | 1          | carry out of the top digit |

The adder is purely combinational. It has no clock or reset, and its latency
is zero cycles. Register the inputs or outputs outside it if a pipeline is
wanted. Operand digits must be valid BCD (0..9). Invalid digits are not
detected, and the result is then unspecified.

`DIGITS = 32` gives a 128-bit adder. Any `DIGITS >= 1` elaborates. The
network depth grows as `log2(DIGITS)`, and the rest of the logic grows
linearly.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `binary_adder4_tb` | all 512 input combinations |
| `bcd_digit_analyzer_tb` | all 100 digit pairs: binary sum, DG, and DP (for sums 9, below 9 and above 9) |
| `bcd_carry_network_tb` | 16- and 5-digit networks against the digit-serial recurrence: full-length propagate chains, a single generate or kill at every position, and 4000 random patterns |
| `bcd_correction_adder_tb` | every digit pair and carry in against `(a+b+cin) mod 10`; all four corrections exercised |
| `bcd_carry_unit_tb` | binary sums and all 16 carries against schoolbook decimal addition |
| `hs_bcd_adder_tb` | default 16-digit adder, end to end (see below) |
| `hs_bcd_adder_128b_tb` | 32-digit (128-bit) adder against schoolbook decimal addition, 10,000 random and directed sums |

`hs_bcd_adder_tb` uses the top's default parameters. It converts the operands
to 64-bit integers, adds them and converts the total back to BCD. It runs
directed cases (all nines plus carry in, 5+4 in every digit plus carry in, a
single generating digit under a run of nines at each position) and 20,000
random sums. It counts, and requires at least once:

- each of the three digit cases, with case 3 both with and without a carry in;
- each of the four corrections;
- a carry from `cin` through all 16 digits to `cout`;
- `cout` set.

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb --top-module hs_bcd_adder_tb \
        rtl/bcd_pkg.sv tb/hs_bcd_adder_tb.sv
    ./obj_dir/Vhs_bcd_adder_tb

The other modules are found through `-Irtl` by file name. Replace the
testbench name to run another.

## Choices made in this implementation

These points are not fixed by the design and were chosen here:

- **Carry network.** The design allows any parallel prefix network or
  two-level lookahead. Kogge-Stone was chosen for minimum depth.
- **DG logic.** Only "sum above 9" is specified. The gate form
  `c4 | s3&s2 | s3&s1` is this implementation's own.
- **Bit wiring of the correction.** The correction value is fixed at 0, 1, 6
  or 7, chosen by the digit's carry out and carry in. It is applied as
  `{0, carry_out, carry_out, 0}` on the adder's B input, with the carry in on
  the adder's carry input.
- **4-bit binary adder.** Written as a single `+` and left to synthesis. The
  design names the block but not its gate structure.
- **Width.** The block diagrams fix the operands at 64 bits (16 digits), so
  that is the default. The design is also discussed as a 128-bit adder, which
  is `DIGITS = 32`. That size is tested separately.
- **Timing.** No registers, clock or reset.
- **Operand checking.** No check for invalid BCD digits.

Not included: the conventional ripple-correction BCD adder that this design is
measured against. No delay or area figures are reproduced. The structure only
makes the shortened critical path possible; actual timing depends on the
target library and the synthesis constraints.
