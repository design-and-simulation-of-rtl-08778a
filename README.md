# Ternary coded decimal (TCD) adder

A decimal digit 0..9 fits in three ternary digits (trits), because 3^3 = 27.
Ternary coded decimal stores each decimal digit of a number as its own three-trit
code, the way BCD stores it in four bits. Arithmetic then stays in decimal digits,
which is convenient wherever values come in or go out as decimal digits, such as
keypads and displays.
This RTL adds two TCD digits and a decimal carry. It gives one TCD digit and a
decimal carry out. It models, at logic level, a ternary CMOS adder made of ternary
half adders and full adders.

## The TCD code

| decimal | trit 2 (x9) | trit 1 (x3) | trit 0 (x1) |
|---------|-------------|-------------|-------------|
| 0 | 0 | 0 | 0 |
| 1 | 0 | 0 | 1 |
| 2 | 0 | 0 | 2 |
| 3 | 0 | 1 | 0 |
| 4 | 0 | 1 | 1 |
| 5 | 0 | 1 | 2 |
| 6 | 0 | 2 | 0 |
| 7 | 0 | 2 | 1 |
| 8 | 0 | 2 | 2 |
| 9 | 1 | 0 | 0 |

The code is plain base 3, limited to 0..9. Codes 10..26 are invalid.

### How trits are carried on wires

Real ternary circuits carry one trit on one wire at three voltage levels. This RTL
is binary, so each trit is a two-bit field holding its value 0, 1 or 2
(`ternary_pkg::trit_t`). The code `2'd3` is illegal. A TCD digit is
`tcd_digit_t = trit_t [2:0]`, and element 0 is the least significant trit. So the
digit 5 (ternary 012) is `{2'd0, 2'd1, 2'd2}`. The encoding is this design's own
choice.

## Decimal correction: add 122

Two digits plus a carry add up to at most 9 + 9 + 1 = 19. That is ternary 201, so
the plain ternary sum always fits in three trits. If the sum is 9 or less, it is
already a valid digit. If it is 10..19, the adder adds ternary **122**, which is
17 = 27 - 10:

    s + 17 = 27 + (s - 10)

The 27 leaves the top trit as a carry worth one decimal ten. The three trits that
remain are s - 10, a valid digit. This does the same job as the "+6" correction in
BCD addition.

Examples:

    4 + 5:  011 + 012 = 100  (9, valid; 000 is added; carry 0)
    6 + 5:  020 + 012 = 102  (11, invalid)
            102 + 122 = 1 001  -> carry 1, digit 001 = 1   (11 = 1 ten + 1)

## Data path (`rtl/tcd_adder.sv`)

```
 a[2:0]  b[2:0]   cin
   |       |       |
 +-----------------------+
 | 3-trit ternary adder  |  tern_ripple_adder (N=3)
 +-----------------------+
          | raw_sum[2:0]  (carry out is always 0, checked by assertion)
          +------------------------+
          |                        v
          |            +-------------------------+
          |            | invalid-TCD detector    |  tcd_invalid_detector
          |            | raw_sum > 9 ? 122 : 000 |
          |            +-------------------------+
          v                        | corr[2:0]
 +-----------------------------------------+
 | correction adder: raw_sum + corr, cin=0 |  tcd_correction_adder
 +-----------------------------------------+
      | sum[2:0]        | cout
```

The whole adder is combinational. It has no clock and no reset. The longest path
runs through six ternary full adders, three in each ripple adder, plus the
detector.

### Building blocks

- **`tern_half_adder`**: sum = (a+b) mod 3, carry = (a+b) div 3. It is written
  directly as its nine-row truth table. Carry is 1 only for 1+2, 2+1 and 2+2.
- **`tern_full_adder`**: three half adders. HA1 adds a and b. HA2 adds HA1's sum
  to cin, and its sum is the full-adder sum. HA3 adds the two carries, and its
  *sum* is the full-adder carry. HA3's own carry is always 0 and is left open.
  This structure uses fewer devices in CMOS than a design derived from a ternary
  K-map.
- **`tern_ripple_adder #(N=3)`**: N full adders with a rippling carry.
- **`tcd_invalid_detector`**: `invalid = t2==2 || (t2==1 && (t1!=0 || t0!=0))`.
  It outputs the correction word 122 or 000.
- **`tcd_correction_adder`**: a three-trit adder with carry-in 0. Its carry out
  is the decimal carry.
- **`ternary_pkg`**: trit and digit types, and the constants `TCD_CORRECTION`
  (122) and `TCD_ZERO`.

### Interface of `tcd_adder`

| port | dir | type | meaning |
|------|-----|------|---------|
| `a`, `b` | in | `tcd_digit_t` | operand digits, 0..9 |
| `cin` | in | `trit_t` | decimal carry in, 0 or 1 |
| `sum` | out | `tcd_digit_t` | result digit, (a+b+cin) mod 10 |
| `cout` | out | `trit_t` | decimal carry, (a+b+cin) div 10 |
| `corrected` | out | `logic` | 1 when 122 was added |

Deferred assertions (`assert final`) check three rules in simulation. The operands
must be valid digits. `cin` must be 0 or 1. The first adder must not carry out.

### Multi-digit numbers

To add multi-digit numbers, instantiate one `tcd_adder` per decimal digit. Feed
each digit's `cout` into the next digit's `cin`, and tie the lowest `cin` to 0.
The testbench builds a four-digit adder this way. The reference block diagram ties
the adder's carry-in to 0, which is a single digit. The `cin` port is kept so
that digits can be chained.

## Where this RTL departs from the circuit it models

- **Logic level only.** The original blocks are transistor-level, multi-level
  CMOS circuits. Their low-power, low-transistor-count half adder is not
  described here. This RTL reproduces the logic function and the block structure
  only. It says nothing about power, voltage levels or delay.
- **Half adder as a table.** The half adder is written as its truth table. No
  gate structure is implied. Synthesis tools may map it as a small ROM or as
  logic.
- **Correction adder width.** The block diagram names the second adder a
  "1-bit" ternary full adder. It adds a three-trit word, however, so it is
  built here as a three-trit adder.
- **Choices made here.** The two-wire trit encoding, the `corrected` output, the
  behaviour on the illegal code 3 (treated as 0 by the half adder, and flagged
  by assertion) and the ripple arrangement of the three-trit adder.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the block
against integer arithmetic:

| testbench | coverage |
|-----------|----------|
| `tern_half_adder_tb` | all 9 input pairs |
| `tern_full_adder_tb` | all 27 input triples |
| `tern_ripple_adder_tb` | all 27 x 27 operand pairs with cin 0, 1, 2 |
| `tcd_invalid_detector_tb` | all 27 three-trit values |
| `tcd_correction_adder_tb` | every sum with both words, and every reachable sum with the word the rule selects |
| `tcd_adder_tb` | the two examples above; all 10 x 10 digit pairs with cin 0 and 1; 2000 random 4-digit additions on a chain of four adders |

`tcd_adder_tb` also counts how often each mechanism occurs: a sum passed through
unchanged, a correction, a carry in used, a carry out, and a carry rippling
between digits. It fails if any of them never happened. Each testbench prints
`TB_RESULT checks=N failures=M`.

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ternary_pkg.sv tb/tcd_adder_tb.sv --top-module tcd_adder_tb -o sim
./obj_dir/sim
```

Replace `tcd_adder_tb` with the name of any other testbench. Each run takes well
under a second.
