# BESC-BCD adder: decimal addition without a second correction adder

Adding two BCD digits in a binary adder gives a sum from 0 to 19 (9 + 9 + a
carry in). Sums up to 9 are already valid BCD. Sums from 10 to 19 are not, and
the classic fix adds the constant 6. That needs a second 4-bit adder with its own
carry chain. This design drops the second adder. A small block of gates, the
**Binary to Excess Six Converter (BESC)**, maps every sum from 10 to 19 directly
to its corrected digit. A 2:1 multiplexer per bit then chooses between the
uncorrected sum and the BESC output. The removed carry chain is where the savings
in delay, area and switching come from. The BESC is also held idle whenever no
correction is needed.

The RTL is combinational SystemVerilog. It covers one digit and a chain of any
number of digits. The default top is the two-digit adder.

## One digit slice

```
 A[3:0] B[3:0] cin
     \   |   /
   +-----------+            first stage: 4-bit ripple-carry adder (rca4)
   |   rca4    |--- S[3:0] ------------------------------+
   +-----------+                                         |
        | C0                                             |
   +-----------------+                                   |
   | carry_generator |  cout = C0 | S3 & (S2 | S1)       |
   +-----------------+                                   |
        | cout ---------------+--------------+           |
        |                 en  v              |           |
        |            +-------------+         |           |
        |  C0, S --> |    besc     |         |           |
        |            +-------------+         |           |
        |                 | M[3:0]           |sel        |
        |            +---------------------------------------+
        |            |   mux_8to4:  1 -> M      0 -> S        |
        |            +---------------------------------------+
        v                         | O[3:0]
   decimal carry out
```

1. **First stage (`rca4`).** Four full adders in a ripple chain form the 5-bit
   binary sum `{C0, S3..S0}` of `A + B + cin`.
2. **Carry generator (`carry_generator`).** Sets `cout` when that sum is above 9:
   `cout = C0 | S3 & (S2 | S1)`. This is one AND and two ORs. The signal has
   three jobs. It is the digit's decimal carry out, the multiplexer select and
   the BESC enable. S0 is not needed: no sum from 0 to 19 is decided by it.
3. **BESC (`besc`).** Produces the corrected digit `M = sum - 10` for sums from
   10 to 19 (next section).
4. **Output multiplexer (`mux_8to4`).** Four 2:1 multiplexers with a common
   select. A select of 1 passes M and a select of 0 passes S.

## How the BESC replaces an adder

Adding 6 to S modulo 16 is what the conventional second adder does. The BESC
only has to be right for the ten sums the carry generator sends to it:

| sum | C0 S3 S2 S1 S0 | M3 M2 M1 M0 |
|----:|:--------------:|:-----------:|
| 10  | 0 1 0 1 0      | 0 0 0 0     |
| 11  | 0 1 0 1 1      | 0 0 0 1     |
| 12  | 0 1 1 0 0      | 0 0 1 0     |
| 13  | 0 1 1 0 1      | 0 0 1 1     |
| 14  | 0 1 1 1 0      | 0 1 0 0     |
| 15  | 0 1 1 1 1      | 0 1 0 1     |
| 16  | 1 0 0 0 0      | 0 1 1 0     |
| 17  | 1 0 0 0 1      | 0 1 1 1     |
| 18  | 1 0 0 1 0      | 1 0 0 0     |
| 19  | 1 0 0 1 1      | 1 0 0 1     |

All other inputs are don't-cares. With them the four outputs reduce to:

```
M0 = S0
M1 = ~S1
M2 = ~C0 & S2 & S1  |  C0 & ~S1
M3 =  C0 & S1
```

That is two inverters, three ANDs and one OR. Each output depends on at most
three inputs, so no carry ripples from bit to bit. S3 is not used at all. Note
that the C0 input is the first-stage carry, not the carry generator's output.
With the decimal carry in its place, sums 14 and 15 would convert wrongly.

### Switching the converter off

For sums up to 9 the multiplexer ignores M, so the BESC does no useful work.
Here every BESC input is ANDed with the carry generator output (operand
isolation). While `en = 0`, M and all internal nodes sit at 0 and do not toggle
as the sum changes. M1 needs its own AND with `en`, because it is an inverted
input. The gating never changes a result. It costs five 2-input ANDs per digit
on top of the six gates above. The isolation scheme is this design's own
choice: the source publication says only that the BESC is switched off for
small sums, not how.

## Cost in NAND-gate units

The cost model counts every element as an equivalent network of 2-input (or
wider) NAND gates:

| element    | NAND count | NAND levels |
|------------|-----------:|------------:|
| full adder | 12 (sum 8, carry 4) | 3  |
| NOT        | 1          | 1           |
| AND        | 2          | 2           |
| OR         | 3          | 2           |
| 2:1 mux    | 4          | 3           |

`full_adder` and `mux2_nand` are written as exactly these NAND networks:

- **Full adder sum.** Three input inverters, four 3-input minterm NANDs and one
  4-input NAND.
- **Full adder carry.** Three pair NANDs and one 3-input NAND.
- **Multiplexer.** One select inverter, two gating NANDs and one output NAND.

The carry generator and the BESC are written as AND/OR equations. Per digit,
without the BESC gating:

| part             | conventional (second adder) | BESC design |
|------------------|----------------------------:|------------:|
| first stage      | 4 FA = 48                   | 4 FA = 48   |
| carry / correction detect | 7                  | 8           |
| second adder     | 4 FA = 48                   | -           |
| BESC             | -                           | 11          |
| 4 x 2:1 mux      | -                           | 16          |
| **total area**   | **103**                     | **83**      |
| **worst delay**  | 12 + 4 + 12 = **28**        | 12 + 4 + 5 + 3 = **24** |

These figures are unit-gate estimates. Simulation does not check them.

## Multiple digits

`besc_bcd_adder_ndigit` chains `DIGITS` slices. The decimal carry out of digit
*i* is the carry in of digit *i+1*'s first-stage adder. The carry therefore
ripples through the first-stage adders and carry generators, while each digit's
correction stays local. The default `DIGITS = 2` is the two-digit adder.

## Interfaces and timing

| module | ports | meaning |
|--------|-------|---------|
| `besc_bcd_adder_ndigit #(DIGITS=2)` (top) | `a`, `b` [4*DIGITS-1:0] in; `cin` in; `o` [4*DIGITS-1:0] out; `cout` [DIGITS-1:0] out | packed BCD, digit 0 in bits 3:0; `cout[i]` is the carry out of digit *i*, `cout[DIGITS-1]` the carry of the whole sum |
| `besc_bcd_adder` | `a`, `b` [3:0], `cin` in; `o` [3:0], `cout` out | one digit: `10*cout + o = a + b + cin` |
| `rca4` | `a`, `b` [3:0], `cin` in; `s` [3:0], `c0` out | first-stage binary adder |
| `carry_generator` | `c0`, `s` [3:1] in; `cout` out | sum > 9 flag |
| `besc` | `en`, `c0`, `s` [3:0] in; `m` [3:0] out | excess-six converter with input isolation |
| `mux_8to4` | `sel`, `in1`, `in0` [3:0] in; `y` [3:0] out | `y = sel ? in1 : in0` |
| `full_adder`, `mux2_nand` | 1-bit | NAND-level building blocks |
| `bcd_pkg` | package | `bcd_digit_t`, `bin_sum_t {c0, s}` |

Everything is combinational. There is no clock, no reset and no pipeline
register. Results settle after the gate delays. The inputs must be valid BCD
digits (0 to 9) and `cin` must be 0 or 1. Other digit codes give undefined
results, which is intentional because the BESC uses don't-cares. Tie `cin` to
0 for a plain addition.

## Departures and choices

- **First stage.** The first stage is a ripple-carry adder, which is the main
  configuration. Carry-select and carry-skip first stages were also evaluated
  with the same BESC back end. They are not included here because their
  internal structure was not specified. Either would replace `rca4` with the
  same ports.
- **Carry in.** The carry in of digit 0 (`cin`) is an added port, so the adder
  can be cascaded. The reference two-digit adder has no such input.
- **BESC isolation.** The isolation gating in `besc` is an implementation
  choice (see above).
- **Carry generator structure.** The carry generator is built as
  `C0 | S3 & (S2 | S1)`. This fits its 1 AND + 2 OR budget and its
  two-gate-level delay.
- **Conventional adder.** The conventional BCD adder (binary adder plus a
  second adder that adds 6) is the baseline the design is compared with. It is
  not part of this RTL.
- **FPGA results.** Power and timing results measured on an FPGA (logic
  elements, ns, mW) cannot be reproduced in simulation. They are not checked.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench compares the
outputs with integer arithmetic and prints `TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|-----------|----------------|
| `tb_full_adder` | all 8 input combinations |
| `tb_rca4` | all 512 combinations of a, b, cin |
| `tb_carry_generator` | every reachable sum 0..19 |
| `tb_besc` | sums 10..19 enabled, and all 32 inputs disabled (must read 0) |
| `tb_mux_8to4` | all 512 combinations |
| `tb_besc_bcd_adder` | all 200 digit/carry combinations |
| `tb_besc_bcd_adder_ndigit` | default two-digit top, all 20,000 additions |
| `tb_bcd_workloads` | top at `DIGITS=1` exhaustive; `DIGITS=4` with 20,000 random additions and the all-nines case |

`tb_besc_bcd_adder_ndigit` counts each mechanism and fails if one never occurs:

- uncorrected digits, with the BESC output checked to be 0 through hierarchical
  references;
- corrections of sums 10..15 (first-stage carry 0);
- corrections of sums 16..19 (first-stage carry 1);
- a carry rippling between digits;
- a carry in;
- an overflow of the whole sum.

Since the design is combinational, no cycle counts are checked.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bcd_pkg.sv tb/tb_besc_bcd_adder_ndigit.sv \
    --top-module tb_besc_bcd_adder_ndigit -Mdir obj
./obj/Vtb_besc_bcd_adder_ndigit
```

Swap in any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/bcd_pkg.sv rtl/<module>.sv --top-module <module>`.
To change the width, set `DIGITS` on `besc_bcd_adder_ndigit`.
