# 64-bit ALU with a carry-lookahead adder

A 64-bit arithmetic logic unit. The idea behind it is that the adder is the
slow part of any ALU: the longest path is the carry out of bit 0 reaching
bit 63. So the arithmetic side is built around a carry-lookahead adder, and
everything else (operand selection, bitwise logic, shifts) is a few gate
levels deep and sits off that path. The original circuit uses monotonic
static CMOS gates for the adder and runs the logic side from a lower supply
to save power. Those are transistor-level and electrical choices. This RTL
keeps the architecture and its function; circuit style and supply
voltages have no counterpart here.

## Datapath

```
 a_in ─► Register A ─┬──────────────────────────► X ┐
                     │                              ├ adder (CLA) ─► D ──► i0 ┐
 b_in ─► Register B ─┼─► second operand select ─► Y ┘   ▲ cin   └► c64        │
                     │       (B, ~B, 0, all 1s)                               │
                     ├─► logic gates (AND, OR, XOR, NOT A) ──────────► i1 ─────┤ output mux ─► f
                     └─► shift unit ── A shifted right by one ────────► i2 ─────┤  (S3 S2)
                                     └ A shifted left by one ─────────► i3 ─────┘
```

The operand selector, the logic gates and the shift unit all use S1S0. Only
the output multiplexer looks at S3S2. Cin only goes to the adder.

| Module             | Role |
|--------------------|------|
| `alu64`            | top: two operand registers, arithmetic unit, logical unit, output mux |
| `operand_register` | Register A / Register B, loads every clock |
| `arithmetic_unit`  | `operand_select` + `cla_adder`: D = A + Y + Cin |
| `operand_select`   | per-bit 4:1 mux choosing Y from B, ~B, 0, 1 |
| `cla_adder`        | bit generate/propagate, `cla_tree`, sum and carry out |
| `cla_tree`         | radix-4 lookahead tree built from `cla_lookahead4` units |
| `cla_lookahead4`   | one 4-bit lookahead unit with group generate/propagate |
| `logical_unit`     | `logic_gates` + `shift_unit` |
| `logic_gates`      | AND, OR, XOR, NOT A per bit, 4:1 mux by S1S0 |
| `shift_unit`       | two `shifter`s (one fixed right, one fixed left) and their serial inputs |
| `shifter`          | one-position shifter, one 2:1 mux per bit, serial inputs IR / IL |
| `mux4`             | two-level 4:1 mux (S0 first, then S1), used at every selection point |
| `alu_pkg`          | select encodings (`alu_class_e`, `yop_e`, `logop_e`, `shkind_e`, `alu_sel_t`) |

## Operation codes

`s` is a packed struct `{cls, op}` = `{S3 S2, S1 S0}`.

| S3S2 | S1S0 | Cin = 0              | Cin = 1            |
|------|------|----------------------|--------------------|
| 00   | 00   | A + B                | A + B + 1          |
| 00   | 01   | A + ~B  (A − B − 1)  | A + ~B + 1 (A − B) |
| 00   | 10   | A  (transfer)        | A + 1              |
| 00   | 11   | A + 1…1  (A − 1)     | A  (transfer)      |
| 01   | 00   | A AND B              | same               |
| 01   | 01   | A OR B               | same               |
| 01   | 10   | A XOR B              | same               |
| 01   | 11   | NOT A                | same               |
| 10   | 00   | A >> 1, 0 in (logical)          | same |
| 10   | 01   | A >> 1, sign kept (arithmetic)  | same |
| 10   | 10   | rotate right by 1 (circular)    | same |
| 10   | 11   | as 00                           | same |
| 11   | 00   | A << 1, 0 in (logical)          | same |
| 11   | 01   | A << 1, 0 in (arithmetic = logical) | same |
| 11   | 10   | rotate left by 1 (circular)     | same |
| 11   | 11   | as 00                           | same |

The eight arithmetic rows are just D = A + Y + Cin with Y = B, ~B, 0 or all
ones. Subtraction is A plus the two's complement of B, which means ~B plus a
carry in of 1. Decrement adds all ones, the two's complement of 1. Transfer
appears twice, so the unit has seven distinct arithmetic operations. With
four logic and six shift operations that is eighteen operation codes in all.

`c64` is the adder's carry out. It only means something in the arithmetic
class. For subtraction it is the "no borrow" bit: it is 1 when A ≥ B
(unsigned). No zero, sign or overflow flags are produced.

**Own choice:** the S3S2 classes, the arithmetic rows and the logic rows are
as specified. How S1S0 selects the kind of shift is this design's own
encoding: 00 logical, 01 arithmetic, 10 circular, and 11 as a spare that
behaves as logical. The spec lists the six shifts but not their codes. If
you need a different encoding, change `shkind_e` in `alu_pkg` and the `case`
in `shift_unit`.

## The carry-lookahead adder

This is the part that takes most explaining. `cla_adder` forms g = x & y
and p = x ^ y for every bit. It hands them to `cla_tree`, which returns the
carry into every bit position. Each sum bit is then p ^ carry, and the carry
out is G | P·cin for the whole word.

`cla_tree` is a radix-4 tree of identical 4-bit lookahead units
(`cla_lookahead4`). Each unit does two things:

* **Upwards:** it forms the group generate
  G = g3 | p3g2 | p3p2g1 | p3p2p1g0 and the group propagate P = p3p2p1p0 of
  its four inputs.
* **Downwards:** from the carry into its group, it forms the carries into its
  four members as flat sum-of-products terms, for example
  c2 = g1 | p1g0 | p1p0c0, so that nothing ripples.

For 64 bits there are three levels: 16 units over the bits, 4 over those
units and 1 root, 21 units in all. A carry therefore crosses at most three
units on the way up and three on the way down. A ripple adder would cross 64
positions. The tree is written with one flat vector for each of g, p and c,
holding every node of every level. Level 0 is the bit positions; the root is
the last element, and its carry is `cin`. `WIDTH` must be a power of four
(4, 16, 64, 256). Elaboration stops with an error otherwise.

**Own choice:** the adder is described as a "modified" carry-lookahead
adder, but its grouping is not given. The radix-4 tree is a plain,
standard carry-lookahead structure. It is not a claim about what the
modification was. For a wider or faster adder, change `cla_tree` alone:
`cla_adder` only depends on it returning the per-bit carries.

## Shift unit

The shifter is the classic multiplexer shifter: output bit i takes A(i+1)
when shifting right or A(i−1) when shifting left. The end bit takes a serial
input: IR at the top for right shifts, IL at bit 0 for left shifts. At 4 bits:

| sel | H3 | H2 | H1 | H0 |
|-----|----|----|----|----|
| 0 (right) | IR | A3 | A2 | A1 |
| 1 (left)  | A2 | A1 | A0 | IL |

The shift distance is always one position. `shift_unit` holds two
instances, one with `sel` tied to 0 and one tied to 1. Both results go to the
output mux, so S3S2 picks the direction. S1S0 only decides the serial input:

* logical: 0
* arithmetic right: the sign bit A63
* circular right: A0
* circular left: A63

## Timing and reset

* `a_in` and `b_in` are captured into Register A and Register B on the
  rising edge of `clk`. A new result is therefore ready one clock after its
  operands are applied.
* `f` and `c64` are combinational. They depend on the registered operands
  and on the live `s` and `cin` inputs, which are not registered. The
  result is not registered either: it goes to whatever storage follows the
  ALU.
* `rst_n` is active-low and asynchronous. It clears both operand registers.

**Own choice:** the register stage on A and B is part of the specified
architecture. Loading on every clock, the reset, and leaving S, Cin and F
unregistered are this design's own choices.

## How far to trust it, and where it departs

Behaviour that follows the specification:

* the block structure
* the four result classes and their S3S2 codes
* the arithmetic table (D = A + Y + Cin with its eight cases)
* the logic-gate order: AND, OR, XOR, NOT
* the one-position shifter's function table
* the two-level 4:1 multiplexer

This design's own choices:

* the internal grouping of the carry-lookahead adder
* the S1S0 encoding of the shift kinds, and the spare code 11
* arithmetic shift left behaving as logical shift left
* register load and reset behaviour, and the unregistered select and carry
  inputs
* NOT complementing A rather than B. The one-bit logic stage draws the
  inverter on the A line.

Not represented in RTL:

* the MS-CMOS circuit style and its skew ratio
* the 1.2 V / 0.6 V dual supply, which needs level shifters in a real
  implementation
* clock frequency, power and transistor count
* the multiplier that the original results mention only by name

Multiplication and division are not part of this ALU. They would be done by
repeated add/subtract and shift operations driven from outside.

## Simulation

Each testbench in `tb/` checks itself against an independent model. Each one
ends by printing `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|-----------|----------------|
| `tb_alu64` | full 64-bit ALU at default parameters: reset, one-cycle operand latency, all 32 (S, Cin) codes over 304 operand pairs against `alu_ref_pkg`; counts every distinct operation, carry out 0 and 1, sign shift-in and both circular wraps, and fails if any never occurred |
| `tb_alu4` | the ALU at `WIDTH = 4`, exhaustive over A, B, S and Cin |
| `tb_cla_adder` | 4-bit exhaustive, 16 and 64-bit carry-chain corner cases and random operands |
| `tb_arithmetic_unit`, `tb_operand_select` | the eight arithmetic codes and the Y selection |
| `tb_logical_unit`, `tb_logic_gates`, `tb_shift_unit`, `tb_shifter` | logic and shift results; the 4-bit shifter against the table above |
| `tb_mux4`, `tb_operand_register` | multiplexer selection; register latency and reset |

`alu_ref_pkg` (in `tb/`) is the reference model: plain integer arithmetic
and shifts, written from the operation table.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_alu64.sv --top-module tb_alu64 -o sim
./obj_dir/sim
```

Replace `tb_alu64` with any other testbench name. Every testbench finishes
in well under a second.

To change the word size, set `WIDTH` on `alu64`. It must be a power of four
because of the adder. The default is 64.
