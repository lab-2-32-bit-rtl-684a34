# 32-bit MIPS-style ALU

A purely combinational 32-bit arithmetic/logic unit of the kind found in a
MIPS-like processor. It takes two operands `a` and `b` and a 6-bit opcode
`op`, and produces a 32-bit result `r`. The opcode selects one of 17
functions: add, subtract, six comparisons, four bitwise logical operations,
and five shifts and rotations.

The main idea is that the opcode is a set of control fields that drive the
hardware directly, so no opcode decoder is needed:

| opcode bits | drives                                                    |
|-------------|-----------------------------------------------------------|
| `op[5:4]`   | the 4:1 output multiplexer (which unit's result is `r`)   |
| `op[3]`     | subtract mode of the adder/subtractor                     |
| `op[2:0]`   | comparison function, or shift/rotate function             |
| `op[1:0]`   | logical function                                          |

All four units compute in parallel on every input change. The multiplexer
then passes one result to `r`.

## Opcode map

`X` is a don't-care bit.

| function            | opcode   | unit (op[5:4]) |
|---------------------|----------|----------------|
| a + b               | `000XXX` | add/sub (0)    |
| a - b               | `001XXX` | add/sub (0)    |
| a >= b, signed      | `011001` | compare (1)    |
| a < b, signed       | `011010` | compare (1)    |
| a != b              | `011011` | compare (1)    |
| a == b              | `011100` | compare (1)    |
| a >= b, unsigned    | `011101` | compare (1)    |
| a < b, unsigned     | `011110` | compare (1)    |
| a nor b             | `10XX00` | logical (2)    |
| a and b             | `10XX01` | logical (2)    |
| a or b              | `10XX10` | logical (2)    |
| a xor b             | `10XX11` | logical (2)    |
| rotate a left by b  | `11X000` | shift (3)      |
| rotate a right by b | `11X001` | shift (3)      |
| a << b (logical)    | `11X010` | shift (3)      |
| a >> b (logical)    | `11X011` | shift (3)      |
| a >>> b (arithmetic)| `11X111` | shift (3)      |

A comparison gives `r = 1` when it holds and `r = 0` when it does not. Bits
31:1 of `r` are then zero. Shifts and rotations use only `b[4:0]` as the
amount. `alu_pkg` defines these opcodes as `OP_*` constants, with each
don't-care bit set to 0.

Opcodes that are not in the table:

- `011000` and `011111` (comparison codes 000 and 111) give 0.
- `11X100`, `11X101` and `11X110` (shift codes 100 to 110) give 0.
- `010XXX` is not a valid opcode. It selects the comparison unit while the
  adder adds instead of subtracting, so the result is a comparison of
  meaningless flags. This ALU does not force the adder into subtract mode.
  To compare, software must use the `011XXX` codes.

## How comparisons reuse the subtractor

The comparison unit has no comparator of its own. All comparison opcodes
have `op[3] = 1`, so during a comparison the adder/subtractor computes
`a - b`. The comparison unit reads only five bits:

- `zero`: the difference is zero. Equal is `zero`, and not-equal is `!zero`.
- `carry`: the carry out of `a + ~b + 1`. It is 1 exactly when no borrow
  occurs, so unsigned `a >= b` is `carry` and unsigned `a < b` is `!carry`.
- `a[31]`, `b[31]` and `diff[31]`: the sign bits of the two operands and of
  the difference. Signed `a >= b` holds in two cases. In the first, `a` is
  non-negative and `b` is negative. In the second, the operands have the
  same sign and the difference is non-negative. The difference cannot
  overflow when the signs match, so its sign bit can be trusted there.
  Signed `a < b` is the complement.

The subtractor works as usual for two's complement. `b` is XORed with the
subtract bit, and the same bit is the adder's carry-in, which gives
`a + ~b + 1`.

## How one rotator does all five shifts

`alu_shift` contains a single right rotator. It rotates `{a, a}` right and
keeps the low 32 bits. The five functions come from it as follows:

- **ror**: rotate right by `n`.
- **rol**: rotate right by `-n mod 32`. A left rotation by `n` is the same
  as a right rotation by `32 - n`.
- **srl**: rotate right by `n`, then clear the top `n` bits, which are the
  bits that wrapped around. The mask is `~0 >> n`.
- **sra**: like srl, but the top `n` bits are filled with copies of `a[31]`.
- **sll**: rotate right by `-n`, then clear the low `n` bits. The mask is
  `~0 << n`.

## Modules

| module           | role                                                     |
|------------------|----------------------------------------------------------|
| `alu_pkg`        | width, unit-select and function enums, opcode constants  |
| `alu_add_sub`    | 32-bit adder/subtractor; outputs `carry` and `zero`      |
| `alu_compare`    | six comparisons from the subtractor flags; 1-bit result  |
| `alu_logic`      | nor / and / or / xor                                     |
| `alu_shift`      | rol / ror / sll / srl / sra using the one rotator        |
| `alu_result_mux` | 4:1 result select on `op[5:4]`                           |
| `mips_alu`       | top: wires the units together; zero-extends the compare bit |

The top has these ports: `a[31:0]`, `b[31:0]`, `op[5:0]` as inputs, and
`r[31:0]` as the output. The ALU has no clock and no reset. Its latency is
one combinational path. The adder's `carry` and `zero` flags are used
inside the ALU but are not brought out. The ALU has no overflow flag.

The width is a parameter, `WIDTH`, with a default of 32. The shift amount
is `$clog2(WIDTH)` bits wide. The comparison logic reads the top bit of
each operand, so other widths should also work. Only 32 bits has been
simulated.

## What comes from the specification and what was chosen here

These parts follow the specification of the ALU:

- the opcode encoding
- the four units and how the opcode fields drive them
- the B-inversion and carry-in scheme of the subtractor
- the flag-based comparison rules
- the zero extension of the comparison result
- the shift and rotate semantics, including the 5-bit shift amount

These are choices made in this design:

- The shift unit is built around one rotator. The specification defines
  only what each shift does, and it notes that a left rotation equals a
  right rotation by the negated amount.
- Undefined comparison and shift codes give 0.
- The logical unit and the adder use plain SystemVerilog operators. The
  synthesis tool chooses the adder architecture.

The specification's block diagram shows six bits of `b` (`b[5:0]`) going
into the shift unit. Its text says only five bits are used, and this design
uses five.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench compares
its module with a reference model written independently in the testbench.
It prints `TB_RESULT checks=N failures=M` at the end.

- `tb_alu_add_sub` checks corner and random operands in both modes,
  against a 33-bit reference sum.
- `tb_alu_compare` drives flags derived from `a - b` and checks all eight
  codes against direct signed and unsigned comparisons.
- `tb_alu_logic` checks the four functions against their bitwise truth
  tables.
- `tb_alu_shift` checks every amount and every code against a reference
  that moves one bit per step.
- `tb_alu_result_mux` checks each select value.
- `tb_mips_alu` is the end-to-end test at the default parameters. It runs
  every opcode (except the invalid `010XXX`) on corner and random operands,
  about 340,000 checks. It also checks that the `OP_*` constants name the
  intended functions. It counts each mechanism: all 17 functions,
  carry out, borrow, equal operands, signed and unsigned comparisons that
  disagree, each comparison true and false, shifts by 0 and 31, sra of a
  negative number, and opcodes with don't-care bits set. Any mechanism
  that never occurs counts as a failure.

Example with Verilator:

    verilator --binary --timing --assert -Irtl rtl/alu_pkg.sv \
      rtl/alu_add_sub.sv rtl/alu_compare.sv rtl/alu_logic.sv rtl/alu_shift.sv \
      rtl/alu_result_mux.sv rtl/mips_alu.sv tb/tb_mips_alu.sv \
      --top-module tb_mips_alu -Mdir obj_tb_mips_alu
    ./obj_tb_mips_alu/Vtb_mips_alu

For a unit testbench, use the same command with `alu_pkg.sv`, the unit's
file and its testbench. Each run takes well under a second.

`verilator --lint-only -Wall` reports that the `OP_*` constants of
`alu_pkg` are unused. The RTL does not use them, because the units decode
opcode fields instead of whole opcodes. They are provided for code that
drives the ALU.
