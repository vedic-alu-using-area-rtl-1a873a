# 16-bit ALU with an Urdhva Tiryambakam (Vedic) multiplier

This is a purely combinational 16-bit ALU. Its multiplier uses the
*Urdhva Tiryambakam* ("vertically and crosswise") method of Vedic
arithmetic. All bit products of the operands are formed at once. They are
then added column by column, and the carries ride from each column into
the next. A 4x4 multiplier built this way is the basic cell. Four of them
make an 8x8 multiplier, and four 8x8 multipliers make the 16x16 one. Next
to the multiplier, the ALU has a ripple-carry adder, a subtractor, a
shifter and a bitwise logic unit. A 3-bit select picks the unit that
drives the outputs.

The RTL follows the published design "Vedic ALU using Area Optimised
Urdhva Triyambakam Multiplier". That description is brief. It covers the
multiplier method, the block structure, the pin list, and one simulation
waveform with concrete operand and result values. Everything else here,
listed under [Departures and own choices](#departures-and-own-choices),
is a choice made for this RTL.

## The 4x4 column-step multiplier (`vedic_mul4`)

Take `a = a3 a2 a1 a0` and `b = b3 b2 b1 b0`. The product is built in seven
steps, one for each product column `k = 0..6`:

| step | column k | bit products summed                  |
|------|----------|--------------------------------------|
| 1    | 0        | a0·b0 (vertical)                     |
| 2    | 1        | a1·b0, a0·b1 (crosswise)             |
| 3    | 2        | a2·b0, a1·b1, a0·b2                  |
| 4    | 3        | a3·b0, a2·b1, a1·b2, a0·b3           |
| 5    | 4        | a3·b1, a2·b2, a1·b3                  |
| 6    | 5        | a3·b2, a2·b3                         |
| 7    | 6        | a3·b3 (vertical)                     |

Step `k` adds its bit products to the carry word left by step `k-1`. The
low bit of that sum is product bit `p[k]`. The rest, the sum shifted right
by one, becomes the carry word for step `k+1`. The carry left after step 7
is `p[7]`.

The widest step is step 4. Its four products plus an incoming carry of at
most 2 reach 6, so 3-bit sums and carries are enough everywhere. The
sixteen AND gates work in parallel. The only serial path is the chain of
small step adders. The RTL writes that chain as one `always_comb` loop
over the columns, so it can be changed to N x N simply.

## From 4x4 to 16x16 (`vedic_combine`, `vedic_mul8`, `vedic_mul16`)

Split each operand into halves of H bits:

```
a*b = (aH*bH << 2H) + ((aH*bL + aL*bH) << H) + aL*bL
```

This is the same vertical-and-crosswise pattern again, one level up. Four
H x H multipliers form the four products at the same time. `vedic_combine`
then adds them:

* The low H bits of `aL*bL` are already final product bits.
* The upper 3H bits are the sum of three words: `aH*bL`, `aL*bH`, and
  `{aH*bH, high half of aL*bL}`.
* A row of carry-save adders (`csa_row`) reduces the three words to two
  without carry propagation.
* A ripple-carry adder (`rca_adder`) adds those two words.

The product always fits in 4H bits, so the adder's carry out and the top
bit of the carry-save carry word are always zero and are left unused.
`vedic_mul8` uses H = 4 with four `vedic_mul4` cells. `vedic_mul16` uses
H = 8 with four `vedic_mul8` blocks, for sixteen 4x4 cells in all.

## ALU operations (`vedic_alu`)

Ports: `x[15:0]`, `y[15:0]`, `sel[2:0]` in; `z1[15:0]`, `z2[15:0]`, `fcry`
out. That is 68 pins, the pin count of the original ALU.

| `sel` | operation | `z1`           | `z2`              | `fcry`             |
|-------|-----------|----------------|-------------------|--------------------|
| 0     | AND       | `x & y`        | 0                 | 0                  |
| 1     | OR        | `x \| y`       | 0                 | 0                  |
| 2     | XOR       | `x ^ y`        | 0                 | 0                  |
| 3     | shift left  | `x << y[3:0]`  | 0               | 0                  |
| 4     | shift right | `x >> y[3:0]` (logical) | 0      | 0                  |
| 5     | multiply  | product `[15:0]` | product `[31:16]` | 0                |
| 6     | add       | `x + y`        | 0                 | carry out          |
| 7     | subtract  | `y - x`        | 0                 | borrow (`y < x`)   |

The codes are named in `alu_pkg::alu_op_e`. Note the operand order of the
subtraction: it computes `y - x`. Operands are unsigned. The ALU has no
clock or reset. Every unit works in parallel on every input change, and
`sel` only steers the output multiplexer. The longest path runs through
the 16x16 multiplier.

The reference waveform gives these values, which the RTL reproduces. A dash
marks a value the waveform does not show; the RTL drives 0 there.

| x    | y    | sel | z1   | z2   |
|------|------|-----|------|------|
| 8888 | 1234 | 5   | 4ba0 | 09b5 |
| a00b | 0123 | 5   | ec81 | 00b5 |
| 89ab | 1245 | 5   | 2117 | 09d3 |
| 1234 | 8888 | 7   | 7654 | –    |
| 0123 | a007 | 7   | 9ee4 | –    |
| 1cc7 | abcd | 7   | 8f06 | –    |
| 8888 | 1234 | 6   | 9abc | 0000 |

## Departures and own choices

These follow the original design:

* The Urdhva Tiryambakam column steps of the 4x4 cell.
* The 4x4 → 8x8 → 16x16 hierarchy.
* The ripple-carry adder used for add and subtract.
* The port names and widths.
* The codes and results of multiply (5), add (6) and subtract (7),
  including the `y - x` order.
* The 32-bit product split as `{z2, z1}`.

These are this design's own choices:

* **Addition inside the 4x4 cell.** The original speaks of a new
  "addition structure" for the 4x4 cell but does not describe it. Here each
  step is a small adder of bit products plus the carry word.
* **Combining stage.** One carry-save row followed by a ripple-carry adder.
* **Codes 0–4.** The original names only "logical gates" and a "shifter".
  Here they are AND, OR, XOR and logical left and right shifts, with the
  shift amount taken from `y[3:0]`.
* **`fcry`.** It is the carry out for add and the borrow for subtract. It
  is 0 for every other operation.
* **`z2`.** It is 0 for every operation except multiply.
* **Not built: an accumulated product.** The original mentions an
  "accumulated product" output and suggests the multiplier for a
  multiply-accumulate unit. It gives no width, clock or control for it,
  and its pin count leaves no room for it.
* **Not built: FPGA pin placement.** It is board-specific and not logic.

## Files

| file | contents |
|------|----------|
| `rtl/alu_pkg.sv` | operation enums `alu_op_e`, `logic_op_e`; `ALU_WIDTH = 16` |
| `rtl/vedic_alu.sv` | top level: the five units and the output multiplexer |
| `rtl/vedic_mul16.sv`, `rtl/vedic_mul8.sv` | hierarchical multipliers |
| `rtl/vedic_mul4.sv` | 4x4 column-step cell |
| `rtl/vedic_combine.sv` | joins four half-width products |
| `rtl/csa_row.sv` | carry-save (3:2) row |
| `rtl/rca_adder.sv` | ripple-carry adder, parameter `W` (16) |
| `rtl/subtractor.sv` | two's-complement subtractor with borrow out |
| `rtl/shifter.sv` | logical barrel shifter, parameter `W` (16) |
| `rtl/logic_unit.sv` | AND / OR / XOR |
| `tb/tb_*.sv` | self-checking testbenches; `csa_row` and `vedic_combine` are tested inside the 8x8 and 16x16 multipliers |

## Verification

Every testbench compares the block with a model written with the
simulator's own operators. Each one prints
`TB_RESULT checks=N failures=M` at the end, and a watchdog stops it if it
hangs.

* `tb_vedic_mul4` and `tb_vedic_mul8` run every operand pair.
* `tb_vedic_mul16` runs the waveform products, corner cases, every pair of
  single-bit operands and 200,000 random pairs.
* The adder, subtractor, shifter and logic-unit benches run corner cases
  and random vectors.
* `tb_vedic_alu` is the end-to-end test at full size. It replays the
  waveform above and then runs 50,000 random pairs through all eight
  operations. It also checks that each operation, an add carry, a subtract
  borrow and a product reaching `z2` each occurred.

All benches pass. Each one was also shown to fail against a deliberately
broken copy of its block.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/alu_pkg.sv tb/tb_vedic_alu.sv \
          --top-module tb_vedic_alu -o sim && ./obj_dir/sim
```

Swap in another `tb_<name>` to run that bench instead. The benches take
under a second each.

Nothing here has been timed or synthesised against an FPGA. The original
reports a logic delay of 4.9 ns for the 4x4 cell, 6.4 ns for the 8x8
multiplier and 9.0 ns for the 16-bit ALU on a Xilinx Virtex-4. Those
figures describe its own implementation, not this RTL.
