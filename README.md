# 4-bit ALU with a Vedic (Urdhva Tiryakbhyam) multiplier

This is a small combinational arithmetic logic unit. Its multiplier uses the
*Urdhva Tiryakbhyam* ("vertically and crosswise") rule from Vedic mental
arithmetic. The idea is to form every partial product at once, then add up
each product column (all `x[i]·y[j]` with the same `i+j`) in parallel. An
array multiplier works differently: it adds shifted rows one after another.
The ALU takes two 4-bit operands and three selection lines. It performs three
arithmetic functions (add, subtract, multiply) and five logic functions
(NOT A, AND, OR, NOR, XOR). The result comes out as two 4-bit nibbles, `c` (bits
0–3) and `d` (bits 4–7), so a full 8-bit product fits.

A 2x2 Vedic multiplier, the smallest example of the same rule, sits next to
the ALU in the top module. It has its own ports.

Everything is combinational: there is no clock, no reset and no state.

## The vertically-and-crosswise rule

Take X = x3x2x1x0 and Y = y3y2y1y0. Product bit k collects the *crosswise*
group of partial products whose indices add to k, plus the carries from
column k-1:

| weight | partial products                  |
|--------|-----------------------------------|
| 0      | x0y0 (vertical)                   |
| 1      | x1y0, x0y1                        |
| 2      | x2y0, x1y1, x0y2                  |
| 3      | x3y0, x2y1, x1y2, x0y3            |
| 4      | x3y1, x2y2, x1y3                  |
| 5      | x3y2, x2y3                        |
| 6      | x3y3 (vertical)                   |

Worked example: 1011 × 1101. The columns add up to 1, 1, 1, 1, 0, 0, 0, 1 from
weight 0 upwards, so the product is 1000_1111 (143 = 11 × 13).

### 2x2 multiplier (`vedic_mul2x2`)

- Bit 0 is x0y0.
- The two crosswise products go into a half adder. Its sum is bit 1.
- That half adder's carry and x1y1 go into a second half adder. Its sum is
  bit 2 and its carry is bit 3.

The module has 4 AND gates and 2 half adders.

### 4x4 multiplier (`vedic_mul4x4`)

This is the part that takes the most care. There are 16 AND gates. The columns
are reduced by a fixed network of full adders (FA) and half adders (HA).

The first row is one HA and four FAs:

- HA on weight 1. Its sum is P1.
- FA on x1y1, x2y0, x0y2 (weight 2).
- FA on x1y2, x2y1, x3y0 (weight 3).
- FA on x2y2, x3y1, x1y3 (weight 4).
- FA on x3y2, x2y3 and the weight-4 carry (weight 5).

Then each column is closed in turn:

| weight | cells                                                         | output |
|--------|---------------------------------------------------------------|--------|
| 2      | HA(row-1 sum, weight-1 carry)                                 | P2     |
| 3      | FA(row-1 sum, x0y3, weight-2 FA carry), then HA(that sum, weight-2 HA carry) | P3 |
| 4      | FA(row-1 sum, both weight-3 FA carries), then HA(that sum, weight-3 HA carry) | P4 |
| 5      | FA(row-1 sum, both weight-4 carries)                          | P5     |
| 6      | FA(x3y3, both weight-5 carries)                               | P6, P7 |

In total: 16 AND, 8 FA, 4 HA. The longest path passes through about six adder
cells.

The original description counts only three half adders. However, any correct
4x4 column reduction that uses eight full adders needs one half adder in each
of columns 1 to 4. Each of those columns ends with an even number of bits, and
a full adder alone cannot reduce an even count to one bit. This design
therefore has one more half adder than the original count.

The first adder row follows the original block diagram. So do these features:

- P0 is the raw x0y0.
- The carry of the weight-4 FA feeds the weight-5 FA.
- A single FA takes x3y3 and produces both P6 and P7.

The later wiring was worked out here so that the product is exact.

## ALU datapath (`vedic_alu`)

All function units see A and B at the same time. Multiplexers pick the result:

```
 B ──┬──────────────► mux2 ─► rca_adder(A, ·) ──► sum, carry
     └─► twos_complement ┘ ▲ use_comp
 A,B ─► vedic_mul4x4 ─► prod[7:0]
 A,B ─► logic_unit ─► ~A, A&B, A|B, ~(A|B), A^B
 sum / prod[3:0] / logic ─► mux8 (sel) ─► c[3:0]
 {000,carry} / prod[7:4] ─► mux2 (hi_mul) ─► d[3:0]
```

`select_logic` decodes the selection lines into the two controls:

- `use_comp` is the OR of the lines. The adder receives B unchanged only when
  all selection lines are low. Any other code gives it the two's complement.
- `hi_mul` is an AND gate on the lines. It is high for the multiply code only,
  and then `d` takes the upper half of the product.

### Opcodes

`sel[0]` = S1, `sel[1]` = S2, `sel[2]` = S3. The encoding is the `alu_op_e`
enum in `alu_pkg`.

| sel | function | c                   | d                            |
|-----|----------|---------------------|------------------------------|
| 000 | ADD      | (A+B)[3:0]          | carry of A+B                 |
| 001 | MUL      | (A·B)[3:0]          | (A·B)[7:4]                   |
| 010 | INV      | ~A                  | carry of A+(−B)              |
| 011 | AND      | A & B               | carry of A+(−B)              |
| 100 | SUB      | (A−B)[3:0]          | carry of A+(−B)              |
| 101 | OR       | A \| B              | carry of A+(−B)              |
| 110 | NOR      | ~(A \| B)           | carry of A+(−B)              |
| 111 | XOR      | A ^ B               | carry of A+(−B)              |

Only ADD = 000 and SUB = "S3 alone" are fixed by the original design. The
other six codes follow the order in which the sources feed the 8:1
multiplexer. For a logic function, `d` is the adder's carry output, which is
always active. Only `c` holds the logic result.

The carry after subtraction is that of A + (−B) in 4 bits:

- It is 1 when A ≥ B and B ≠ 0.
- It is 0 when A < B.
- For B = 0 it is 0, because the 4-bit two's complement of 0 is 0.

Treat `d[0]` after SUB as "no borrow" only for B ≠ 0.

Example with A = 1010 and B = 1001:

| function | c    | d    |
|----------|------|------|
| ADD      | 0011 | 0001 |
| SUB      | 0001 | 0001 |
| MUL      | 1010 | 0101 |
| AND      | 1000 | 0001 |

## Where this design fills gaps or departs

- **Opcodes.** Six of the eight opcodes are this design's own, as described
  above.
- **Inverter and NOT gate.** The original block list names an INVERTOR and a
  NOT GATE among five logic functions. Here the NOT gate is the inversion of
  the OR result (NOR). The inverter acts on A; that choice is this design's.
- **Adder and two's complement.** Their structure is not specified. Here they
  are a ripple-carry chain of full adders and an invert-then-increment
  half-adder chain.
- **Half-adder count.** The 4x4 multiplier has 4 half adders, not 3 (see
  above).
- **Operand input.** A generic overview diagram of the original design shows
  a "»4" operand shift. It is not described further and is not built: A and
  B are separate ports.
- **Evaluation.** The original design was evaluated by FPGA path delay and LUT
  count against an array multiplier and an array ALU. Those baselines are not
  part of this RTL, and no timing figures are claimed here.

## Files

| file | content |
|------|---------|
| `rtl/alu_pkg.sv` | width `ALU_W = 4`, opcode enum `alu_op_e` |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | 1-bit adder cells |
| `rtl/vedic_mul2x2.sv` | 2x2 Vedic multiplier |
| `rtl/vedic_mul4x4.sv` | 4x4 Vedic multiplier |
| `rtl/rca_adder.sv` | W-bit ripple-carry adder, carry out |
| `rtl/twos_complement.sv` | W-bit negation |
| `rtl/mux2.sv`, `rtl/mux8.sv` | result multiplexers |
| `rtl/logic_unit.sv` | NOT A, AND, OR, NOR, XOR |
| `rtl/select_logic.sv` | selection-line decode |
| `rtl/vedic_alu.sv` | top: the ALU plus the stand-alone 2x2 multiplier |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The `W` parameters default to 4. `vedic_alu` requires W = 4 because the
multiplier is a fixed 4x4 structure. The adder, the two's complement, the
multiplexers and the logic unit work at any width.

## Verification and simulation

Each testbench computes its expected values independently with integer
arithmetic. It prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends a hung run.

- The multiplier testbenches are exhaustive: 16 and 256 operand pairs. The
  4x4 testbench also runs the two worked examples: 1111×1111 = 1110_0001 and
  1011×1101 = 1000_1111.
- `tb_vedic_alu` runs the whole design at its default parameters:
  - the example sequence above;
  - all 8 opcodes × 256 operand pairs;
  - all 2x2 products.

  It also counts how often each mechanism occurs, and fails if any never does:
  - each function;
  - an add with carry;
  - a subtract with and without borrow;
  - the high nibble switched to the product;
  - the 2x2 product reaching bit 3.

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl \
          rtl/alu_pkg.sv tb/tb_vedic_alu.sv --top-module tb_vedic_alu
./obj_dir/Vtb_vedic_alu
```

Replace `tb_vedic_alu` with any other `tb_<module>` to run that testbench.
Each run takes well under a second.
