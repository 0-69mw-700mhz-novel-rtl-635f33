# Pair-wise 8x8 multiplier

An unsigned 8-bit x 8-bit multiplier that produces its 16-bit product
without Booth encoding and without a Wallace tree, but with fewer adder
levels than a plain array multiplier. It was published as a low-power
full-custom circuit, targeting 700 MHz at 1.8 V in a 0.18 µm CMOS process.
The main idea is to split each operand into its bits at even and at odd
positions and to multiply the halves pair-wise. In each of the four
resulting partial products, bits of equal weight sit two columns apart.
One adder cell per column can therefore finish a whole partial product in
a single level: its carry drops into the empty column next to it. After that,
four 16-bit partial products and two sparse correction words are left. Three
rows of 3:2 adders and a 16-bit carry-lookahead adder finish the job.

This repository holds a synthesizable SystemVerilog model of that data path
(`rtl/`) and self-checking testbenches (`tb/`). The model describes the logic
only. The original work is a transistor-level circuit. Its timing and power
figures are properties of that circuit and are not reproduced here.

## 1. Even/odd split

Number the operand bits from 1: `x = <x8 .. x1>`, where `x1` is the least
significant bit (RTL bit `x[0]`). Then

    x_e = <x8, 0, x6, 0, x4, 0, x2, 0>     x_o = <0, x7, 0, x5, 0, x3, 0, x1>
    x * y = x_e*y_e + x_e*y_o + x_o*y_e + x_o*y_o = Pee + Peo + Poe + Poo

Each group (ee, eo, oe, oo) has 16 AND terms (`and_generator`, 64 gates in
all). The term `x_i*y_j` has weight `2^(i+j-2)`. In a group, `i` and `j` each
step by 2. So the group's terms fall into only 7 columns, at weights
`2^(2s + OFF)` for `s = 0..6`. `OFF` is 2 for ee, 1 for eo and oe, and 0
for oo. The bit positions between these columns hold nothing.

### The 1st adder level: one cell per column

`pp_group_adder` adds each column with one cell. The cell's sum goes to the
column's own bit, and its carry goes to the empty bit above it. For Pee:

| s | weight | terms                          | cell | Pee bits  |
|---|--------|--------------------------------|------|-----------|
| 0 | 2^2    | x2y2                           | none | 2         |
| 1 | 2^4    | x4y2, x2y4                     | HA   | 4, 5      |
| 2 | 2^6    | x6y2, x4y4, x2y6               | FA   | 6, 7      |
| 3 | 2^8    | x8y2, x6y4, x4y6 + **x2y8**    | FA   | 8, 9      |
| 4 | 2^10   | x8y4, x6y6, x4y8               | FA   | 10, 11    |
| 5 | 2^12   | x8y6, x6y8                     | HA   | 12, 13    |
| 6 | 2^14   | x8y8                           | none | 14        |

The other three groups follow the same pattern, shifted by their `OFF`. The
result is a proper 16-bit binary number after one cell delay. Per group this
takes 2 half adders and 3 full adders. `adder_level1` holds the four groups.

### Spare bits: the M and N words

The middle column (`s = 3`) of every group has four terms. A full adder takes
only three, so the fourth term is set aside as a *spare bit*:

| group | spare term | weight |
|-------|------------|--------|
| ee    | x2y8       | 2^8    |
| eo    | x2y7       | 2^7    |
| oe    | x7y2       | 2^7    |
| oo    | x7y1       | 2^6    |

For the even x half the spare term is the one with the lowest x index. For the
odd x half it is the one with the highest. Two of the spare bits share weight
2^7, so the four bits are packed into two sparse words:

    M = x7y1*2^6 + x2y7*2^7 + x2y8*2^8
    N = x7y2*2^7

and `x*y = Pee + Peo + Poe + Poo + M + N` exactly. `tb_adder_level1` checks
this group by group for all 65536 operand pairs.

## 2. Reducing six words to two

Each reduction step is a `csa_row`: 16 full adders in parallel that turn
three words into a sum word and a carry word, where the carry word is shifted
left by one. The carry out of the top column always ends up zero, because
every intermediate total is at most `x*y < 2^16`. `pairwise_mult8` asserts
this for all five carry-outs.

    2nd level:  Pee + Peo + Poe -> A + B        Poo + M + N -> C + D
    3rd level:  A + B + C       -> E + F        (D is held back)
    4th level:  E + F + D       -> G + H

In the circuit, delay levels made of half-adder cells carry M and N, and later
D, so that they arrive at the same time as the adder outputs beside them.
Logically those levels pass their inputs through unchanged, so here they are
wires.

In the RTL every column of a row is a full adder. In the circuit, columns with
only two live inputs use half adders. Synthesis reaches the same result,
because constant-zero inputs reduce the full adders.

## 3. Final carry-lookahead adder

`cla16` adds G + H with four `cla4` blocks. Inside a block, all carries are
computed in parallel from the per-bit generate `G_i = a&b` and propagate
`P_i = a^b`. Between blocks, the carry ripples from one block to the next.
The carry into the lowest block is 0. The 17th bit (`cout`) is always 0 for
this use. `cla16` is a general 16-bit adder and `cla4` a general 4-bit adder.

One property of this reduction tree, seen over all 65536 operand pairs: the
lowest four bits of G and H never add up to more than 15. So the carry from
the first CLA block into the second is never set. The carries into the upper
two blocks are exercised.

## Module hierarchy and interfaces

    pairwise_mult8            x[7:0], y[7:0] -> p[15:0]
      and_generator           x, y -> pp (mult_pkg::pp_groups_t, four 4x4 AND arrays)
      adder_level1            pp -> p_ee, p_eo, p_oe, p_oo [15:0], spare[3:0]
        pp_group_adder x4     (parameters X_ODD, Y_ODD select the group)
          half_adder, full_adder
      csa_row x4              a, b, c -> s, cy (shifted), cout; parameter WIDTH = 16
        full_adder x16
      cla16                   a, b -> sum[15:0], cout
        cla4 x4               a, b, cin -> sum, cout
    mult_pkg                  OP_W = 8, PROD_W = 16, HALF_W = 4, pp_matrix_t, pp_groups_t

Timing: the whole multiplier is combinational, with no clock, reset or
registers. A new operand pair may be applied as soon as the previous product
has settled. In the intended circuit the critical path is AND gate, four
full-adder levels and the four-block CLA. The slowest case is `0xFF x 0xFF`.

The only size parameter is the width of `csa_row` (16). The rest of the
structure is fixed at 8 bits,
because the spare-bit positions and the number of adder levels are specific
to 8-bit operands. A different operand size would need a new column
analysis, not a new parameter value.

## How far it can be trusted

All testbenches are self-checking. Each compares against values it computes
from the operands itself, not from the block.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_full_adder`      | all 8 input combinations |
| `tb_half_adder`      | all 4 input combinations |
| `tb_and_generator`   | every AND term, and the weighted sum of the terms = x*y, for all 65536 pairs |
| `tb_adder_level1`    | each group's partial product + spare bit = its half-products, each spare bit's identity, for all 65536 pairs |
| `tb_csa_row`         | total preserved, sum word = a^b^c, on 5005 random and corner triples |
| `tb_cla4`            | all 512 combinations |
| `tb_cla16`           | corner cases and 5000 random pairs, with carries crossing each block boundary |
| `tb_pairwise_mult8`  | 50 chosen pairs (all pairs of 00, 01, 55, AA, 7F, 80, FE, plus FF x FF), 350 random pairs, then all 65536 pairs |

`tb_pairwise_mult8` also counts how often each mechanism runs: each spare
bit, M and N non-zero, D non-zero at the 4th level, and the CLA inter-block
carries. It fails if a required one never occurs. Because the exhaustive
sweep covers every input, the product is verified for every operand pair.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        rtl/mult_pkg.sv tb/tb_pairwise_mult8.sv --top-module tb_pairwise_mult8
    ./obj_dir/Vtb_pairwise_mult8

Replace `pairwise_mult8` with any other block name to run that block's test.
Each file under `rtl/` holds one module or the package. The package must be
read first.

## Choices made here and departures from the published design

- **Unsigned operands.** The design has no sign handling, and FF x FF is
  treated as 255 x 255.
- **Position of N.** The term x7y2 has weight 2^7, so N holds it at bit 7.
  Placing it one position higher, at 2^8, makes about a quarter of all
  products wrong; the fault test of the top module uses exactly that error.
- **Delay levels are wires.** They balance arrival times in the circuit and
  have no logic function.
- **No registers.** The published block diagram lists a flip-flop symbol in
  its legend but draws none. The design is described and measured as a
  combinational multiplier, with speed taken as the shortest interval between
  operand pairs. Registers can be added around `pairwise_mult8` if a
  pipelined use needs them.
- **Cells by function only.** The full adder is modelled by its Boolean
  function. The carry is written as a select on `a ^ b`, which mirrors the
  pass-transistor carry of the 10-transistor cell. Neither this cell's
  threshold-voltage losses nor the delay and power of any cell are modelled.
  The half adder and the CLA lookahead equations are the standard forms,
  because only their function is specified.
- **Constant-zero outputs.** `adder_level1` has output bits that are always
  zero. These are the empty columns of each partial product that receive no
  carry, for example bits 0, 1, 3 and 15 of Pee. They are kept so that all four
  partial products are plain 16-bit words.
- **Not covered.** Timing (1256 ps pre-layout, 1420 ps post-layout for the
  8x8 multiplier), power (about 0.64-0.69 mW), layout and the Baugh-Wooley
  multiplier used only for comparison.
