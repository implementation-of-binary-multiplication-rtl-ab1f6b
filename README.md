# N-bit binary multiplier: Booth for signed, systolic array for unsigned

This is a combinational multiplier for two N-bit operands. One input, `sign`,
says how to read the operands:

- `sign = 1`: both operands are two's complement numbers. A Booth multiplier
  computes the product.
- `sign = 0`: both operands are unsigned. A systolic array of small
  multiply-add cells computes the product.

The product `m` always has 2N bits, so it can never overflow. The default
width is N = 8. Any N of 1 or more works.

Both multipliers see the same inputs all the time. A 2-to-1 multiplexer on
the output picks the one that `sign` selects. There is no clock and no reset.
`m` settles one propagation delay after `a`, `b` or `sign` changes.

```
            +---------------------------------------------+
  a[N-1:0] -+-> booth_multiplier (signed)    --p_signed---+-\
  b[N-1:0] -+-> systolic_multiplier (unsigned)-p_unsigned-+--> mux --> m[2N-1:0]
  sign ---------------------------------------------------+-/
```

## The signed path: Booth's algorithm, unrolled

Booth's radix-2 algorithm multiplies two's complement numbers with a uniform
rule, so the signs need no special handling. The rule scans the multiplier
from its least significant bit. At each step it looks at two bits: the
current bit, and the bit to its right (0 at the start). These two bits decide
what happens to the running upper half of the product, register **U**:

| current, right | action |
|---|---|
| 0 0 | no arithmetic |
| 0 1 | U := U + multiplicand |
| 1 0 | U := U − multiplicand |
| 1 1 | no arithmetic |

After that action, the pair U:V is shifted right by one place. V starts out
holding the multiplier. The shift is arithmetic: it copies U's sign bit. So
each step moves one multiplier bit out of V and one product bit in. After N
steps, U's low N bits followed by V give the 2N-bit product.

In this design the N steps are not done in turn by a clocked register. Each
step is its own copy of `booth_step`, and the N copies are chained. The whole
multiplication is therefore one combinational path.

**Choosing the multiplier.** Booth's algorithm adds or subtracts once for
each change between neighbouring bits of the multiplier (with a 0 taken to
the right of bit 0). `booth_operand_select` counts these changes in both
operands. The operand with fewer changes becomes the multiplier. On a tie,
`b` stays the multiplier. Multiplication commutes, so the product is the same
either way. Choosing by bit changes is part of the algorithm as the design
defines it. The tie rule and the exact counting rule are this
implementation's own choices.

**Why U has N+1 bits.** Subtracting the most negative N-bit number (for
example −128 at N = 8) from U can overflow an N-bit U. U is one bit wider,
so every operand pair, −128 × −128 included, gives the exact product.

**Worked example (N = 4): 0011 (3) × 1111 (−1).** The operand `1111` has one
bit change and `0011` has two. So `1111` is the multiplier and 3 is the
multiplicand.

| step | pair | action | U after shift | V after shift |
|---|---|---|---|---|
| 1 | 1 0 | U := 0 − 3 = 11101 | 11110 | 1111 |
| 2 | 1 1 | none | 11111 | 0111 |
| 3 | 1 1 | none | 11111 | 1011 |
| 4 | 1 1 | none | 11111 | 1101 |

The product is U[3:0] followed by V: `1111 1101`, which is −3.

The Booth block has three status outputs: `swapped`, `add_count` and
`sub_count`. They report the operand choice and how many adds and subtracts
were done. The top does not bring them out. Simulations can still read them
inside the hierarchy.

## The unsigned path: the systolic array

`systolic_multiplier` is a grid of N × N `systolic_cell`s:

- Row j handles multiplier bit `b[j]`.
- Column i handles multiplicand bit `a[i]`.
- Cell (i, j) forms `a[i] & b[j]`, which has weight i + j.

Each cell is a full adder. It adds three things:

- its partial product;
- the sum coming from the cell of the same weight in the row above (the cell
  one column to the right);
- the carry coming from the cell straight above, which has a weight one
  lower.

So sums move diagonally and carries move straight down. This carry-save
layout has no carry chain inside a row. Column 0 of row j holds no more
carries, so it gives product bit j directly. The last row leaves one sum and
one carry for each weight from N to 2N−1. A final row of N cells adds these
with a ripple carry. In that row `b_bit` is tied to 1, so each cell acts as a
plain full adder. The carry out of the last ripple cell is always 0 and is
left unconnected. Lint reports it as unused. It also reports the Booth status
signals and the change counts, which nothing in the top reads.

The array has no pipeline registers between rows. The multiplier is meant to
be a single combinational path, like the Booth path.

## Number formats

With `sign = 1`, operands and product are two's complement. `1111` is −1,
not −7. With `sign = 0`, both are plain unsigned binary. Reference
results:

| N | sign | a | b | m |
|---|---|---|---|---|
| 3 | 0 | 111 (7) | 011 (3) | 010101 (21) |
| 4 | 1 | 1111 (−1) | 0011 (3) | 11111101 (−3) |
| 8 | 1 | 00011001 (25) | 11100111 (−25) | 1111110110001111 (−625) |

To multiply narrower operands on a wider instance, zero-extend them for
unsigned mode or sign-extend them for signed mode.

## Files

| file | contents |
|---|---|
| `rtl/mult_pkg.sv` | `booth_op_e` (shift / add / subtract) and the Booth decode function |
| `rtl/systolic_cell.sv` | AND gate plus full adder |
| `rtl/systolic_multiplier.sv` | unsigned N × N carry-save array with ripple final row |
| `rtl/booth_operand_select.sv` | bit-change counts and multiplier choice |
| `rtl/booth_step.sv` | one Booth iteration: decode, add/subtract, arithmetic shift |
| `rtl/booth_multiplier.sv` | operand choice plus a chain of N Booth steps |
| `rtl/nbit_multiplier.sv` | top: both multipliers and the `sign` multiplexer |

The only parameter is `N` (`int`, default 8), the operand width. It is the
same in every module.

## Where this design departs from, or fills in, its description

- **No clock.** The algorithm describes N iterations on a register U. Here
  they are unrolled into combinational logic, because the multiplier is
  meant to be a single pad-to-pad path. A clocked, one-step-per-cycle
  version is not provided.
- **No run-time width input.** The width is the compile-time parameter N.
- **No latches.** The original implementation inferred six latches. They
  came from its coding style, and this design has none.
- **Carry-save organisation.** The layout of the systolic array (sums
  diagonal, carries vertical, ripple final row) is this implementation's
  choice. Its function (every bit pair multiplied, each column summed with
  its carries) is the specified one.
- **U is N+1 bits wide** (see above). The tie rule in the operand choice is
  also this implementation's own.
- **Timing and area are not reproduced.** The original design was measured
  on a Spartan-2 XC2S15 FPGA. With 3-bit operands, its worst path took
  20.249 ns. That number belongs to that device and that width.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and includes a watchdog.

| testbench | what it covers |
|---|---|
| `tb_systolic_cell` | all 16 input combinations |
| `tb_systolic_multiplier` | every operand pair at N = 1, 3 and 8 |
| `tb_booth_operand_select` | every pair at N = 6: change counts, swap decision, routing |
| `tb_booth_step` | 20 000 random states at N = 8 against an integer model of add/subtract-and-halve; all four bit pairs |
| `tb_booth_multiplier` | every pair at N = 1, 5 and 8; the product, the swap and the add and subtract counts |
| `tb_nbit_multiplier` | end to end at the default N = 8 with no parameter changed: all 65 536 pairs in both modes |
| `tb_paper_examples` | the reference results above, plus random 8-bit unsigned pairs and signed pairs with two negative operands |

`tb_nbit_multiplier` also counts how often each mechanism acts: unsigned
mode, signed mode, mode switches, operand swaps, Booth adds, Booth subtracts
and the most negative operand. A mechanism that never acts counts as a
failure.

All references are computed from integer arithmetic in the testbench, not
taken from the design. Every testbench was also run against a deliberately
broken copy of its module, and each one reported failures.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
    tb/tb_nbit_multiplier.sv --top-module tb_nbit_multiplier
./obj_dir/Vtb_nbit_multiplier
```

To run any other testbench, replace its name in both places. The package must
come first on the command line. Verilator finds the other modules through
`-Irtl` by their file names. Each run takes well under a second.

To change the width, set `N` on `nbit_multiplier`. The ports scale with it
(`a`, `b`: N bits; `m`: 2N bits). The logic grows about as N² for the array
and N² for the unrolled Booth chain.
