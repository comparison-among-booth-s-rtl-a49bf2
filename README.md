# Booth and Pekmestzi multipliers, 8 x 8, combinational

This is a set of three combinational 8 x 8 multipliers. They are alternative
ways of doing the same job, built so that they can be compared:

| module              | operands          | algorithm                                   | result                         |
|---------------------|-------------------|---------------------------------------------|--------------------------------|
| `booth_mult`        | two's complement  | Booth radix-2 recoding, unrolled into N steps | two halves, `{p_hi, p_lo}`     |
| `pek_mult_unsigned` | unsigned          | Pekmestzi multiplexer-based array            | one 2N-bit product `p`         |
| `pek_mult_signed`   | two's complement  | Pekmestzi array with a subtracted last row   | one 2N-bit product `p`         |

None of them has a clock, a register or a reset. The product follows the
operands after the logic delay. `mult_compare_top` puts the three side by side,
each with its own operand and result ports. The operand width is the parameter
`N`, 8 by default, taken from `mult_pkg::WIDTH`.

## Booth's algorithm, unrolled

Booth's method removes most of the additions for runs of ones in the
multiplier. A run of ones from bit n to bit m is worth 2^(m+1) - 2^n, so it
costs one subtraction at its low end and one addition just above its high end.
The sequential form holds an accumulator A, the multiplier register Q and one
extra bit q_prev. Each step looks at (q0, q_prev):

| q0 q_prev | action                |
|-----------|-----------------------|
| 0 0       | shift only            |
| 0 1       | A = A + M, then shift |
| 1 0       | A = A - M, then shift |
| 1 1       | shift only            |

The shift is an arithmetic right shift of the whole {A, Q, q_prev}. After N
steps, {A, Q} holds the 2N-bit signed product.

`booth_step` is one step as combinational logic. `booth_mult` chains N of them,
starting from A = 0, Q = multiplier and q_prev = 0. The `ops` output reports
the action of each step (`mult_pkg::booth_op_e`), for observation only. As an
example, 9 x 14 with 5-bit registers runs shift, subtract, shift, shift, add.

Two points deserve attention:

* **The accumulator has one guard bit.** With an N-bit A, the step "A - M"
  overflows when M = -2^(N-1). For example, -128 x 1 would come out wrong. A is
  therefore N+1 bits wide. Only its low N bits form `p_hi`. This is exact,
  because an N x N signed product always fits in 2N bits. An immediate assertion
  in `booth_mult` checks that the guard bit always equals the sign bit.
* **"Positive" means below 2^(N-1).** The Booth circuit reads both operands as
  two's complement, so it is also the positive-number multiplier, but only for
  operands 0..127. Values 128..255 are read as negative. For the full unsigned
  range, use `pek_mult_unsigned`.

The result is kept as two N-bit ports, high and low, as the original design
delivers it. The user concatenates them.

When the algorithm is unrolled into hardware, a run of identical bits no longer
saves time. Every step holds a full adder/subtractor whether or not it is used.
What the recoding keeps is its correct handling of signed operands.

## Pekmestzi's multiplexer-based array

This is the less familiar circuit, and the one that needs the most
explanation.

### The recurrence

Write X_j and Y_j for the numbers formed by the j low bits of X and Y. Taking
off the top bit of each operand gives

    X_(j+1) * Y_(j+1) = X_j * Y_j + 2^j * ( x_j y_j 2^j + Z_j ),
    Z_j = x_j * Y_j + y_j * X_j .

Applying this repeatedly from j = 0 gives

    P = sum_j x_j y_j 2^(2j) + sum_(j>=1) Z_j 2^j .

The key observation is that Z_j takes only four values, selected by the bit
pair (x_j, y_j):

| x_j y_j | Z_j            |
|---------|----------------|
| 0 0     | 0              |
| 0 1     | X_j            |
| 1 0     | Y_j            |
| 1 1     | X_j + Y_j = S_j |

S_j is a prefix of the single sum S = X + Y: its j low sum bits, with the carry
c_j into bit j on top. So S = X + Y is formed once, by a ripple chain of
`pek_sum_cell`. After that, each row only has to select bits with 4-to-1
multiplexers; there are no AND-gate partial products. The algorithm treats X
and Y the same way, so the operands can be interchanged.

### Rows and cells

Row 0 is the single AND gate x_0 y_0. Row j (1 <= j <= N-1) adds
2^j (x_j y_j 2^j + Z_j) into the running partial product:

* **j multiplexer cells** (`pek_mux_cell`), at weights 2^(j+i) for i < j. Cell
  i picks 0, x_i, y_i or s_i according to (x_j, y_j). It adds the picked bit, the
  partial-product bit from the previous row and the carry from its right-hand
  neighbour, as a full adder.
* **One boundary cell** (`pek_diag_cell`) at weights 2^(2j) and 2^(2j+1). It
  handles the top bit of Z_j, which is c_j and is non-zero only when
  x_j = y_j = 1. It also handles the square term x_j y_j 2^(2j). Together these
  are x_j y_j (1 + c_j), which is the two-bit pattern {c_j, ~c_j} when both
  bits are 1 and 0 otherwise. The cell adds that pattern to the row's carry.

After row j, the partial product equals X_(j+1) Y_(j+1), which is below
2^(2j+2). The row above a boundary cell is therefore always zero at the
boundary cell's two weights. As a result, the boundary cell never produces a
carry, and row j spans only weights 2^j to 2^(2j+1). Bits below 2^j are final
and pass straight down.

The critical path runs through the X + Y carry chain and then along the
rows' ripple carries. There are N-1 rows of up to N-1 multiplexer cells each.

### Two's complement

For X = -2^(N-1) x_(N-1) + X_(N-1), and likewise for Y, the product is

    P = sum_j x_j y_j 2^(2j) + sum_(j=1..N-2) Z_j 2^j - Z_(N-1) 2^(N-1) .

Only the last row changes: its term is subtracted instead of added.
`pek_mult_signed` uses the unsigned rows for j <= N-2. In row N-1 it uses
these identities, modulo 2^(2N):

    -Z 2^(N-1) = (~Z) 2^(N-1) + 2^(N-1) + 2^(2N-1)      (Z taken as N bits)

* The last row's multiplexer cells are built with `INVERT = 1`, so each one adds
  the complement of the bit it selects.
* The boundary cell (`LAST_SIGNED = 1`) adds the complement of Z's top bit, the
  square term x_(N-1) y_(N-1) at 2^(2N-2) and the constant one at 2^(2N-1).
  It takes the sum modulo 4.
* The other constant one, at 2^(N-1), enters as the carry into the last
  row's first cell.

The published construction inverts the outputs of the last row's cells and
sets two additive inputs to one. The exact positions of those two constants are
this design's choice.

## Ports and timing

`mult_compare_top #(N = 8)`:

| port                        | dir | width  | meaning                                     |
|-----------------------------|-----|--------|---------------------------------------------|
| `booth_m`, `booth_q`        | in  | N      | Booth multiplicand and multiplier (signed)  |
| `booth_p_hi`, `booth_p_lo`  | out | N      | Booth product halves                        |
| `booth_ops`                 | out | N x 2  | action of each Booth step                   |
| `pu_x`, `pu_y`              | in  | N      | unsigned array operands                     |
| `pu_p`                      | out | 2N     | unsigned product                            |
| `ps_x`, `ps_y`              | in  | N      | two's complement array operands             |
| `ps_p`                      | out | 2N     | two's complement product                    |

Everything is combinational, with zero cycles of latency. Register the inputs
and outputs outside these modules if the design needs a pipeline.

Every module takes `N` (at least 2) and works at any width. The testbenches
also run 3-bit and 5-bit instances.

## Files

* `rtl/mult_pkg.sv`: `WIDTH` and the `booth_op_e` enum.
* `rtl/booth_step.sv`, `rtl/booth_mult.sv`: the Booth multiplier.
* `rtl/pek_sum_cell.sv`, `rtl/pek_mux_cell.sv`, `rtl/pek_diag_cell.sv`: the
  array cells.
* `rtl/pek_mult_unsigned.sv`, `rtl/pek_mult_signed.sv`: the two arrays.
* `rtl/mult_compare_top.sv`: the three multipliers together.
* `tb/tb_<module>.sv`: one self-checking testbench per module.

## Verification

Each testbench computes its expected values with plain integer arithmetic,
independently of the RTL, and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each also has a time-based watchdog.

* All cells are tested exhaustively.
* `booth_step` is tested exhaustively at N = 4.
* Both arrays and `booth_mult` are tested on all 65,536 operand pairs at N = 8.
  The arrays are also tested exhaustively at N = 3. The Booth step actions are
  compared against the recoding of the multiplier bits.
* Named examples: -19 x 22 = -418 = 0xFE5E on both signed multipliers, and the
  5-bit Booth traces 9 x 14 = 126 and 2 x -3 = -6, including their step
  sequences.
* `tb_mult_compare_top` runs the top at its default width. It applies all 65,536
  pairs to all three multipliers, checks each product and checks that the two
  signed multipliers agree. It also counts that every mechanism occurred at
  least once:
  * each Booth action;
  * the guard-bit case (multiplicand -128);
  * each of the four row cases of the array;
  * a subtracted last row.

Each testbench was also run against a copy of its module with one deliberate
bug, and it reported failures every time.

To simulate with Verilator, run from the project root:

    verilator --binary --timing --assert -Irtl rtl/mult_pkg.sv tb/tb_mult_compare_top.sv \
        --top-module tb_mult_compare_top -Mdir obj && ./obj/Vtb_mult_compare_top

Replace the testbench name to run any other testbench. The other RTL files are
found through `-Irtl`. Every run takes well under a second of simulation time.

## Where this design departs from, or adds to, the original

* **Booth accumulator width.** It is N+1 bits, not N, so that M = -2^(N-1)
  works (see above).
* **Array layout.** The layout of the array and the insides of its three cell
  types are reconstructed from the algebra:
  * ripple-carry rows;
  * the multiplexer cell built as a multiplexer plus a full adder;
  * the boundary cell's grouping of c_j with the square term;
  * the positions of the two's complement constants.

  The selection table, the single X + Y and the inverted last row are the
  published method.
* **Logic depth.** The original combinational descriptions are described as
  two-level logic. Here the logic is written structurally as adders and
  multiplexers, and the logic depth is left to synthesis.
* **Observation port.** `booth_ops` is an extra output for observation. It is
  not part of the original interface.
* **Size figures.** The original reports FPGA equivalent-gate counts: about
  1,200 to 1,300 gates for each multiplier, on a 10,000-gate device. Those
  figures come from a vendor flow and have not been reproduced. A generic
  synthesis of this RTL gives word-level cell counts, which do not translate
  into equivalent gates.
