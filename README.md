# Approximate CPL adders in a serial 1-D DCT

Image and video compression can live with slightly wrong arithmetic: a
viewer does not notice a DCT coefficient that is off by a few units. This
design exploits that in the adder. It starts from a full adder in
complementary pass-transistor logic (CPL), where the carry input selects
precomputed functions of A and B through two pass-transistor multiplexers.
It then uses four cheaper variants of that cell that drop transistors, and
with them some rows of the truth table. The cells are placed in the low bits of
the accumulator of a serial 8-point DCT, so their errors stay in the low-order part
of each transform coefficient.

The RTL models the cells by their logic function, one truth table each.
Transistor counts, voltage swing, delay and power are properties of the
transistor circuits and are not represented. The DCT around the cells is
complete: it is synthesizable and cycle-accurate.

## The five adder cells

Every cell has inputs A, B and carry-in C, and outputs Sum and Cout. Each
one is built the same way: four candidate nodes formed from the dual-rail
inputs, then two multiplexers selected by C:

    Sum  = C ? s1 : s0          Cout = C ? c1 : c0

| cell (module)                 | transistors | s0 (C=0)  | s1 (C=1)     | c0 (C=0) | c1 (C=1) |
|-------------------------------|-------------|-----------|--------------|----------|----------|
| conventional `cpl_adder_conv` | 26          | A xor B   | A xnor B     | A and B  | A or B   |
| approx. 1 `cpl_adder_approx1` | 24          | A xor B   | A xnor B     | A and B  | A or B   |
| approx. 2 `cpl_adder_approx2` | 22          | A nand B  | (not A) or B | A and B  | A or B   |
| approx. 3 `cpl_adder_approx3` | 17          | A xor B   | (not A) or B | 0        | A or B   |
| approx. 4 `cpl_adder_approx4` | 16          | A nand B  | B            | 0        | A or B   |

Transistor counts are the ones reported for the original circuits. The
counts for approximations 1 and 2 follow from "two transistors removed" at
each step. The candidate nodes of the approximations are not given by the
circuits as such. They were derived from the truth tables, which are the
specification:

| A B C | exact Sum Cout | approx. 2 | approx. 3 | approx. 4 |
|-------|----------------|-----------|-----------|-----------|
| 0 0 0 | 0 0            | **1** 0   | 0 0       | **1** 0   |
| 0 0 1 | 1 0            | 1 0       | 1 0       | **0** 0   |
| 0 1 0 | 1 0            | 1 0       | 1 0       | 1 0       |
| 0 1 1 | 0 1            | **1** 1   | **1** 1   | **1** 1   |
| 1 0 0 | 1 0            | 1 0       | 1 0       | 1 0       |
| 1 0 1 | 0 1            | 0 1       | 0 1       | 0 1       |
| 1 1 0 | 0 1            | 0 1       | 0 **0**   | 0 **0**   |
| 1 1 1 | 1 1            | 1 1       | 1 1       | 1 1       |

Approximation 1 is exact: its saving has no logic-level trace, so its module
has the same logic as the conventional cell. Approximations 3 and 4 lose the
carry-generate term when C = 0 (A = B = 1, C = 0 gives Cout = 0), and that
error is twice the weight of a sum error. Approximation 4 is the smallest
cell, and it is the default everywhere a kind must be chosen. The type
`cpl_pkg::cpl_kind_e` names the five cells.

## From cells to a word: `cpl_rca`

`cpl_rca` chains WIDTH cells into a ripple-carry adder. The `APPROX_LSBS`
low bits use the approximate cell named by `KIND`, and the upper bits use the
exact conventional cell. An approximate low part can still send a wrong carry
into the exact part, so one word error can reach the weight 2^APPROX_LSBS.
Two's-complement operands need no special handling.

How many bits are approximate is this design's choice. The default, 8, is
the number of fraction bits of the DCT coefficients. With it the
approximation changes mostly the fractional part of each result.

## The serial DCT: `dct_1d`

The datapath is a chain of named stages, each a module of its own:

    x_in -> REGISTER -> MUX 1 -> LATCH 1 -> LUT (multiply-accumulate) -> LATCH 2 -> MUX 2 -> o1
                         SEL 1                 k, n                      ADDRESS    SEL 2
                              \________________ CONTROLLER ____________________/

* `dct_sample_reg` (REGISTER) captures eight unsigned 8-bit pixels X(0)..X(7)
  in the cycle where `start` is accepted.
* `dct_mux1` (MUX 1) picks X(n). `dct_latch1` (LATCH 1) registers it.
* `dct_lut` holds the 64 coefficients C(k,n) and computes
  `acc <= (n == 0 ? 0 : acc) + X(n) * C(k,n)`. The addition goes through
  `cpl_rca`, so this is the only place where the approximate cell changes
  results. The multiplication is exact.
* `dct_latch2` (LATCH 2) is an eight-word bank. The finished Y(k) is written
  at ADDRESS k.
* `dct_mux2` (MUX 2) selects Y(SEL 2) for the output `o1`.
* `dct_controller` generates every select, enable and address.

### Coefficients and number format

The transform is the orthonormal DCT-II,
Y(k) = a(k) * sum_n x(n) cos((2n+1)k*pi/16), with a(0) = sqrt(1/8) and
a(k>0) = 1/2. The coefficients are stored as
C(k,n) = round(256 * a(k) * cos((2n+1)k*pi/16)), a 9-bit signed value
with |C| <= 128. Because a(k>0) = 1/2, every coefficient is ± one of
round(128 cos(m*pi/16)), m = 0..8 = {128, 126, 118, 106, 91, 71, 49, 25, 0}.
Row 0 is the constant 91. `dct_pkg::coef` folds the angle and picks the sign.

`o1` is a 20-bit signed number with 8 fraction bits. The largest magnitude,
8 * 255 * 128, needs 19 bits. To get pixel units, divide by 256.

### Schedule

One multiply-accumulate happens per clock, with k as the outer loop and n as
the inner loop. Cycle numbers count from the cycle in which `start` is high
and the controller is idle:

| cycle     | what happens                                                    |
|-----------|-----------------------------------------------------------------|
| 0         | `load`: the pixels are captured                                 |
| 1 .. 64   | SEL 1 = n, LATCH 1 takes X(n) (step i = 8k + n in cycle 1 + i)  |
| 2 .. 65   | LUT accumulates step i in cycle 2 + i                           |
| 10 + 8k   | LATCH 2 word k is written (cycles 10, 18, ..., 66)              |
| 67 .. 74  | `out_valid`, `out_index` = k, `o1` = Y(k); `done` in cycle 74   |
| 75        | idle again: a new `start` is accepted here                      |

A transform takes 75 cycles, and transforms can run back to back. A `start`
while `busy` is ignored. The input register is only read during cycles
1..64, but it is loaded only in cycle 0, so `x_in` may change after the
start cycle. Two assertions in the controller check that LATCH 2 is written
only with a row's last term and that the pipeline is empty while the outputs
stream.

## The top: `cpl_dct_top`

The top places two things side by side. The first is the five cells on
shared inputs `cell_a`, `cell_b` and `cell_cin`. Bit i of
`cell_sum`/`cell_cout` is the cell of kind i, so all five truth tables can be
compared directly. The second is `dct_1d` with parameters `KIND` (default
`CPL_APPROX4`) and `APPROX_LSBS` (default 8). Choose `KIND = CPL_CONV` for
an exact DCT.

## What the approximation costs

These figures were measured in simulation on an 8x8 gradient block plus
random rows. The error is the difference from the exact dot product, in pixel
units. Output magnitudes reach about 720 for Y(0) and about ±360 for the
other coefficients.

| DCT built with              | approximate bits | mean error | largest error |
|-----------------------------|------------------|------------|---------------|
| conventional, approx. 1     | 8                | 0          | 0             |
| approx. 2                   | 8                | 1.53       | 2.86          |
| approx. 3                   | 8                | 3.53       | 5.70          |
| approx. 4 (default)         | 8                | 3.35       | 5.71          |
| approx. 4                   | 4                | 0.19       | 0.39          |

With the default settings every output coefficient differs from the exact
result. Approximations 3 and 4 are about equally bad. Both drop the generate
carry of row 110, which is worth twice a sum error. Approximation 2 keeps the
carry exact and halves the error. Reducing the approximate part to 4 bits
cuts the error by a factor of about 18.

The original circuits were characterised at transistor level. The reported
figures are 460, 430, 401, 352 and 316 µm² of area for the conventional cell
and approximations 1-4, and 299, 288, 261, 210 and 190 mW for a DCT built
with each. The quoted savings of approximation 4 over the conventional cell
are 31.3 % in cell area and 36 % in DCT power. This RTL cannot reproduce those
numbers, because they depend on the transistor circuits and not on the
logic function.

## Departures and choices

These are choices of this design, where the original description is silent
or where RTL cannot follow it:

* The cells are logic-level models. Pass-transistor behaviour, the
  complementary signal swing and transistor counts are not modelled.
* For approximation 4, the rows follow the published truth table: sum errors
  in rows 000, 001 and 011, carry error in row 110. A prose description of
  the same cell gives different rows (000 and 111). Likewise the
  conventional cell follows its truth table (Sum = A xnor B for C = 1).
* Which accumulator bits are approximate (the 8 low bits), the ripple-carry
  structure, the coefficient scaling (2^8), the accumulator width (20 bits)
  and the exact multiplier are all this design's choices.
* LATCH 1 and LATCH 2 are edge-triggered registers, not level-sensitive
  latches. LATCH 2's ADDRESS is read as the write address of a bank with one
  word per output.
* The controller's schedule, the `start`/`busy`/`out_valid`/`done`
  handshake and the asynchronous active-low reset `rst_n` (which clears every
  register) are this design's own.
* Only the 1-D transform is built. A 2-D DCT or an image pipeline around it
  (row/column transposition, quantisation) is not part of this design.

## Files

| file                                 | contents                                                    |
|--------------------------------------|-------------------------------------------------------------|
| `rtl/cpl_pkg.sv`                     | `cpl_kind_e`, the five cell kinds                           |
| `rtl/cpl_adder_*.sv`                 | the five 1-bit cells                                        |
| `rtl/cpl_rca.sv`                     | ripple-carry word adder, approximate low bits               |
| `rtl/dct_pkg.sv`                     | sizes, types, coefficient function                          |
| `rtl/dct_*.sv`                       | DCT stages, controller and `dct_1d`                         |
| `rtl/cpl_dct_top.sv`                 | top: cells side by side and the DCT                         |
| `tb/tb_ref_pkg.sv`                   | reference models: truth tables, bit-serial adder, real DCT  |
| `tb/tb_<module>.sv`                  | self-checking testbench of each module                      |

Each testbench compares its module with the reference models and ends with
a line `TB_RESULT checks=N failures=M`. `tb_dct_adder_sweep` runs the DCT
built with each cell side by side and prints the error table above. `tb_cpl_dct_top` runs the whole
design at its default parameters. It checks all cells, 24 transforms and the
67-cycle latency, and it counts the back-to-back starts, the ignored starts,
the approximated outputs and the negative coefficients.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/cpl_pkg.sv rtl/dct_pkg.sv tb/tb_ref_pkg.sv tb/tb_cpl_dct_top.sv \
        --top-module tb_cpl_dct_top
    ./obj_dir/Vtb_cpl_dct_top

To run another testbench, replace the testbench file and the top module
name. Every simulation finishes in well under a second. To try another
cell or a different number of approximate bits, set `KIND` and
`APPROX_LSBS` on `cpl_dct_top` or `dct_1d`. The testbench reference model
`tb_ref_pkg::ref_dct` takes the same two settings as arguments.
