# Mux-based array multiplier (8 x 8, current-mode gate library)

This design is an unsigned 8 x 8 bit multiplier with a 16-bit product. The
array has no AND-gate partial-product matrix. At each step it picks one of
four values with a 4:1 multiplexer. The array is built from one small
library of gates: AND, 2:1 mux, 3-input XOR, majority and 4:1 mux. The
gates are meant to be MOS current-mode logic (MCML) circuits. Such gates
are differential and draw a constant supply current, so the multiplier
causes almost no supply current spikes next to analog circuits. The RTL
here describes the logic of that circuit. It does not describe its
transistors.

Everything is combinational: there is no clock, register or reset. The
operand width `N` is a parameter. Its default is 8, and every width from 2
to 8 has been simulated exhaustively.

## The idea: one 4-way choice per bit

Write `X_j` and `Y_j` for the number formed by the `j` low-order bits of
each operand, and `x_j`, `y_j` for bit `j`. Adding bit `j` to both operands
gives

    X_{j+1} * Y_{j+1} = X_j * Y_j  +  2^j * Z_j  +  2^(2j) * x_j * y_j
    Z_j = x_j * Y_j + y_j * X_j

`Z_j` is not really a product. It is one of four ready-made values,
selected by the two operand bits:

| x_j y_j | Z_j            |
|---------|----------------|
| 0 0     | 0              |
| 0 1     | X_j            |
| 1 0     | Y_j            |
| 1 1     | S_j = X_j + Y_j |

`X_j` and `Y_j` are just the low bits of the inputs. `S_j` is the running
sum of the two operands. It grows by one bit per step, through an ordinary
ripple carry chain. So the product is

    P = sum over j of ( 2^j * Z_j + 2^(2j) * x_j * y_j )

Bit `i` of `Z_j` (for `i < j`) is `0`, `x_i`, `y_i` or `s_i`, where `s_i`
is bit `i` of the full sum `X + Y`. The top bit of `Z_j`, at `i = j`, is
nonzero only when `x_j = y_j = 1`. It then equals the running-sum carry
`c_j`, so it is simply `x_j & y_j & c_j`.

The method treats the two operands the same way, so they can be swapped.

## The array

Cell `(i, j)`, with `i <= j`, sits in row `i` and diagonal `j`. It has
weight `2^(i+j)`.

```
 diagonal:     j=3        j=2        j=1        j=0
 row 0:      [I 0,3]    [I 0,2]    [I 0,1]    [II 0,0]  -> p0 (x0y0), p1
 row 1:   [I 1,3]    [I 1,2]    [II 1,1]                -> CSLA -> p2 p3
 row 2: [I 2,3]   [II 2,2]                              -> CSLA -> p4 p5
 row 3: [II 3,3]                                        -> full adder -> p6 p7
```

(The sketch is for `N = 4`. For `N = 8` there are eight rows and six CSLAs.)

* **First type cell, `cell_i`** (`i < j`). A 4:1 mux, selected by
  `(x_j, y_j)`, picks bit `i` of `Z_j` from `{0, x_i, y_i, s_i}`. A full
  adder adds that bit to the sum and carry arriving from the row above.
  The values `x_i`, `y_i` and `s_i` are shared along the row; `x_j` and
  `y_j` are shared along the diagonal.
* **Second type cell, `cell_ii`** (`i = j`, the right end of each row).
  It holds two separate circuits:
  1. A full adder that extends the running sum: `s_j = x_j ^ y_j ^ c_j`,
     with carry `c_{j+1}` going to the next second type cell. `c_0 = 0`.
     This `s_j` is the `s_i` used by row `j`.
  2. Two AND gates that form `x_j y_j` and `x_j y_j c_j`, and a second full
     adder that adds `x_j y_j c_j` to the incoming sum and carry. This
     finishes diagonal `j`. `x_j y_j` itself, the last term of the
     recurrence, is sent out to the final adder.

Signals move between rows as follows:

* A sum goes straight down, from `(i-1, j+1)` to `(i, j)`. Both cells have
  the same weight.
* A carry goes diagonally, from `(i-1, j)` to `(i, j)`.
* Row 0 receives zeros. So does the left edge (`j = N-1`), which has no
  cell above it to send a sum.

For `N = 8` the array has 28 first type cells and 8 second type cells. That
makes 28 4:1 muxes, 44 full adders and 16 AND gates.

All bits of the product that the array has not finished leave it on the
right boundary. Each row `i` leaves four of them:

* at weight `2^(2i)`: `s_out` and `x_i y_i` of cell `(i, i)`;
* at weight `2^(2i+1)`: `c_out` of `(i, i)` and `s_out` of `(i, i+1)`.

## Final addition: 2-bit carry-select adders

* **Row 0.** Cell `(0, 0)` only ever adds zeros, so `p[0] = x_0 y_0` and
  `p[1]` is the sum output of cell `(0, 1)`.
* **Rows 1 .. N-2.** Each row's four bits form two 2-bit numbers, added by
  a 2-bit carry-select adder (`csla2`). The adders are chained through
  their carries. There are N-2 of them, which gives `p[2]` to `p[2N-3]`.
* **Row N-1.** This row has only a second type cell, so it gets one more
  full adder instead of a CSLA. That adder adds the cell's two weight
  `2^(2N-2)` bits to the last CSLA carry. Its sum is `p[2N-2]` and its
  carry is `p[2N-1]`.

The `c_out` of cell `(N-1, N-1)` is left open. That cell's sum input is
always 0, and its carry output is never 1 for any pair of operands. The
testbenches check this exhaustively for N = 2 to 8, on every operand pair.

Each `csla2` computes `a + b` twice in parallel, once with carry-in 0 and
once with carry-in 1, using two full adders each. Three 2:1 muxes then use
the real carry-in to pick the two sum bits and the carry-out. So the carry
crosses each 2-bit stage in one mux delay.

Totals for N = 8, not counting the adders inside the CSLAs:

* 45 full adders, which is `N(N-1)/2 + 2N + 1`;
* 28 4:1 muxes;
* 16 AND gates;
* 6 two-bit CSLAs, each with 4 full adders and 3 2:1 muxes.

## Gate library and the current-mode circuit

| module            | function                  | current-mode circuit                        |
|-------------------|---------------------------|---------------------------------------------|
| `mcml_and2`       | a AND b (NAND on the other rail) | differential pairs, 25 / 34 ps      |
| `mcml_mux2`       | s ? i1 : i0               | 35 / 50 ps                                  |
| `mcml_xor3`       | a ^ b ^ c (full-adder sum) | three stacked pair levels, 105 / 160 ps    |
| `mcml_maj3`       | majority (full-adder carry) | 120 / 185 ps                              |
| `mcml_mux4`       | i[{s1, s0}]               | 17 transistors, 160 / 240 ps                |
| `mcml_full_adder` | XOR3 + majority           | 24 transistors                              |

The delays are for gate tail currents of 30 uA and 20 uA.

The RTL simplifies the real circuit in four ways:

* **One bit per signal.** Each current-mode signal is really a
  differential pair (`_P` and `_N`). Here it is a single logic bit, and
  the `_N` rail is its complement. Inverting a signal is free in the real
  circuit, because it only swaps the two wires.
* **No bias inputs.** The bias voltages (`VRef_P`, `VRef_N`) and the
  supply are analog, so they are not ports.
* **Carry-in wiring.** The full adders send their carry-in to the `c`
  input of the XOR3. That input is the bottom level of the stacked pairs,
  the one with the smallest input load.
* **Mux select order.** In `mcml_mux4`, `s1` chooses between the
  (I0, I1) half and the (I2, I3) half, and `s0` chooses within the half.
  In `cell_i`, `s1 = x_j` and `s0 = y_j`, so the data inputs are
  `{s_i, y_i, x_i, 0}` for I3..I0.

## Timing, speed and power

In the RTL all gates have zero delay. The product is valid as soon as the
operands are. The real array's worst path is about `N + 1` full-adder
delays.

The current-mode implementation this RTL describes (0.18 um, 1.8 V) is
rated as follows:

| gate bias | delay   | max. input rate | power |
|-----------|---------|-----------------|-------|
| 30 uA     | 0.95 ns | 1 GHz           | 16 mW |
| 20 uA     | 1.64 ns | 550 MHz         | 10 mW |

None of these numbers can be checked in RTL. The same goes for the
constant supply current, and for the small supply ripple of about 9 % at
full speed. If you synthesize the RTL to standard cells, you get an
ordinary static-CMOS multiplier with the same logic. It does not keep
those analog properties.

## Where this RTL makes its own choices

* **Unsigned operands.** The recurrence treats `X_j` as the plain low bits
  of X, which only works for unsigned numbers.
* **Edge inputs.** Row 0 and the left-edge cells get constant 0 inputs.
* **Top product bits.** The extra full adder on row N-1 and the open
  `c_out` of the last cell are this design's way of producing the top two
  product bits. The same count of full adders is kept.
* **Direct wiring.** Row and diagonal signals (`x_i`, `y_i`, `s_i`, `x_j`,
  `y_j`) go straight from the inputs to every cell that needs them, not
  through the cells. That changes wiring only, not logic.
* **Lint.** Verilator reports four unused signals: the open outputs of
  cell `(0, 0)` and cell `(N-1, N-1)`, and the top bit of `X + Y`. They
  are unused by design.

## Files

* `rtl/mux_array_multiplier.sv`: the top, with parameter `N`, inputs
  `x[N-1:0]` and `y[N-1:0]`, and output `p[2N-1:0]`.
* `rtl/cell_i.sv` and `rtl/cell_ii.sv`: the two array cells.
* `rtl/csla2.sv`: the 2-bit carry-select adder.
* `rtl/mcml_*.sv`: the gate library.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each
  prints `TB_RESULT checks=N failures=M`.
  * The gate, cell and CSLA testbenches try every input combination.
  * `tb_mux_array_multiplier` runs all 65,536 operand pairs at the default
    N = 8. It also counts each mechanism: all four mux selections, nonzero
    `x_j y_j c_j` terms, carries between CSLAs, and a carry out of the top
    adder. It fails if any of these never happens.
  * `tb_mux_array_multiplier_sizes` runs N = 2 to 7 exhaustively.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  --top-module tb_mux_array_multiplier tb/tb_mux_array_multiplier.sv
./obj_dir/Vtb_mux_array_multiplier
```

The whole exhaustive run takes well under a second. Any other testbench
runs the same way; give its name in both places. To lint one module, run:

```
verilator --lint-only -Wall -Irtl rtl/mux_array_multiplier.sv
```

To change the width, set `N` on the top instance, for example
`mux_array_multiplier #(.N(16))`. The array, the number of CSLAs and the
final adder all follow `N`. `N` must be at least 2.
