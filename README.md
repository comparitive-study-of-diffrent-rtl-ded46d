# Low-power array multipliers: Braun, column bypass and reversible TSG

An N x N unsigned array multiplier spends most of its energy in the full
adders of its carry-save array, and much of that switching is wasted: when a
multiplicand bit is 0, every partial product in its column is 0, yet the
adders of that column still switch whenever the sums passing through them
change. This RTL holds three versions of the same 4 x 4 Braun array multiplier.
They were built to compare area, delay and dynamic power:

| multiplier | module | idea |
| --- | --- | --- |
| Braun array | `array_multiplier` | AND-gate partial products, carry-save rows of full adders, ripple-carry final adder |
| **column bypass** | `column_bypass_multiplier` | the same array, but a column whose multiplicand bit is 0 is switched off and its sums are routed around it |
| reversible | `reversible_multiplier` | the same array with every full adder replaced by a TSG reversible gate |

The column-bypass multiplier is the design being proposed. The other two are
the references it is measured against. `multiplier_top` places all three side
by side.

All three are purely combinational. Operands `a` (multiplicand) and `b`
(multiplier) are N-bit unsigned values. The product `p` has 2N bits and is
valid one array delay after the operands settle. There is no clock, reset or
handshake; register the ports outside if you need a pipeline. The width
parameter `N` defaults to 4, the size used for every measurement in the
comparison (`mult_pkg::DEFAULT_N`).

## The carry-save array shared by all three

`partial_product_array` forms all N*N partial products at once with AND
gates: `pp[j][i] = a[i] & b[j]`, of weight i+j.

The array then has N rows:

* Row 0 is just `pp[0]`. Its bit 0 is product bit 0.
* Row j (1 .. N-1) is a row of N adder cells. Cell `(j, i)` adds three bits
  of weight i+j:
  * the partial product `a[i] b[j]`;
  * the sum of cell `(j-1, i+1)`, or 0 for the leftmost cell `i = N-1`;
  * the carry of cell `(j-1, i)`, the cell directly above it.

Carries move down to the next row instead of along the row (carry save), so
each row adds one full-adder delay. Bit 0 of row j's sums is product bit j.
After the last row, the sums `s[N-1:1]` and carries `c[N-1:0]` have weights
N .. 2N-1. An N-bit ripple-carry adder (`ripple_carry_adder`) merges them
into product bits N .. 2N-1. Its carry out is always 0.

In this RTL, **column i** means the cells `(1..N-1, i)`: every adder cell
that adds a partial product of multiplicand bit `a[i]`. (Numbering the
columns from 1 makes this column i+1, which is how the bypass scheme is often
described.)

For the 4 x 4 case, 1101 x 1101 gives partial-product rows 1101, 0000, 1101,
1101, which the array reduces to 1010 1001 (13 x 13 = 169).

Where a half adder would do (all of row 1, and the leftmost cell of each
row), the RTL uses a full adder with an input tied to 0. Synthesis removes
the constant inputs.

## Column bypass: why switching a column off is safe

Suppose `a[i] = 0`. Then every partial product in column i is 0. The top
cell of the column (row 1) gets a carry of 0 from row 0. So it adds
`0 + s_in + 0`: its sum is its incoming sum and its carry is 0. Working down
the column, every cell gets a carry of 0, so every cell just passes its
incoming sum and makes no carry. The whole column is therefore a set of
wires. Nothing in it has to be computed.

`bypass_full_adder` is the modified cell that takes advantage of this. Its
enable is the column's `a[i]`:

```
           en ---------------------------+
                                         |
 s_in --+--[iso: AND en]--+             |\
        |                 |   +----+    | \
 c_in --|--[iso: AND en]--+-->| FA |--->|1 |
        |                 |   +----+    |  |---> s_out
 pp ----|-----------------+     |  +--->|0 |
        |                       |  |    | /
        +--------------------------+    |/
                                |
                                +------------> c_out
```

* Two isolation buffers sit in front of the adder's sum and carry inputs.
  While the column is off, they hold those inputs at 0, so the adder does
  not toggle when the sums flowing past it change. That saved switching is
  the power the design is built to save. No isolation is needed on `pp`: it
  is already 0.
* A 2-to-1 multiplexer selects the adder's sum when `en = 1` and the
  incoming `s_in` when `en = 0`.
* `c_out` is the adder's carry, which is 0 while the cell is isolated.

`column_bypass_multiplier` uses this cell for every array cell. It also ANDs
each last-row carry with its column's `a[i]` before the final adder, so a
switched-off column always hands on a carry of 0. With gated isolation this
AND is logically redundant, but it is part of the bypass scheme. It is the
safeguard needed when the isolation buffers are real tri-state buffers that
leave the adder inputs floating. The final ripple-carry adder is not
bypassed.

The price is delay. Every cell has a multiplexer on its sum path. The
critical path runs diagonally through the middle of the array, so it gains
one multiplexer per row. On top of that come the enable fan-out and the gates
on the last row. The bypass array also needs more logic than the plain one.

### Tri-state buffers become AND gates

The bypass scheme is normally drawn with two **tri-state** buffers per cell.
Programmable logic has no internal tri-state nets, and a two-state simulator
cannot represent a floating node. So here each buffer is an AND gate with the
column enable. The effect on switching is the same: the adder inputs stop
following `s_in` and `c_in`. The difference is that they are held at 0
instead of keeping their last value. This is a deliberate departure from the
textbook cell.

## Reversible array: the TSG gate

`tsg_gate` is the 4-input, 4-output TSG reversible gate. A reversible gate
maps its inputs one-to-one onto its outputs, so no input information is
destroyed. Its equations are the published TSG definition:

```
P = A
Q = (A' C') xor B'
R = Q xor D
S = (Q D) xor (A B xor C)
```

With `C = 0`, `Q = A xor B`. Then `R = A xor B xor D` is a full adder's sum
and `S = AB + (A xor B)D` is its carry. `P` and `Q` are garbage outputs.
`reversible_multiplier` uses the gate this way, with `A = pp`, `B = s_in` and
`D = c_in`, in every array cell. `ripple_carry_adder` with `REVERSIBLE = 1`
uses it in every bit of the final adder. The partial products are still made
by the AND-gate array, exactly as in the other two multipliers. The garbage
outputs are left unconnected. The reversibility of a single gate is checked
in its testbench. The multiplier as a whole is ordinary irreversible logic on
an FPGA or in CMOS; only the cell structure is reversible.

## Files

| file | contents |
| --- | --- |
| `rtl/mult_pkg.sv` | default operand width `DEFAULT_N = 4` |
| `rtl/full_adder.sv` | 1-bit full adder |
| `rtl/tsg_gate.sv` | TSG reversible gate |
| `rtl/partial_product_array.sv` | N x N AND-gate partial products (`pp` is an unpacked array of N-bit rows) |
| `rtl/ripple_carry_adder.sv` | W-bit ripple-carry adder; `REVERSIBLE` selects full-adder or TSG cells |
| `rtl/bypass_full_adder.sv` | column-bypass cell: full adder + two isolation gates + multiplexer |
| `rtl/array_multiplier.sv` | Braun array multiplier |
| `rtl/column_bypass_multiplier.sv` | column-bypass multiplier |
| `rtl/reversible_multiplier.sv` | TSG-based array multiplier |
| `rtl/multiplier_top.sv` | the three multipliers, each with its own `*_a`, `*_b`, `*_p` ports (`arr_`, `byp_`, `rev_`) |

Every multiplier requires `N >= 2` (checked at elaboration).

## Verification

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<m>`. Each has a watchdog that
counts a failure if the run hangs.

* `full_adder_tb`, `tsg_gate_tb`, `bypass_full_adder_tb`: every input
  combination.
  * The TSG test checks that all 16 outputs are distinct, and the full-adder
    behaviour with `C = 0`.
  * The bypass-cell test checks the sum pass-through, the zero carry and that
    the adder's inputs are isolated while the cell is off.
* `partial_product_array_tb`, `ripple_carry_adder_tb`: all 4-bit operand
  combinations. The adder test covers both cell types.
* `array_multiplier_tb`, `column_bypass_multiplier_tb`,
  `reversible_multiplier_tb`:
  * all 256 pairs at 4 x 4, plus 1101 x 1101;
  * an 8 x 8 instance on corner values and 3000 random pairs.

  The bypass test also checks, in every cell of every switched-off column,
  that the adder inputs are 0. It counts how often each column was bypassed
  and how often it was active.
* `multiplier_top_tb` runs the top at its default size. It feeds the same
  operands to all three multipliers: all 256 pairs, then 2000 random pairs.
  Each product is checked against the integer product. A final 500 steps
  give each multiplier its own random operands, which shows that the three
  port sets are independent. The testbench also requires that
  every column has been both bypassed and active, and that the all-on and
  all-off cases have occurred. Finally, it counts the toggles on the adder
  sum and carry inputs of the plain array and of the bypass array over the
  random stream. The bypass array must toggle less.
  * Typical result: 9692 toggles for the plain array against 6778 for the
    column-bypass array, about 30 % fewer.
  * With random operands, each column is off half the time. Multiplicands
    with many 0 bits save more.

The top-level and bypass testbenches read internal adder pins by
hierarchical name. They assume the 4 x 4 layout and the generate-block names
`row[j].g_fa_row.col[i]`.

To run one testbench with Verilator, for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mult_pkg.sv tb/multiplier_top_tb.sv --top-module multiplier_top_tb
./obj_dir/Vmultiplier_top_tb
```

To build another testbench, replace the testbench file and top-module name.
All testbenches finish in well under a second.

## What the RTL does not reproduce

The comparison was made on a Spartan-6 FPGA, 4 x 4 operands. It reported:

| multiplier | slices | dynamic power (mW) | total power (mW) | delay (ns) |
| --- | --- | --- | --- | --- |
| Braun array | 14 | 9.14 | 22.90 | 1.443 |
| column bypass | 15 | 7.86 | 21.62 | 2.201 |
| reversible (TSG) | 16 | 8.26 | 22.02 | 3.359 |

Quiescent power was 13.76 mW for all three.

These numbers depend on the FPGA, the tools and the test vectors, and an RTL
simulation cannot check them. The toggle count in `multiplier_top_tb` only
stands in for the dynamic-power ranking of the plain and bypass arrays. The
ranking of the reversible array cannot be reproduced: it has the plain
array's structure and, in simulation, the same switching.

Where this RTL makes its own choices:

* **Isolation buffers**: AND-gate isolation instead of tri-state buffers (see
  above).
* **TSG equations**: the published TSG definition. The gate is otherwise only
  named as the replacement for the full adder.
* **Reversible partial products**: made with AND gates. No reversible
  partial-product generator is used.
* **Adders**: the final adder is a plain ripple-carry adder in all three
  designs, and half adders are replaced by full adders with a constant input.
* **Signedness, shape and timing**: unsigned, square N x N operands only; no registers, clock or
  reset.
