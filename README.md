# C-testable array multipliers: modified carry-save and Baugh-Wooley

An array multiplier is a grid of almost identical full-adder cells. Testing one
by exhaustive input enumeration is hopeless at 16 x 16 (2^32 operand pairs), and
ordinary test generation treats it as a big random netlist. This RTL implements
two multipliers whose cells are changed slightly so that the number of test
patterns needed to test **every cell exhaustively** (all its input
combinations, with any fault at a cell's outputs reaching a primary output) is a
constant, whatever the array size. Such an array is called *C-testable*.

* **MCS/CP**: an unsigned n x n carry-save array built from a *modified* basic
  cell, followed by a ripple carry-propagate row. 16 test patterns test it
  completely for any n. It is packaged here as a 16 x 16 multiplier chip whose
  32 pins carry the operands in and the product out.
* **Modified Baugh-Wooley**: an n x n two's complement array with seven cell
  kinds, four of them modified, plus one extra input `e` and n-2 XOR gates.
  A published set of 55 patterns goes with it.

In both cases, the truth-table rows that change are ones that can never occur
during multiplication. The product is therefore unchanged, and the cell
costs no more than a standard one.

## The modified carry-save cell

Each cell (`mcs_cell`) is a full adder whose first operand is the partial
product `a.b`:

```
x = (a.b) ^ c ^ d                 sum
y = maj(a.b, c, d)  |  (~a & ~c & d)   carry, modified
```

`c` is the sum arriving from the cell above and `d` the carry arriving down
the diagonal. The extra term sets `y = 1` for the two vectors
`<a,b,c,d> = <0,0,0,1>` and `<0,1,0,1>`.

**Why the product is unchanged.** The multiplicand bit `a(j)` feeds every
cell of diagonal `j`, and carries travel down that same diagonal. If
`a(j) = 0`, the top cell of the diagonal has `c = d = 0` in multiplication, so
it produces no carry. Then no cell below it gets one either. So `a = 0, d = 1`
never happens while multiplying, and the two modified rows are never used.

**Why the modification is needed.** In a standard array, only one cell of a
diagonal can receive `<0001>` in any one pattern. With `a = 0` the standard
carry is `c.d`, so a cell that receives `<0001>` passes no carry on, and every
cell below it in the diagonal sees `d = 0`. Testing that vector on every cell
would take n patterns. With the modified carry, a
`1` on `d` regenerates itself down the diagonal even when `a = 0`. One pattern
can then put the same vector on all cells of the diagonal.

**Why faults are seen.** The sum is untouched. It is the parity of its
inputs, so inverting `c` or `d` always inverts `x`. A wrong `x` travels straight
down its column through the `c` inputs to a product bit. A wrong `y` enters the
`d` input of the next cell down and becomes a wrong `x` there. Because signals
only flow down and left, no second error can arrive to cancel the first.

## The MCS array and its test inputs

Cell `(i,j)` is in row `i` (top = 0) and diagonal `j` (right = 0), and its sum has
weight `2^(i+j)`. Inside the array, `d(i,j) = y(i-1,j)` and `c(i,j) = x(i-1,j+1)`.
The edge inputs are 0 for multiplication. They are primary inputs so that a
tester can drive them:

| port (`mcs_array`, `mcs_cp_mult`) | drives | chip pins |
|---|---|---|
| `c0[j]` | `c` of the top row | `c0_even`, `c0_odd` |
| `d0[j]` | `d` of the top row | `d0_even`, `d0_odd` |
| `cl[i]`, i >= 1 | `c` of the leftmost diagonal | `cl_even`, `cl_odd` |
| `cin` | carry-in of the carry-propagate row | `cin` |

In every test pattern, all even-indexed bits of one of these vectors share a
value, and so do all odd-indexed bits. That is why the chip needs only the
seven pins of `mult_pkg::mcs_test_pins_t`. Cell `(0,n-1)` is both the top-left
cell and the top of the left diagonal: `c0[n-1]` drives it and `cl[0]` is
unused.

**Carry-propagate row** (`mcs_cp_mult`). n full adders ripple the bottom
row's sums and carries into `p[2n-1:n]`. The adder for column `n+m` adds
`x(n-1,m+1)`, `y(n-1,m)` and the carry from the right. The leftmost adder has
no array sum, so that input is 0. The final carry is `p[2n]`. It is 0 in
multiplication and serves as an extra observation point in test.

### The 16 test patterns

Notation: `0` all zeros, `1` all ones, `E` the alternating field `01...01`,
`O` the field `10...10`. For even n, `E` sets the even bit positions and `O`
the odd ones, in every column. `v_k` is the cell vector `<a,b,c,d>` whose
binary value is `k`.

| pattern | a | b | c0 | d0 | c(n-1) | cin | cell vectors applied |
|---|---|---|---|---|---|---|---|
| T0 | 0 | 0 | 0 | 0 | 0 | 0 | v0 everywhere |
| T2 | 0 | 0 | 1 | 0 | 1 | 1 | v2 |
| T4 | 0 | 1 | 0 | 0 | 0 | 0 | v4 |
| T6 | 0 | 1 | 1 | 0 | 1 | 0 | v6 |
| T10 | 1 | 0 | 1 | 0 | 1 | 1 | v10 |
| T15 | 1 | 1 | 1 | 1 | 1 | 1 | v15 |
| T1,3 / T3,1 | 0 | 0 | 1 / 0 | 1 | E / O | 0 / 1 | v1 and v3, half each, swapped |
| T5,7 / T7,5 | 0 | 1 | 0 / 1 | 1 | O / E | 0 / 1 | v5 and v7 |
| T9,14 / T14,9 | 1 | O / E | 0 / 1 | 1 / 0 | O / E | 0 / 1 | v9 and v14 |
| T8,11,12,13 | 1 | E | 0 | E | 0 | 0 | v8, v11, v12, v13, a quarter each |
| T11,12,13,8 | 1 | O | E | E | 0 | 1 | rotated |
| T12,13,8,11 | 1 | E | 0 | O | O | 1 | rotated |
| T13,8,11,12 | 1 | O | O | O | E | 0 | rotated |

The paired and quartet patterns work because `b` alternates by row and the
carry coming down a diagonal alternates with it. The `cin` column is this
implementation's choice. It only needs to be controllable, and these values
give each carry-propagate adder all eight of its input vectors (four for the
leftmost, whose sum input is constant).

**Odd n.** At odd width, a field written `01...01` cannot alternate and also
start with 0 and end with 1. One end has to give way, and the choice decides
which cells get which vectors. The set stays complete only with a mixed
reading:

* `c0` and `d0` are indexed by diagonal. Read them from bit n-1 downward, so
  `E` has a 0 in bit n-1.
* `b` and `c(n-1)` are indexed by row. Read them by absolute bit index, so `E`
  has a 1 in bit 0.

With this reading the model confirms the set for every n from 3 to 9. The chip's
parity pins name absolute bit positions, so at odd n a tester maps `E` and `O`
onto them accordingly.

The testbench reference model (`tb/mcs_ref_pkg.sv`) confirms the whole claim
at n = 3, 4, 5, 7 and 16:

* every array cell receives all 16 vectors;
* every carry-propagate adder receives all its vectors;
* every single-cell fault (x, y or both inverted, under every pattern) changes
  the (2n+1)-bit output.

## The 16 x 16 chip (`mcs_chip`)

Two 16-bit operands in and a 32-bit product out would need 64 signal pins,
so the same 32 pins serve both directions. Registers and a three-state
controller sit around the combinational array:

```
clock      | 0        | 1         | 2
state      | IDLE     | MULT      | OUT
pins       | in: {b,a}| (ignored) | out: product, pins_oe = 1, done = 1
```

In cycle 0, `start` captures `a = pins_in[15:0]`, `b = pins_in[31:16]` and
the seven test pins. In cycle 1, the array result goes into the product register.
In cycle 2, the product drives the pins with `pins_oe = 1` and
`carry_out = p[32]`. The next start can come in the cycle after that, so the chip
does one operation every three clocks. `start` is ignored while busy. Reset is
synchronous and active low. The pins are modelled as `pins_in`, `pins_out` and
`pins_oe`. A pad ring would combine them into bidirectional pads. Two
assertions check that the pins drive only in the product cycle and that the
product follows an accepted start by exactly two clocks.

There is no test-mode pin. Tests use the same operation: the tester drives
the seven test pins along with `a` and `b` and reads the 33 result bits.

## The modified Baugh-Wooley array (`bw_array_mult`)

A two's complement product has negative partial products wherever exactly
one of the two bits is a sign bit. Baugh and Wooley rewrite each of these as a
complemented bit plus constants:

```
A*B = sum a(i)b(j) 2^(i+j)             (i,j < n-1)
    + a(n-1)b(n-1) 2^(2n-2)
    + sum [a(n-1)~b(i) + ~a(i)b(n-1)] 2^(i+n-1)   (i < n-1)
    + [a(n-1) + b(n-1)] 2^(n-1) + [~a(n-1) + ~b(n-1)] 2^(2n-2) + 2^(2n-1)
```

All terms are now positive, and a carry-save array adds them. Row `r`,
column `k` adds into weight `2^k`:

| cell | where | adds |
|---|---|---|
| type 1 | row 0, columns 1..n-2 | `a(k)b(0) + a(k-1)b(1) + d(k-1)` (test input) |
| type 2 (A/B alternating, A on top) | rows 0..n-3, column r+n-1 | `a(n-1)~b(r) + a(n-2)b(r+1)` + carry of the type 2 above (`d(n-2)` for the top one) |
| type 3 | rows 1..n-3, inner | sum from above + carry from the diagonal + `a(k-r-1)b(r+1)` |
| type 4 | row n-2, columns n-1..2n-4 | sum + carry + `~a(k-n+1)b(n-1)` |
| type 5 | row n-2, column 2n-3 | `a(n-1)~b(n-2) + ~a(n-2)b(n-1)` + carry of the last type 2 |
| type 6 | row n-2, column 2n-2 | `~a(n-1) + ~b(n-1) + a(n-1)b(n-1)` |
| type 7 | ripple row, columns n-1..2n-1 | full adders; the rightmost adds `a(n-1) + b(n-1)`, the leftmost the constant 1 |

`p(0) = a(0).b(0)` comes from a lone AND gate. `p(1..n-2)` leave the right edge
of rows 0..n-3, and `p(n-1..2n-1)` leave the type 7 row.

**Test support.** The n-1 inputs `d` feed the `c` inputs along the top and are 0
in multiplication. The input `e` is XORed into `b(1)..b(n-2)`, and the result
drives the complemented `b` input of the type 2 cells (rows 1..n-3) and the
type 5 cell. Each of those operand bits also drives the `d` input of the type 2
cell one row up. That `d` input takes the bit *before* its XOR gate. So with
`e = 1`, a type 2 cell's `b` input is inverted and the cell above it still
sees the true bit on `d`. This split is what lets the two `e = 1` test
patterns give the type 2 cells two vectors that no other pattern reaches
(`<10111>` and `<11001>`). Cell types 1, 2, 3 and 5 have modified rows (listed in
each module's header and in the table below). Each of them changes only input
combinations that cannot occur with `d = 0, e = 0`. Type 3 uses the carry-save
trick described above.

| cell | rows changed `<inputs> -> <x y>` |
|---|---|
| 1 | 10101->01, 01111->11, 00100->11, 01100->01, 01110->11, 00110->01 |
| 2A | 10100->11, 00100->01, 01110->01, 11110->11, plus the common rows |
| 2B | 00100->11, 01110->11, 11110->01, plus the common rows |
| 2A and 2B | 00110->01, 01100->01, 00101->01, 01101->01, 11100->11 |
| 3 | 0100->11, 0110->11 |
| 5 | 00100->11, 01110->11 |

Exhaustive simulation at n = 3, 5 and 8 confirms the signed product.

**The 55 test patterns** are encoded in `tb/bw_ref_pkg.sv`. Using that
encoding and the port assignments above, the reference model finds most
cells exhaustively exercised, but not all:

* At even n, the only gap in an ordinary cell is one vector (`<10010>`) on
  the type 1 cell next to the left diagonal. No other ordering of that cell's
  ports does better.
* At odd n, the `a` and `d` fields are read from their top bit down and the
  `b` field by absolute bit index. This is the same split that makes the
  carry-save patterns work at odd n. The gaps are then the same as at even n,
  plus one vector of the second-leftmost type 7 adder.

Two cells can never be exercised fully, by construction:

* The type 6 cell's four inputs come only from `a(n-1)` and `b(n-1)`, so it can
  see just 4 of its 16 vectors.
* The leftmost type 7 adder has a constant input.

`tb_bw_array_mult` prints these counts (64 of 1319 cell/vector/fault items
unmet at n = 5, 58 of 3299 at n = 8). Read them as a property of this
reconstruction, not as a proof that the array is or is not C-testable.

## Where this RTL makes its own choices

* The chip's I/O protocol, the pin assignment, the `carry_out` pin, the reset
  style and the capture of the test pins with the operands are all this
  design's. The original design calls only for multiplexed pins with storage
  and control at the array's edge.
* The carry-in values of the 16 MCS patterns are this design's choice. So
  are the odd-n reading of the alternating fields and the all-ones `d0` of
  T9,14, without which row 0 never sees `v9`.
* Baugh-Wooley: which operand bit drives which cell port follows the algebra
  above, so the modified rows stay unreachable in multiplication.
  * The XOR gates sit on `b(1)..b(n-2)`, on the complemented `b` branch only
    (see above).
  * Type 5 complements its `d` input (`~d.e`). This matches the truth table
    of its modified rows.
  * `b(n-1)` is inverted on its way into the type 6 cell.
* Both multipliers are purely combinational arrays, as in the original.
  Only the chip wrapper is clocked.
* Not implemented: the NMOS cell layout, the pads and the 40-pin package.
  These have no logic function.

## Files

| file | contents |
|---|---|
| `rtl/mult_pkg.sv` | test-pin struct, type 2 variant enum, parity fill function |
| `rtl/mcs_cell.sv`, `rtl/full_adder.sv` | modified carry-save cell, full adder (also BW type 7) |
| `rtl/mcs_array.sv`, `rtl/mcs_cp_mult.sv` | n x n MCS array; MCS array plus carry-propagate row |
| `rtl/mcs_chip.sv` | 16 x 16 chip with pin multiplexing |
| `rtl/bw_cell1.sv` .. `rtl/bw_cell6.sv` | Baugh-Wooley cell types 1-6 (type 2 has parameter `VARIANT`) |
| `rtl/bw_array_mult.sv` | modified Baugh-Wooley array, parameter `N` (default 5) |
| `rtl/easytest_mult_top.sv` | both multipliers side by side (`MCS_N = 16`, `BW_N = 5`) |
| `tb/mcs_ref_pkg.sv`, `tb/bw_ref_pkg.sv` | cell-level reference models, test sets, coverage and fault checks |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mult_pkg.sv \
    tb/mcs_ref_pkg.sv tb/bw_ref_pkg.sv tb/tb_easytest_mult_top.sv \
    --top-module tb_easytest_mult_top -Mdir obj && obj/Vtb_easytest_mult_top
```

Swap in any other `tb/tb_<module>.sv`. Packages must come before the files that
import them. `tb_easytest_mult_top` runs the design at its default sizes:

* 200 chip multiplications;
* the full 16-pattern chip test;
* all 1024 5-bit signed products;
* the 55 Baugh-Wooley patterns.

It also counts pin turnarounds, ignored starts and tests that use `d` and `e`.
`tb_mcs_cp_mult` holds the C-testability self-check of the MCS/CP reference
model. `tb_bw_array_mult` prints the Baugh-Wooley coverage report.

To change the size, override `N` on `mcs_cp_mult`, `mcs_chip` or
`bw_array_mult`, or `MCS_N` and `BW_N` on the top. `bw_array_mult` needs
`N >= 3`. `mcs_ref_pkg` models up to `N = 32` and `bw_ref_pkg` up to
`N = 16`.
