# Universal Multiplier Unit

A multiplier that handles three number formats — unsigned, sign magnitude and
two's complement — on **one** partial-product array instead of three. The
trick is to make the array one bit wider than the operands and always
multiply (n+1)-bit two's complement numbers. A 2-bit control word, UC, only
decides how the n-bit operands are widened to n+1 bits and how the result is
read back. The cost over a plain unsigned array is a handful of multiplexers,
one extra row and column of partial products, and two constant ones.

The default operand width is n = 16. The unit is purely combinational.

## Interface (`rtl/umu.sv`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | n     | operand X; bit n-1 is the MSB (unsigned) or the sign bit |
| `y`  | in  | n     | operand Y |
| `uc` | in  | 2     | Universal Control, type `umu_pkg::uc_t` |
| `p`  | out | 2n+1  | product P[2n:0] |

| UC | format | operands fed to the array | result |
|----|--------|---------------------------|--------|
| 00 | unsigned | X_n = 0, Y_n = 0 (zero extension) | P[2n-1:0] = X·Y, P[2n] = 0 |
| 01 | sign magnitude | X_n = X_{n-1} = 0, Y_n = Y_{n-1} = 0 | P[2n-1:0] = \|X\|·\|Y\|, P[2n] = X_{n-1} XOR Y_{n-1} |
| 10, 11 | two's complement | X_n = X_{n-1}, Y_n = Y_{n-1} (sign extension) | P[2n:0] = X·Y in two's complement |

The low bit of UC is a don't-care in two's complement mode. For n = 16 the
unit has 16 + 16 + 2 inputs and 33 outputs, 67 pins in all.

In sign-magnitude mode the sign bit is the XOR of the operand signs even when
the magnitude is zero, so a "negative zero" (P[2n] = 1, rest 0) can come out.
That is a property of the representation; normalise it outside if needed.

## The extended two's complement matrix

Write the widened operands as X = -X_n·2^n + Σ X_i·2^i and likewise for Y
(i < n). Their product has four parts: X_nY_n·2^2n, the ordinary n×n array
Σ X_iY_j·2^(i+j), and two negative lines, -Y_n·Σ X_i·2^(i+n) and
-X_n·Σ Y_j·2^(j+n). Each negative line is rewritten with -v = ~v + 1 - 2^n,
and -2^(2n+1) equals +2^(2n+1) modulo 2^(2n+2). The result has only positive
terms:

```
P = X_nY_n·2^2n + Σ X_iY_j·2^(i+j)
  + Σ NOT(X_i·Y_n)·2^(i+n) + Σ NOT(X_n·Y_j)·2^(j+n)
  + 2^(n+1) + 2^(2n+1)                       (mod 2^(2n+2))
```

Note that the complement is over the *product* bit (a NAND), and the
correction constant 2^(n+1) is *added*. For n = 4 the matrix looks like this
(`~ab` = NAND):

```
                             X3Y0  X2Y0  X1Y0  X0Y0
                       X3Y1  X2Y1  X1Y1  X0Y1
                 X3Y2  X2Y2  X1Y2  X0Y2
           X3Y3  X2Y3  X1Y3  X0Y3
     ~X3Yn ~X2Yn ~X1Yn ~X0Yn
XnYn ~XnY3 ~XnY2 ~XnY1 ~XnY0
1                      1
P9   P8    P7    P6    P5    P4    P3    P2    P1    P0
```

The 2n+2 bit sum is the exact product of the two (n+1)-bit numbers. In every
mode the real result fits in 2n+1 bits, so the output multiplexer drops bit
2n+1.

Why one array is enough for all three formats:

* **Unsigned**: X_n = Y_n = 0. Every NAND term becomes 1, and those ones plus
  the two constants add up to exactly 2^(2n+2), which is 0 modulo 2^(2n+2).
  Only the plain n×n array is left.
* **Sign magnitude**: the sign bits are cleared as well. The array then
  multiplies the two (n-1)-bit magnitudes as unsigned numbers, and the output
  multiplexer writes the XOR of the original sign bits into P[2n].
* **Two's complement**: sign extension to n+1 bits does not change the
  value, so the array forms the signed product directly. Because of the
  extra bit, the most negative value squared, (-2^(n-1))², comes out
  correctly.

## Datapath

```
x, y, uc ─► umu_input_mux ─► xe, ye (n+1 bits)
                                │
              umu_core:  umu_pp_matrix ─► n+3 rows
                                │
                         csa_array (n+1 rows of csa_cell)
                                │ sum, carry
                         cpa_ripple (2n+2 csa_cells in a carry chain)
                                │ 2n+2 bit product
              umu_output_mux ◄──┘  (+ x[n-1], y[n-1], uc) ─► p
```

| module | role |
|--------|------|
| `umu_pkg` | `uc_t` encoding, default width `UMU_N = 16`, `uc_is_twos()` |
| `csa_cell` | carry save adder cell = full adder, a (3,2) counter |
| `umu_input_mux` | widens X and Y according to UC |
| `umu_pp_matrix` | the n+3 rows of the matrix above, as full-width vectors shifted to their weights |
| `csa_array` | linear carry-save array: the first row of cells adds rows 0-2, and each later row adds one more partial product to the running sum/carry pair |
| `cpa_ripple` | final ripple carry-propagate adder built from the same cell |
| `umu_core` | the three stages above: an (n+1)×(n+1) signed multiplier |
| `umu_output_mux` | chooses the result bits and the sign position by UC; its assertions check that the core bits it drops are redundant (zero for the unsigned formats, a copy of bit 2n for two's complement) |
| `umu` | top level |

The critical path runs through the input multiplexer, n+1 carry-save rows
and the 2n+2 bit ripple adder. This is an array, not a tree. In return the
wiring is regular and only goes to neighbouring cells.

## Design choices not fixed by the source description

* **Output width.** The result is 2n+1 bits, with the sign-magnitude sign at
  bit 2n. The unsigned result has P[2n] forced to 0. The two's complement
  result is the product sign-extended by one bit.
* **Array organisation.** The rows are handed to `csa_array` as full-width
  vectors. Constant-zero cells are left for synthesis to prune, instead of
  placing the cells on a diagonal by hand.
* **Final adder.** A ripple adder. Any faster carry-propagate adder can
  replace `cpa_ripple` without other changes.
* **No registers.** No clock, no reset, no pipeline. To pipeline the unit,
  register between `csa_array` rows or before `cpa_ripple`.

Not included: the reference multipliers this unit is usually compared with
(plain unsigned array, Baugh-Wooley, Booth/Wallace-tree). FPGA area and
timing figures are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends itself with a watchdog if it
hangs:

| testbench | what it checks |
|-----------|----------------|
| `tb_csa_cell` | all 8 input combinations |
| `tb_cpa_ripple` | 34-bit sums, full carry chains, carry-in, random values |
| `tb_csa_array` | sum + carry = Σ rows (mod 2^34), 19 rows, random and corner inputs |
| `tb_umu_pp_matrix` | rows add up to the signed 17×17 product; positions of the constants and the NAND terms |
| `tb_umu_core` | 17×17 signed products, including the extreme values |
| `tb_umu_input_mux`, `tb_umu_output_mux` | every UC code |
| `tb_umu` | full-width (n = 16) end-to-end test, 20 000 random pairs in all four UC codes plus corner cases; counts each mode and special case (negative results, sign-magnitude -0, most negative squared, unsigned bit 2n-1) and fails if one never happened |
| `tb_umu_small` | exhaustive at n = 4, 5 and 8 (uses the helper `tb/umu_exhaust.sv`) |

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/umu_pkg.sv tb/tb_umu.sv --top-module tb_umu
./obj_dir/Vtb_umu
```

Use the same command for any other testbench, changing the file name and
`--top-module`. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/umu_pkg.sv rtl/umu.sv`. To change the
width, override `N` on `umu` (any N ≥ 2). The internal widths (2N+2 bits, N+3
rows) follow from it.
