# Parity-preserving reversible signed array multipliers

A reversible circuit maps every input vector to a distinct output vector.
No information is destroyed, so the circuit has no Landauer loss. Such
circuits are built from reversible gates. Every gate has as many outputs as
inputs, and a wire may never branch or loop back. When every gate is also
*parity-preserving*, the XOR of a gate's outputs equals the XOR of its
inputs. The whole circuit then obeys

    XOR(primary inputs, constant inputs) == XOR(primary outputs, garbage outputs)

A single flipped wire anywhere breaks this identity. Comparing the two
parities therefore detects any single error.

This RTL describes two n x n two's complement multipliers built only from
parity-preserving reversible gates, at the gate level:

| multiplier | signed-product scheme | partial products | adder array |
|---|---|---|---|
| `mult_bw2` (main, lower cost) | modified Baugh-Wooley (BW2) | LMH + Fredkin gates | ZPLG full adders, ZCG half adders, one F2G |
| `mult_bw1` | original Baugh-Wooley (BW1) | Fredkin + double Feynman gates | ZPLG full adders, ZCG half adders |

`pp_mult_top` places the two side by side. Each one has its own operands,
product, garbage bus and parity error flag. Everything is combinational:
there is no clock, no reset and no register. `N` (default 4) sets the
operand width, and any `N >= 2` works.

The SystemVerilog describes the logic of the reversible netlist. Each gate is
its own module instance, and every gate output is either used or brought out
as garbage. The RTL synthesises to ordinary CMOS logic. Its purpose is to
give an executable, checkable model of the reversible design: its
arithmetic, its constant inputs and garbage outputs, its gate counts and its
error detection.

## The gates

All equations use `~` for NOT, `&` for AND and `^` for XOR. QC is the quantum
cost, the usual cost measure of a reversible gate.

| module | size | outputs | QC | role here |
|---|---|---|---|---|
| `f2g` (double Feynman) | 3x3 | P=A, Q=A^B, R=A^C | 2 | fan-out (B=C=0); with B=1, Q=~A |
| `frg` (Fredkin) | 3x3 | P=A, Q=~A&B \| A&C, R=~A&C \| A&B | 5 | with C=0: R=A&B, Q=~A&B |
| `lmh` | 4x4 | P=A, Q=B^C, R=~A&C ^ A&B, S=R^D | 6 | with C=0: passes A, B; S=A&B (D=0) or ~(A&B) (D=1) |
| `zplg` | 5x5 | P=A, Q=A^B, R=A^B^C, S=maj(A,B,C)^D, T=maj^B^E | 8 | full adder with D=E=0: sum on R, carry on S |
| `zcg` | 4x4 | P=A, Q=A^B, R=A&B^C, S=A&~B^D | 6 | half adder with C=D=0: sum on Q, carry on R |

For `zplg` and `zcg` only the adder behaviour and the gate size are fixed.
The remaining outputs are one valid choice that keeps the gates reversible
and parity-preserving. The gate testbenches check the truth tables, that
all output vectors are distinct, and parity preservation.

## Signed products: the two Baugh-Wooley forms

In two's complement the sign bit has weight -2^(n-1). Baugh-Wooley rewrites
the negative partial products so that only non-negative bits remain, plus
some constants.

**BW2, the modified form** used by `mult_bw2`. Row `i` (i = 0..n-1) holds
`x_j & y_i` at column `i+j`, with two exceptions. In the sign column
(`j = n-1`, `i < n-1`) and in the sign row (`i = n-1`, `j < n-1`) the terms
are inverted: `~(x_j & y_i)`. The sum also gets a `1` at column `n` and a `1`
at column `2n-1`. For n = 4:

```
                   ~x3y0  x2y0  x1y0  x0y0
            ~x3y1   x2y1  x1y1  x0y1
     ~x3y2   x2y2   x1y2  x0y2
 x3y3 ~x2y3 ~x1y3  ~x0y3
    1               1                         (columns 7 and 4)
```

**BW1, the original form** used by `mult_bw1`. The sign column holds
`x_{n-1} & ~y_i` and the sign row holds `~x_j & y_{n-1}`. Added to these are:
- the single bits `x_{n-1}` and `y_{n-1}` at column `n-1`;
- `~x_{n-1}` and `~y_{n-1}` at column `2n-2`;
- a `1` at column `2n-1`.

## `ppg_bw2`: threading operands through the partial-product cells

This is the least obvious part of the design. There are n^2 cells, and cell
`(i,j)` produces the term of `x_j` and `y_i`. In ordinary logic, `x_j` would
simply fan out to n AND gates. In reversible logic a wire cannot branch, so
each operand bit is passed from cell to cell as a *chain*. The two gate
kinds behave differently:

- An **LMH** cell with `C = 0` passes its A input on P and its B input on Q.
  It can sit anywhere in both of its chains.
- A **Fredkin** cell with `C = 0` passes only A, and its B input is used up.
  It can only stand where the chain of its B operand ends. It is cheaper
  (QC 5 against 6), but it cannot produce an inverted product.

The inverted terms must come from LMH cells with `D = 1`. So the chains are
ordered to end as many as possible at non-inverted cells:

- Column chain `x_j` (j < n-1) visits rows n-1, 0, 1, ..., n-2.
- Row chain `y_i` (i < n-1) visits columns n-1, 0, 1, ..., n-2.
- The chains of `x_{n-1}` and `y_{n-1}` run straight.

That gives 2n-3 Fredkin cells, which form row n-2 and the part of column
n-2 above it. The other (n-1)^2+2 cells are LMH. For n = 4, with rows = y_i
and columns = x_j:

```
        j=0      j=1      j=2      j=3
 i=0    LMH      LMH      FRG(A=x) LMH D=1
 i=1    LMH      LMH      FRG(A=x) LMH D=1
 i=2    FRG(A=y) FRG(A=y) FRG(A=y) LMH D=1
 i=3    LMH D=1  LMH D=1  LMH D=1  LMH
```

Totals for n = 4: 11 LMH and 5 FRG, 27 constant inputs, 19 garbage outputs,
QC 91. Garbage comes from the unused R (LMH) or Q (FRG) of every cell, and
from the pass-through outputs where the `x_3`, `y_3` and `y_2` chains end.

## `moa_bw2`: the adder array

This is a carry-save array followed by a ripple row. Carries always move
diagonally into the next column of the next stage.

- **Stage 1** adds rows 0 and 1 with n-1 ZCG half adders.
- **Stages 2..n-1** each add one more row with n-1 ZPLG full adders.
- **Product bits:** bit 0 is `pp[0][0]`, and bit k (0 < k < n) is the
  column-k sum of stage k.
- **Ripple row:** n-1 ZPLGs cover columns n..2n-2. The constant `1` of
  column n enters as the carry input of its first adder.
- **Column 2n-1:** adding the scheme's other `1` to the last carry
  complements that carry. An F2G with `B = 1` does this (QC 2), instead of
  a half adder (QC 6).

Totals: (n-1)^2 ZPLG, n-1 ZCG and one F2G. For n = 4 that is 13 gates,
27 constant inputs, 35 garbage outputs and QC 92.

## `mult_bw1`

**`ppg_bw1`** uses one Fredkin cell per term. A Fredkin gate with `C = 0`
gives `~A&B` on Q, so a term with an inverted operand needs no inverter. The
operand to invert goes on A, and the product is taken from Q:
- `x_j` (j < n-1) runs down column j on A.
- `y_i` (i < n-1) enters its sign-column cell first on A. The P output then
  feeds an F2G fan-out chain (`f2g_fanout`) that supplies the B inputs of
  the row.
- `x_{n-1}` and `y_{n-1}` go through fan-out chains whose first F2G has
  `B = 1`. That gate also yields `~x_{n-1}` and `~y_{n-1}`.

**`moa_bw1`** is the same array with these changes:
- A ZCG adds `x_{n-1} + y_{n-1}`. Its sum enters the column-(n-1) adder of
  stage 1, which becomes a full adder, and its carry is the ripple row's
  first carry input.
- A ZPLG at column 2n-2 adds `~x_{n-1} + ~y_{n-1}`.
- A ZPLG at column 2n-1 adds the constant `1` to the two carries entering
  that column. Its carry out is garbage.

Totals: n^2-2n+4 ZPLG and n-1 ZCG. For n = 4 that is 12 + 3 gates, 31
constant inputs, 43 garbage outputs and QC 114.

## Error detection

Each multiplier brings out its garbage bus. `parity_checker` computes

    err = ^{x, y} ^ CONST_PAR ^ ^{p, garbage}

`CONST_PAR` is the parity of the constant inputs tied to 1, and
`rev_pkg::mult2_const_ones` / `mult1_const_ones` give that count. `err` is 0
in a fault-free circuit. It rises when any single wire between gates is
flipped, because every downstream gate carries the flipped parity on to the
outputs. The checker is ordinary irreversible logic, meant to sit outside
the reversible circuit. The garbage bit layout of each block is given by
the `*_goff` functions and comments in `rev_pkg` and in each module.

## Cost of the `mult_bw2` construction at other sizes

| n | LMH | FRG | ZPLG | ZCG | F2G | gates | constant inputs = garbage outputs | QC |
|---|---|---|---|---|---|---|---|---|
| 4 | 11 | 5 | 9 | 3 | 1 | 29 | 54 | 183 |
| 5 | 18 | 7 | 16 | 4 | 1 | 46 | 86 | 297 |
| 8 | 51 | 13 | 49 | 7 | 1 | 121 | 230 | 807 |
| 16 | 227 | 29 | 225 | 15 | 1 | 497 | 966 | 3399 |

In general: (n-1)^2+2 LMH, 2n-3 FRG, (n-1)^2 ZPLG, n-1 ZCG and 1 F2G;
4n^2-4n+6 constant inputs and as many garbage outputs; QC 14n^2-12n+7.

## Where this RTL departs from the published circuit, or had to choose

- **LMH, ZPLG and ZCG equations.** The equations above are one consistent
  reading. The LMH equations match the gate's stated structure (R and S share
  one XOR; the ANDs are ~A&C and A&B; one NOT), and they reproduce the
  published counts of `ppg_bw2`. For ZPLG and ZCG only the adder outputs are
  fixed. Their hardware-complexity (operation) counts therefore need not
  match the published ones.
- **Wiring of the arrays.** The chain order in `ppg_bw2` and the adder
  arrays are this design's own. They reproduce the published gate, constant
  and garbage counts and QC of the BW2 generator, of both adder arrays, and
  of the whole BW2 multiplier.
- **`ppg_bw1` fan-out.** It uses 8 F2Gs at n = 4, where the published circuit
  uses n*floor(n/2) + n mod 2 + 2 = 10. As a result the BW1 multiplier here
  has 39 gates, 63 constant inputs, 63 garbage outputs and QC 210, against
  41, 67, 67 and 214 published. Its function is the same.
- **Constant `1` at column n.** The BW2 scheme needs this `1`. Here it is a
  constant input of the adder array.
- **5 x 5 gate count.** One published comparison gives 49 gates for the 5 x 5
  BW2 multiplier. The general gate formulas, and this RTL, give 46; the QC
  (297) agrees.
- **Parity checker and flags.** `parity_checker` and the `*_err` outputs are
  additions. The construction only guarantees that the parity identity holds.

## Files, interfaces and simulation

- `rtl/rev_pkg.sv`: sizing functions (garbage widths, garbage offsets,
  fan-out sizes, constant-one counts).
- `rtl/f2g.sv`, `frg.sv`, `lmh.sv`, `zplg.sv`, `zcg.sv`: the gates.
  `rtl/f2g_fanout.sv`: F2G fan-out chain.
- `rtl/ppg_bw2.sv`, `moa_bw2.sv`, `mult_bw2.sv`: the BW2 multiplier.
  `pp[i][j]` is row i, column i+j.
- `rtl/ppg_bw1.sv`, `moa_bw1.sv`, `mult_bw1.sv`: the BW1 multiplier.
- `rtl/parity_checker.sv`, `rtl/pp_mult_top.sv`: error flag and top level
  (`bw2_x`, `bw2_y` -> `bw2_p`, `bw2_garbage`, `bw2_err`, and the same for
  `bw1_*`).

Each `tb/tb_<module>.sv` is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

- **Gates:** exhaustive truth tables, reversibility and parity.
- **Generators and adder arrays:** exhaustive or random at N = 2..5.
  `moa_bw2` and `moa_bw1` see every input pattern at N = 4.
- **Multipliers:** every operand pair at N = 4 and 5.
- **`tb_pp_mult_top`:** every operand pair at N = 4. It then flips single
  internal wires with `force` and checks that only the flag of the affected
  multiplier rises.
- **`tb_mult_sizes`:** both multipliers over every operand pair at 5 x 5 and
  8 x 8, and over 20,004 operand pairs at 16 x 16.

To run one:

```
verilator --binary --timing -Irtl rtl/rev_pkg.sv tb/tb_pp_mult_top.sv --top-module tb_pp_mult_top
./obj_dir/Vtb_pp_mult_top
```

Replace `tb_pp_mult_top` with any other testbench name. `-Irtl` lets
verilator find each module in its own file. Every testbench finishes in well
under a second.
