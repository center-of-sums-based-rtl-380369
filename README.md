# Center-of-Sums defuzzifier

A fuzzy controller ends with a set of clipped output membership functions,
one per fired rule. Defuzzification turns that set into one crisp number that
can drive an actuator. The classical centroid method integrates over the union
of the clipped sets. That needs a sampled output axis and a long
multiply-accumulate loop. The **Center of Sums (COS)** method avoids the
integral. It treats each clipped set as its own shape and takes the
area-weighted mean of the shapes' centres:

```
        CC1*AC1 + CC2*AC2      TC1 + TC2     N
  O  =  -----------------  =  ----------  =  -
           AC1 + AC2          AC1 + AC2      D
```

For trapezoidal sets, each area `ACk` and centre `CCk` has a closed form in
the four corner points. The whole defuzzifier is therefore a small
combinational tree of adders, subtractors, dividers and multipliers, with no
clock and no memory. This RTL implements that tree for **two rules**: two
trapezoidal consequents, C1 and C2, with 4-bit corner points and 4-bit
heights, giving a 16-bit crisp output.

## One trapezoid: area and centre

Consequent `Ck` is a trapezoid on the output axis. Its feet are at `X1` and
`X4`, and its shoulders at `X2` and `X3`, with `X1 <= X2 <= X3 <= X4`.
Inference (Mamdani min) has already clipped it to height `H`. Its two parallel
sides are `L1 = X4 - X1` (the base) and `L2 = X3 - X2` (the top). The design
computes:

| quantity | formula | hardware |
|---|---|---|
| `X34`, `X12` | `X3 + X4`, `X1 + X2` | two adders |
| `L1 + L2`  | `X34 - X12` | subtractor |
| `VC` | `(L1 + L2) / NUM2` | divider |
| `AC` (area) | `H * VC` | multiplier, 8-bit result |
| `CC` (centre) | `(X4 - X1) / NUM2 + X1` | subtractor, divider, adder |

`L1 + L2` is formed as `(X3+X4) - (X1+X2)`, not as two differences added
together. That saves one subtractor. `NUM2` is an input bus that carries the
constant 2. The halvings are real dividers driven by it, not shifts. Tie it
to 2 for normal operation.

`CC` is the midpoint of the base. That is the centroid of a *symmetric*
trapezoid. For an asymmetric one it is only an approximation, and the design
keeps it that way on purpose.

Worked example (C1 = 0, 3, 7, 10 at height 15; C2 = 6, 8, 12, 14 at height 10):

```
C1: X34 = 17, X12 = 3, L1+L2 = 14, VC = 7, AC1 = 105, CC1 = 5,  TC1 = 525
C2: X34 = 26, X12 = 14, L1+L2 = 12, VC = 6, AC2 = 60,  CC2 = 10, TC2 = 600
N = 1125, D = 165, O = 1125 / 165 = 6
```

## Datapath

```
 c1x1..c1x4, hc1 ──► cos_area_center (C1) ──► AC1, CC1 ─┐
                                                         ├─ MT2: TC1 = CC1*AC1 ─┐
 num2 ─────────────► (both units)                        │                      ├─ ADD7 ─► N ─┐
                                                         ├─ MT4: TC2 = CC2*AC2 ─┘             ├─ DIV5 ─► o
 c2x1..c2x4, hc2 ──► cos_area_center (C2) ──► AC2, CC2 ─┤                                     │
                                                         └─ ADD8: D = AC1 + AC2 ──────────────┘
```

The numerator and the denominator both need the two areas. The area units
exist only once, and the denominator adder reads `AC1` and `AC2` from the
numerator datapath. In the top-level netlist the unit counts are:

* 8 adders (`ADD1..ADD8`): 4 pair sums, 2 centre offsets, and the N and D sums.
* 4 subtractors (`SUB1..SUB4`).
* 5 dividers (`DIV1..DIV5`): 4 by `NUM2`, and `N / D`.
* 4 multipliers (`MT1..MT4`).

| module | role |
|---|---|
| `cos_pkg` | widths, the `trapezoid_t` struct |
| `cos_add`, `cos_sub`, `cos_mul`, `cos_div` | the ADD, SUB, MT and DIV units, width-parameterised |
| `cos_area_center` | one trapezoid: `AC`, `CC`, `VC` |
| `cos_numerator` | two area/centre units, MT2, MT4, ADD7; also outputs `AC1`, `AC2` |
| `cos_denominator` | ADD8: `D = AC1 + AC2` |
| `cos_defuzzifier` | top: numerator, denominator, DIV5 |

`cos_div` is a combinational restoring array divider. Each of its rows
handles one dividend bit. A row shifts the next bit into the partial
remainder, compares the remainder with the divisor, and subtracts when the
remainder is at least as large. The output divider (16-bit by 9-bit) is by
far the deepest logic path in the design.

## Number formats and where precision is lost

This section matters most when you use the design.

* **Heights are unitless integers.** A membership degree of 0.75 enters as
  15, 0.5 as 10 and 0.25 as 5. Any scale works, because it cancels in `N / D`.
  A finer scale gives finer areas but cannot exceed 15.
* **Every division truncates.** `O` is `floor(N / D)`, so 1125/165 = 6.82
  gives 6. `VC` and `CC` are also truncated. When `L1 + L2` is odd, the area
  loses half a height unit. When `X4 - X1` is odd, the centre drops by 0.5.
  The output has the resolution of the input grid: there are no fraction bits.
* **Widths:**
  * Points and heights: 4 bits.
  * Pair sums and `L1 + L2`: 5 bits. They reach 30.
  * `VC`: 4 bits.
  * `AC`: 8 bits.
  * `TC` and `N`: 16 bits.
  * `D`: 9 bits.
  * `o`: 16 bits.

  Keeping `VC` at 4 bits makes `AC` fit in 8 bits. This is exact for
  `NUM2 >= 2`. With `NUM2 = 1`, `VC` can reach 30, and its top bit is lost.
* **Unordered points are not detected.** If `X1 <= X2 <= X3 <= X4` does not
  hold, the subtractors wrap modulo 2^n and the result is meaningless.
* **Both heights zero** gives `D = 0`. The divider then returns all ones
  (`o = 16'hFFFF`), which acts as a "no rule fired" marker. If only one
  height is zero, the output is the centre of the other set.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `c1x1..c1x4` | in | 4 | corner points of C1, ascending |
| `hc1` | in | 4 | clipped height of C1 |
| `c2x1..c2x4` | in | 4 | corner points of C2, ascending |
| `hc2` | in | 4 | clipped height of C2 |
| `num2` | in | 4 | halving divisor, tie to 2 |
| `o` | out | 16 | crisp output |

That makes 60 pins in total. The block is purely combinational: no clock, no
reset, no handshake. `o` is valid one propagation delay after the inputs
settle. To run it at a clock rate, register the inputs and `o` outside it.
The critical path runs through an area divider, two multipliers, ADD7 and the
16-row output divider. If the target frequency requires it, pipeline that
divider.

On a small FPGA of the Spartan-3E class (1,920 4-input LUTs, 66 I/Os, 4
18x18 multipliers), the design fits. Open-source synthesis for that family
maps it to about 1,400 LUTs and 2 hard multipliers, and uses 60 of the I/Os.

## Relation to the original architecture

These parts follow the published architecture:

* the COS formula, the area and centre formulas, and the `NUM2` divisor input;
* the unit structure: the ADD/SUB/DIV/MT units, their numbering, and the
  sharing of the area units between numerator and denominator;
* the port names and widths;
* truncating division;
* the 8-bit `AC` and 16-bit `TC` widths.

These are choices of this implementation:

* **Pair-sum width.** The pair sums and `L1 + L2` are 5 bits instead of 4. A
  4-bit sum cannot hold 10 + 7 = 17. The modular 4-bit difference happens to
  be right only while `L1 + L2 <= 15`.
* **Denominator width.** `D` is 9 bits.
* **Division by zero.** A zero divisor gives an all-ones quotient.
* **Divider structure.** The dividers are restoring arrays.
* **Separate denominator front end.** The stand-alone denominator
  architecture has its own copy of the area front end. Here that front end is
  merged with the numerator's, so `cos_denominator` holds only the final
  adder. The merged top level does the same.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference
values come from `tb/cos_ref_pkg.sv`, which evaluates the formulas above with
plain integers.

| testbench | what it checks |
|---|---|
| `tb_cos_add`, `tb_cos_sub`, `tb_cos_mul`, `tb_cos_div` | exhaustive at the small widths; random at the wide ones; the divider also gets zero divisors and 1125/165, 740/95 |
| `tb_cos_area_center` | the two worked trapezoids; the widest one (`L1+L2 = 30`); 3,000 random ordered trapezoids, some with `NUM2 != 2` |
| `tb_cos_numerator` | N = 1125 and 740 for the two worked models; random pairs; the shared areas and the centres |
| `tb_cos_denominator` | the worked sums, a grid, random pairs |
| `tb_cos_defuzzifier` | see below |

`tb_cos_defuzzifier` runs end to end at the default sizes. It applies:

* three reference input sets, which must give 6, 7 and 6;
* the case where both heights are zero;
* 5,000 random cases.

It checks `o` 1 ns after each input change, which confirms that there is no
cycle of latency. It also counts how often each behaviour occurred, and fails
if any of them never did:

* pair sums above 15;
* truncating and exact output divisions;
* a zero denominator;
* a single active rule;
* `NUM2` other than 2.

To simulate with Verilator, for example the top level:

```
verilator --binary --timing --assert --top-module tb_cos_defuzzifier \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cos_pkg.sv tb/cos_ref_pkg.sv \
  tb/tb_cos_defuzzifier.sv
./obj_dir/Vtb_cos_defuzzifier
```

For another block, replace the testbench name. Every testbench finishes in
well under a second.

## Changing the design

The widths live in `cos_pkg`. To use a finer input grid, widen `X_W` and
`H_W`. The derived widths (`XS_W`, `VC_W`, `CC_W`, `AC_W`, `D_W`) follow
automatically. Check that `TC_W`, `N_W` and `O_W` still hold
`2 * (2^X_W - 1) * AC max`. Update the reference package if you change the
rounding.

To handle more rules, add more `cos_area_center` units. Then extend the
`TC` adder and the `AC` adder into sums over all rules. The output divider
stays the same apart from its widths.
