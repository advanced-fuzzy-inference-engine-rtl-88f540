# Max-min matching-degree calculator for trapezoidal and triangular fuzzy sets

A fuzzy inference engine spends most of its time on one question. For each
rule it asks how well the fuzzified input X matches the rule's antecedent A.
That matching degree is the height of the highest point under both membership
functions:

    MD = max over m of min(A(m), X(m))

A naive processor sweeps the whole universe of discourse to find it. This
design gets the answer in one clock from the break points of the two
membership functions (MFs). For trapezoids and triangles the maximum can only
be one of three things:

* **1**, when the flat tops (plateaus, or the peaks of triangles) overlap;
* **0**, when one MF ends before the other begins;
* **the height of the one crossing point** between the falling edge of the
  left MF and the rising edge of the right MF.

The crossing height needs only two subtractions, one addition and one short
division. Trapezoids and triangles share the same hardware.

## Number formats

| item | format |
|---|---|
| break point | 6 bits unsigned, a universe of 64 elements (`PW = 6`) |
| trapezoid | `p1 <= p2 <= p3 <= p4`: rises over `p1..p2`, is 1 over `p2..p3`, falls over `p3..p4` |
| triangle | `p1 <= p2 <= p3`, coded with `p4 = 0` (foot, peak, foot) |
| matching degree `h` | 12 bits (`HW = 12`) |

The codes of `h`:

| grade | `h` |
|---|---|
| 1 (full match) | `FFF` (all ones) |
| 0 (no overlap) | `000` |
| crossover, two triangles | 1..7 (8 levels) |
| any other crossover | 1..15 (16 levels) |

So `h` does not use one linear scale. A crossover with grade g reads as
about g·16 (or g·8), while a full match is all ones. The consumer of `h` must
treat `FFF` as a separate code.

A triangle is marked by a fourth point of 0. No trapezoid other than the
empty one (0,0,0,0) can end at 0, so the code is unambiguous, and the empty
one is the same function either way. In this coding the interface needs no
mode pin: the eight point buses are the only data inputs.

## How the crossing height is computed

Let A lie to the left of X. A's plateau ends at a3, and X's plateau starts at
x2, with a3 < x2. The falling edge of A runs from (a3, 1) to (a4, 0). The
rising edge of X runs from (x1, 0) to (x2, 1). Intersecting the two lines
gives the height

    g = (a4 - x1) / ((x2 - a3) + (a4 - x1)) = 1 - b1 / (b1 + b2)
    with  b1 = x2 - a3,  b2 = a4 - x1

The mirror case (X left of A) uses `b1 = a2 - x3` and `b2 = x4 - a1`. The
hardware computes the discrete grade as

    h = 2^i - floor(2^i * b1 / (b1 + b2)),   i = 4 (16 levels) or 3 (8 levels)

For example, take A = (1, 3, 5, 7) and X = (4, 6, 7, 9). Then b1 = 1 and
b2 = 3, so b1/(b1+b2) = 0.25, and h = 16 - 4 = 12 = `00C`.

Two details set the exact value of `h`:

* **Truncation.** The subtracted term is truncated, not rounded.
* **Range limit.** A crossing height is strictly between 0 and 1. Near 1 the
  truncated term can be 0, which would give h = 2^i. The result is limited to
  2^i - 1, so crossovers always read 1..15 (or 1..7).

**Triangles.** A triangle (p1, p2, p3) is widened to the trapezoid
(p1, p2, p2, p3) before anything else. With that, the triangle cases become
special cases of the trapezoid cases:

* "peak of A left of peak of X, a2 < x2 and x1 < a3" becomes case 1;
* the mirror case becomes case 2.

One set of comparators and subtractors therefore serves both shapes. Only the
grading step differs. The 8-level term is the 16-level quotient shifted right
by one, because floor(8f) = floor(floor(16f) / 2).

## The six cases (`md_cond_e`)

| code | name | condition (after widening) | `h` |
|---|---|---|---|
| 5 | `MD_FULL` | `x2 <= a3` and `a2 <= x3` (plateaus/peaks overlap or touch) | `FFF` |
| 1 | `MD_EQ1` | trapezoid case, A left: `a3 < x2` and `x1 < a4` | 16 - floor(16·(x2-a3)/((x2-a3)+(a4-x1))) |
| 2 | `MD_EQ2` | trapezoid case, X left: `x3 < a2` and `a1 < x4` | 16 - floor(16·(a2-x3)/((a2-x3)+(x4-a1))) |
| 3 | `MD_EQ3` | as `MD_EQ1`, both MFs triangles | 8 - floor(8·…) |
| 4 | `MD_EQ4` | as `MD_EQ2`, both MFs triangles | 8 - floor(8·…) |
| 0 | `MD_NONE` | otherwise: supports disjoint or touching at one point | `000` |

A triangle paired with a trapezoid is graded on 16 levels and reported as
`MD_EQ1` or `MD_EQ2`.

## Structure and timing

```
 a1..a4, x1..x4 ──► md_condition ──cond──────────────────────► md_grade ──► [reg] ──► h, cond
                         │ b1, b2                                  ▲
                         └──► z = b1 + b2 ──► md_divider ──q───────┘
                              (b1 = numerator)   q = floor(16·b1/z)
```

| file | contents |
|---|---|
| `rtl/maxmin_pkg.sv` | widths (`MF_PW`, `MD_HW`, `TRAP_BITS`, `TRI_BITS`) and the case enum |
| `rtl/md_condition.sv` | triangle detection and widening, case comparators, gap subtractors |
| `rtl/md_divider.sv` | `QW`-step combinational restoring fractional divider |
| `rtl/md_grade.sv` | selects 2^i, subtracts, limits the range, forces `FFF`/`000` |
| `rtl/maxmin_calculator.sv` | top: the three stages, the adder and the output register |

**Top-level signals.** The top, `maxmin_calculator`, takes `clk`, a
synchronous active-low `rst_n`, `in_valid`, and the eight points. It returns
`out_valid`, `cond` and `h`.

**Latency and throughput.** The whole datapath is combinational. The only
registers are on the outputs: 16 flip-flops (`out_valid`, `cond` and `h`). A
result appears one clock after its inputs, and a new pair can be applied on
every clock. `h` and `cond` hold their value on cycles without `in_valid`.

**Critical path.** The longest path runs through the comparators, the gap
subtraction, the add, four compare/subtract steps and the final subtract. An
implementation of the same datapath on a small, older FPGA is reported to
reach about 76 MHz. If that is too slow, the natural place for a pipeline
register is between `md_condition` plus the adder and `md_divider`.

**Input assertions.** The top asserts, under simulation, that the points of
each MF are non-decreasing on every valid cycle. The hardware does not check
this ordering. The result for unordered points has no meaning.

## Where this design makes its own choices

The case conditions, equations 2^i - 2^i·b1/(b1+b2), the 6-bit points, the
16/8 levels and the `FFF`/`000` codes are the published method. These are
this implementation's reading or additions:

* **Triangle coding.** A triangle is marked by `p4 = 0`. Mixed
  triangle/trapezoid pairs go through the widening described above.
* **Full-match test.** A full match is taken to mean that the plateaus
  overlap, including when they only touch. Supports that only touch give 0.
* **Quantisation.** The subtracted term is truncated, and crossovers are
  limited to 1..2^i-1.
* **Divider.** The divider is a restoring divider. The method only gives the
  formula.
* **Control and timing.** These are the design's own: a single output
  register, the `in_valid`/`out_valid` flags, the synchronous reset and the
  `cond` output.

## Beyond this RTL

The calculator is one part of a fuzzy logic controller. The other parts are
the fuzzifier, the rule base, the inference stage that combines the matching
degrees of its rules, and the defuzzifier. None of them is included here: the
method describes only the calculator.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. Each also has a watchdog that counts a failure if the simulation
hangs. The testbenches share `tb/md_ref_pkg.sv`, a reference model that
computes the grade independently. It evaluates min(A, X) in real arithmetic
at every break point and at every rising/falling edge crossing, takes the
maximum, and then applies the quantisation rule.

```sh
# whole calculator, default sizes: worked examples, directed cases and
# 1,000,000 random pairs, with one-clock latency checked
verilator --binary --timing --assert -Irtl -Itb \
  rtl/maxmin_pkg.sv tb/md_ref_pkg.sv rtl/md_condition.sv rtl/md_divider.sv \
  rtl/md_grade.sv rtl/maxmin_calculator.sv tb/tb_maxmin_calculator.sv \
  --top-module tb_maxmin_calculator -Mdir obj_top
./obj_top/Vtb_maxmin_calculator
```

The unit testbenches build the same way with their own module. `tb_md_divider`
tests every numerator/denominator pair, and `tb_md_grade` every case and
quotient. `tb_md_condition` runs the worked examples and 20,000 random pairs.

`tb_maxmin_calculator` counts how often each mechanism happens and fails if
one never does. The mechanisms are:

* all six cases;
* two-triangle grading;
* mixed shapes;
* the range limit;
* idle cycles.

It takes about a second.

**Changing sizes.** `PW` sets the point width. The divider and the adder
follow it. For finer grading, set `QW` and `TQ` on `md_grade` and `QW` on
`md_divider` (`TRAP_BITS` and `TRI_BITS` in the package). `HW` must stay
above `QW` so that `FFF`-style all-ones remains distinct from crossover codes.
