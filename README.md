# Dual-quality 4:2 compressors and an accuracy-configurable multiplier

A multiplier spends most of its logic summing partial products, and 4:2
compressors are the usual cell for that. This design makes each compressor
*dual-quality*. It holds a cheap approximate circuit plus the extra logic
that makes it exact. A mode input picks between the two at run time. In
silicon the unused part would be power-gated, so approximate mode saves
power and delay, and exact mode costs about what an ordinary compressor
does.

A multiplier built from these cells can change its accuracy from one
operation to the next. No correction unit and no extra cycles are needed:
the mode inputs are just two more combinational inputs.

The RTL has three parts:

* the exact 4:2 compressor and four dual-quality structures, DQ1 to DQ4;
* a compressor-tree multiplier. Its low and high product halves each take
  one compressor structure and have their own mode input;
* testbenches that check every cell exhaustively and the default 8x8
  multiplier on all 65,536 operand pairs in every mode.

## The 4:2 compressor

A 4:2 compressor takes four bits of one weight, `x1..x4`, plus a carry input
`cin` from the column below. It returns:

* `sum`, of the same weight;
* two bits of double weight: `carry` goes to the next reduction level, and
  `cout` goes to the `cin` of the compressor one column up.

The rule it keeps is

    x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout)

The exact cell (`comp42_exact`) is two chained full adders. The first adds
`x1, x2, x3` and gives `cout`. The second adds that sum, `x4` and `cin`, and
gives `sum` and `carry`. Because `cout` does not depend on `cin`, carries
never ripple through more than one column in a row of compressors.

## The four dual-quality structures

Each `dq42cN` module has the ports of the exact compressor plus `exact`
(1 = exact, 0 = approximate). In exact mode all four match `comp42_exact`. In
approximate mode `cin` is ignored and the outputs are:

| module   | approx. `sum`           | approx. `carry`     | approx. `cout` | wrong patterns (cin = 0) |
|----------|-------------------------|---------------------|----------------|--------------------------|
| `dq42c1` | `x1`                    | `x4`                | 0 (unused)     | 10 of 16 (62.5 %)        |
| `dq42c2` | `x1`                    | `x4`                | `x3`           | 10 of 16 (62.5 %)        |
| `dq42c3` | `(x1^x2) \| (x3^x4)`    | `x4`                | 0 (unused)     | 8 of 16 (50 %)           |
| `dq42c4` | `(x1^x2) \| (x3^x4)`    | `x1 x2 \| x3 x4`    | 0 (unused)     | 5 of 16 (31.25 %)        |

The error rate counts the patterns of `x1..x4` whose approximate value
`sum + 2*(carry + cout)` differs from `x1+x2+x3+x4`.

* **DQ1 and DQ2** are wires only, so their approximate mode needs no gates.
* **DQ3 and DQ4** keep a small gate network. In both, `sum` is a NAND of
  the XNORs of the two input pairs, so one lone 1 is never lost.
* **DQ4** also forms `carry` from the two pair ANDs. It goes wrong only when
  each pair holds exactly one 1, or when all four inputs are 1.

Implementation notes:

* The published structures join the exact and approximate outputs with
  tri-state buffers. Here a 2:1 multiplexer per output does that job.
* Power gating is not modelled. It changes power, not function.
* The unused `cout` of DQ1, DQ3 and DQ4 is driven 0. This matters: that
  output feeds the next column's `cin`.

How far each structure can be trusted:

* **DQ1, DQ2 and DQ4** have approximate functions fixed by their published
  wiring, and their published error rates are reproduced exactly (62.5 %,
  62.5 % and 31.25 %).
* **DQ3** is only partly fixed by its schematic. The schematic fixes the
  `carry = x4` wire, the unused `cout` and one NAND used only in approximate
  mode. What feeds that NAND is this design's reading. DQ3 is meant to sit
  between DQ1 and DQ4 in accuracy, and the chosen function (50 %) does.
  Treat its exact approximate function as the least certain part of this
  RTL.

## The multiplier: `dq_dadda_mult`

```
a, b --> pp_gen --> [reduce_group x N/4] --> ... --> [reduce_group] --> final_adder --> p
          N rows         N/2 rows                        2 rows          2N bits
```

* `pp_gen` forms the `N` partial-product rows of an unsigned multiplication.
  Row `j` is `a AND b[j]`, shifted left `j` places in a `2N`-bit field.
* Each reduction level takes the rows four at a time. A `reduce_group`
  turns each group of four rows into two, so every level halves the row
  count. 8x8 needs two levels (8 -> 4 -> 2), 16x16 three, and 32x32 four.
  `N` must be a power of two from 4 to 32.
* `final_adder` adds the last two rows into the `2N`-bit product.

### How a group of four rows is reduced

This is the part that needs care. Partial-product rows are staggered, so
the number of bits in a column ranges from 0 to 4. The placement is decided
at elaboration, column by column from the least significant one, by the
functions in `dq_pkg`. For each row they track which bit positions can ever
be non-zero:

* **3 or 4 bits:** a 4:2 compressor. The bits present go to `x1, x2, x3,
  x4` in row order, and missing inputs are 0. `cin` is the `cout` of the
  compressor in the column below, if there is one. `sum` goes to output row
  S at this column. `carry` goes to output row C one column up. `cout` goes
  to the next column's `cin`.
* **Fewer bits, nothing arriving from below:** the bits (at most two) are
  wired straight to S and C.
* **Fewer bits, but a compressor or adder below has already filled this
  column's C slot:** a wire, half adder or full adder sums the bits and any
  incoming `cout`. It puts its sum in S and its carry one column up.

Adders are always exact. Only compressors have an approximate mode.

Which input a bit reaches matters in approximate mode: DQ1 keeps only `x1`
and `x4`. Filling from `x1` upward means a column's first bits are the ones
that survive. For 8x8 the tree holds 21 compressors, 3 full adders and
3 half adders. 16x16 holds 106 compressors, and 32x32 holds 468.

The published 8x8 dot diagram shows two stages of four-dot compressor boxes
and two-dot half-adder boxes, ending in two rows. The rule above gives that
shape, but the boxes were not copied position by position.

### Accuracy configuration

| parameter  | default | meaning                                                      |
|------------|---------|--------------------------------------------------------------|
| `N`        | 8       | operand width; product is `2N` bits                          |
| `LSB_TYPE` | `DQ_C1` | structure of the compressors in product columns `0 .. N-1`   |
| `MSB_TYPE` | `DQ_C4` | structure of the compressors in product columns `N .. 2N-1`  |

`dq_type_e` (in `dq_pkg`) also offers `DQ_EXACT`: a plain exact compressor
with no approximate mode, giving a conventional exact multiplier.

The inputs `exact_lsb` and `exact_msb` set the mode of the two halves at
run time. With both at 1, `p = a * b`. The defaults (DQ1 low, DQ4 high)
make the "mixed" configuration: the cheapest structure where errors weigh
least, the most accurate one where they weigh most. Placing the boundary
between column `N-1` and column `N` is this design's choice.

Results over all 65,536 operand pairs of the 8x8 multiplier. "Products
wrong" counts pairs where `p != a*b`; "mean rel. error" is `|p - a*b| / (a*b)`
averaged over all pairs.

| configuration                          | exact_msb | exact_lsb | products wrong | mean rel. error |
|----------------------------------------|-----------|-----------|----------------|-----------------|
| DQ4 high / DQ1 low (default)           | 1         | 1         | 0              | 0               |
| DQ4 high / DQ1 low (default)           | 1         | 0         | 96.4 %         | 0.063           |
| DQ4 high / DQ1 low (default)           | 0         | 1         | 75.0 %         | 0.084           |
| DQ4 high / DQ1 low (default)           | 0         | 0         | 96.9 %         | 0.128           |
| DQ1 both halves                        | 1         | 0         | 96.4 %         | 0.063           |
| DQ3 both halves                        | 1         | 0         | 83.8 %         | 0.035           |
| DQ4 both halves                        | 1         | 0         | 74.2 %         | 0.017           |

Timing: everything is combinational, with no clock, reset or pipeline
registers. `p` follows any change of `a`, `b` or a mode input after the
combinational delay, so mode changes take effect on the very next operand.

## Where this RTL departs from, or adds to, the published design

* Operands are unsigned. Signed multiplication is not covered.
* The column placement rule, the order bits are fed to `x1..x4`, the LSB/MSB
  boundary and the separate mode input per half are this design's choices.
* DQ3's approximate `sum` function is inferred, as described above.
* Tri-state output buffers are replaced by multiplexers. Power gating and
  its sleep transistors are left out: they have no logic function.
* The final adder is a plain `+`; its architecture is left to synthesis.
* Power and delay figures cannot be reproduced from RTL simulation, so they
  are not claimed here.

## Files

| file                                   | contents                                                    |
|----------------------------------------|-------------------------------------------------------------|
| `rtl/dq_pkg.sv`                        | `dq_type_e`, column-kind enum, elaboration-time planning functions |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | 1-bit adders                                              |
| `rtl/comp42_exact.sv`                  | exact 4:2 compressor                                        |
| `rtl/dq42c1.sv` .. `rtl/dq42c4.sv`     | the four dual-quality compressors                           |
| `rtl/dq42_cell.sv`                     | picks one compressor structure by parameter                 |
| `rtl/pp_gen.sv`                        | partial-product AND array                                   |
| `rtl/reduce_group.sv`                  | four rows to two                                            |
| `rtl/final_adder.sv`                   | carry-propagate adder                                       |
| `rtl/dq_dadda_mult.sv`                 | the multiplier (top)                                        |
| `tb/tb_ref_pkg.sv`                     | bit-level reference model of the multiplier                 |
| `tb/tb_*.sv`                           | one self-checking testbench per module                      |
| `tb/tb_dq_workloads.sv`                | 16x16, 32x32, the four 8x8 configurations, an exact-only 8x8 |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. For example, to run the full 8x8 test from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dq_pkg.sv tb/tb_ref_pkg.sv tb/tb_dq_dadda_mult.sv \
  --top-module tb_dq_dadda_mult -o sim
./obj_dir/sim
```

* `-Irtl -Itb` lets verilator find the other modules by file name.
* Swap in another `tb/tb_<name>.sv` and `--top-module tb_<name>` to run the
  other testbenches. Include `tb/tb_ref_pkg.sv` for
  `tb_dq_workloads` as well.
* `tb_dq_dadda_mult` runs in under a second.
* `tb_dq_workloads` takes about a minute to compile, because it holds a
  32x32 multiplier.

What the testbenches check:

* **Cells:** every cell is tested on all of its input patterns. Each
  dual-quality compressor is checked in both modes against its expected
  functions and error count. Each is also checked for returning to exact
  results after switching back from approximate mode.
* **Multiplier:** the 8x8 multiplier is checked in exact mode against
  `a * b`. In the approximate modes it is checked against `tb_ref_pkg`, a
  separately written bit-level model. That model applies the same placement
  rule, so it confirms the netlist matches that rule, not that the rule
  matches any other tree. The testbench also fails if an approximate mode
  never changes a product, or if switching back to exact never restores one.

## Changing the design

* **Another size or mix:** set `N`, `LSB_TYPE` and `MSB_TYPE`. The planning
  functions size everything, up to `N = 32`. For larger sizes raise `MAXW`
  and `MAXR` in `dq_pkg`.
* **A different compressor:** write a new `dq42cN`-style module, add it to
  `dq_type_e` and `dq42_cell`, and add its approximate function to
  `ref_comp` in `tb/tb_ref_pkg.sv`.
* **A different column rule:** edit `col_state`/`col_kind` in `dq_pkg`.
  `reduce_group` and `level_mask` follow automatically. Mirror the change
  in `tb_ref_pkg`.
