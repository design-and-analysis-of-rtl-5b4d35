# Approximate 4:2 compressor for low-power multipliers

In a multiplier, most of the area and power goes into summing the partial
products: a tree of counters reduces each column of equal-weight bits until
only two rows are left for the final adder. The 4:2 compressor is the usual
building block of that tree. An exact one takes four column bits plus a
carry-in and produces a sum, a carry and a carry-out, because a count of up to
five needs three output bits.

This design drops the carry-in and carry-out entirely. The cell takes four
bits A1..A4 and returns only SUM (weight 1) and CARRY (weight 2), so it can
report at most 3. It gives up exactness on five of the sixteen input patterns
in exchange for six simple gates and a two-level path to SUM. Applications
that tolerate small arithmetic errors, such as image processing or neural-network
inference, can use it in the less significant columns of a multiplier.

## The logic

```
CARRY = A1 | A2
SUM   = (A1 & A2) | (A3 & A4) | (~A1 & ~A2 & (A3 | A4))
```

CARRY only looks at the first pair. SUM is then chosen so that `2*CARRY + SUM`
comes as close as possible to the true count while staying cheap:

| A1 A2 | CARRY | SUM            | what `2*CARRY + SUM` gives                   |
|-------|-------|----------------|----------------------------------------------|
| 0 0   | 0     | A3 \| A4       | 0 or 1. For A3 = A4 = 1 the true count is 2 |
| 0 1, 1 0 | 1  | A3 & A4        | 2 or 3. Exact unless A3 = A4 = 0 (true count 1) |
| 1 1   | 1     | 1              | always 3. True count is 2, 3 or 4            |

## Error behaviour

Read `2*CARRY + SUM` against the number of ones in A1A2A3A4:

| A1A2A3A4 | true count | result | error |
|----------|-----------:|-------:|------:|
| 0011     | 2          | 1      | -1    |
| 0100     | 1          | 2      | +1    |
| 1000     | 1          | 2      | +1    |
| 1100     | 2          | 3      | +1    |
| 1111     | 4          | 3      | -1    |

All other eleven patterns are exact. The error is never more than one unit in
the column's weight. With uniformly random inputs the error rate is 5/16 and
the mean error distance is 5/16. Three errors overestimate and two
underestimate, so the mean error is +1/16, and errors partly cancel across
columns.

The pair A1/A2 and the pair A3/A4 are not interchangeable. In a multiplier, put
the bits that are least often 1 on A1 and A2, because one of those bits alone
already makes the cell report 2.

## Gate structure

`approx_comp42` builds the function from the gates of the published schematic.
The internal node names are kept:

- `c3 = A1 & A2`
- `c4 = A3 & A4`
- `c5 = A3 | A4`
- `wide_and0 = c5 & ~A1 & ~A2`
- `sum = c3 | wide_and0 | c4`
- `carry = A1 | A2`

After synthesis the cell has 4 AND, 4 OR and 2 NOT word-level cells.
CARRY is one gate level deep and SUM two levels deep. There is no clock and no
reset.

## Where this RTL departs from the published description

- **SUM for A1 = A2 = 1.** The published truth table gives SUM = 0 for the
  inputs 1100 and 1101. The published equation for SUM (a term A1·A2) and the
  published list of erroneous inputs (which names 1100 and not 1101) both give
  SUM = 1 there. This RTL follows the equation and the error list. So 1100 is
  the inexact pattern, and 1101 is exact.
- **Third SUM term.** The third term is implemented as
  `~A1 & ~A2 & (A3 | A4)`. The published table needs this term for SUM = 1 at
  0001, 0010 and 0011. The schematic's three-input AND feeds on `A3 | A4` and
  on the first pair.
- **Bit order on the bus.** The schematic has a single 4-bit input bus X.
  `approx_comp42_top` maps A1 = x[3], A2 = x[2], A3 = x[1], A4 = x[0]. Under
  this mapping the schematic's CARRY gate, which takes bits 2 and 3, is
  A1 | A2. The pattern A1A2A3A4 read as a binary number is then x.
- **No multiplier.** The cell is meant for an approximate multiplier, but the
  multiplier itself was not specified: not its width, not its reduction tree
  and not where exact and approximate compressors go. It is not included.
  To build one, instantiate `approx_comp42` in the columns of a Dadda or
  Wallace tree.
- **Power.** The cell's power advantage was measured on an FPGA: 3.43 mW core
  dynamic power against 3.52 mW and 3.54 mW for two earlier approximate
  compressors, with equal static and I/O power. Simulation cannot reproduce
  these figures.

## Files

| file | contents |
|------|----------|
| `rtl/approx_comp42.sv` | the compressor cell, ports `a1 a2 a3 a4 -> sum carry` |
| `rtl/approx_comp42_top.sv` | top level: the cell behind a 4-bit bus `x[3:0]`, outputs `sum`, `carry` |
| `tb/tb_approx_comp42.sv` | cell test: full truth table plus random patterns, and a check that exactly the five listed patterns are inexact, each by at most 1 |
| `tb/tb_approx_comp42_top.sv` | end-to-end test: exhaustive sweep plus 2000 random inputs. Checks error count, total error distance and the over- and under-estimate split. Also checks that exact, over-estimate, under-estimate and all-ones-saturation cases all occur |

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends the run with a failure if it hangs.

## Simulating

Both testbenches use the `--timing` delays of Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_approx_comp42_top tb/tb_approx_comp42_top.sv
./obj_dir/Vtb_approx_comp42_top

verilator --lint-only -Wall -y rtl +libext+.sv rtl/approx_comp42_top.sv
```

The cell is purely combinational, so each run takes well under a second.

## Changing it

To try another approximation, edit the `always_comb` block of
`approx_comp42.sv`. Then update the three constants at the top of
`tb_approx_comp42.sv`: `SUM_REF`, `CARRY_REF` and `ERR_SET`. Bit *i* of each is
the value for the input pattern whose binary value is *i*. Also update
`ref_value` and the expected counts in `tb_approx_comp42_top.sv`.
