# 8x8 accuracy-scalable approximate multiplier

This is an unsigned 8-bit by 8-bit multiplier for error-tolerant workloads
such as image processing, sensing or machine learning on small
battery-powered devices. It trades exactness for area and switching power in
two ways:

* **The partial products are compressed with OR/AND pairs instead of full
  adders.** Each pair produces an approximate sum and an error-recovery bit.
  Almost all of the error-recovery information is then merged with OR gates
  instead of being added.
* **The final addition has a carry chain that can be cut at run time.** A
  7-bit *carry-maskable adder* (CMA) covers the middle product columns. A
  7-bit `mask` input decides how many of its low bits propagate carries. The
  more bits are masked, the less accurate the product is and the less the
  carry chain switches.

Everything is combinational: there is no clock, no register and no reset. A
product is valid one combinational delay after `a`, `b` or `mask` changes.

## Column map

Think of the product as 16 columns, 15 down to 0. The datapath acts on these
columns in three steps:

```
step 1  pp_gen        8 rows of 8 AND partial products; row i sits at column i
step 2  atc_tree      3 rounds of iCAC groups  -> P7 (columns 14..0)
                                              -> Q1..Q7 (7 bits each)
        comp_vector   column-wise OR of Q1..Q7 -> V (columns 13..4)
step 3  columns 3..0    product = P7 bits, no addition
        columns 10..4   7-bit CMA:  P7 + V, carries controlled by mask
        columns 14..11  4-bit CPA:  P7 + V + CMA carry, exact
        column 15       carry-out of the CPA
```

| vector | columns | made from |
|---|---|---|
| P1..P4 | 2k .. 2k+8 (k = 0..3) | rows 2k and 2k+1 |
| Q1, Q2, Q3, Q4 | 1..7, 3..9, 5..11, 7..13 | the same groups |
| P5 / Q5 | 0..10 / 2..8 | P1, P2 |
| P6 / Q6 | 4..14 / 6..12 | P3, P4 |
| P7 / Q7 | 0..14 / 4..10 | P5, P6 |
| V | 13..4 | OR of every Q bit in the column |

Each merge of two vectors overlaps in exactly seven columns, so every
group is a row of seven iCACs. `lpsa_pkg::Q_LSB` holds the lowest column of
each Q vector.

## The incomplete adder cell and why the tree is exact until V

An iCAC (incomplete adder cell, `icac`) takes two bits `a` and `b` of the
same column. It returns `p = a | b` and `q = a & b`. Because
`(a | b) + (a & b) = a + b`, the pair loses nothing: `p` is an approximate
sum that keeps every 1 of its inputs, and `q` is what must be added back. So
a group of iCACs applied to two whole vectors gives `P = X | Y` and
`Q = X & Y` over the overlap. The sum of P7 and all seven Q vectors, each at
its own columns, is exactly `a * b`. The `atc_tree` testbench checks this for
all 65536 operand pairs.

The approximation is made only after the tree, in two places:

1. **OR-merging the recovery vectors.** Q bits are sparse: a bit is 1 only
   where both merged inputs were 1. So the seven vectors are combined with
   one OR gate per column instead of being added. A column where two or more
   Q bits are 1 loses value.
2. **Truncation.** Recovery bits in columns 3..1 are dropped. Columns 3..0
   of the product come straight from P7.

The result is always less than or equal to the exact product. For example,
with every mask bit exact:

* `255 * 255` gives 49135, against an exact 65025. Dense operands make the
  OR tree saturate.
* `200 * 100` gives exactly 20000.
* `13 * 11` gives 127, against an exact 143. Every error of this product
  comes from the truncated columns.

## Carry-maskable adder and the mask

`cma` is a one-bit adder with an enable. The enable port is called `maskb`,
the name of the cell's published symbol, but it is active-high:

* `maskb = 1`: the cell is a normal full adder.
* `maskb = 0`: the carry-out is forced to 0 and the sum is
  `(a | b) ^ cin`. In normal use the cell below a masked cell is masked too,
  so `cin` is 0 and the sum is just `a | b`.

`cma_chain` chains seven of these cells over columns 10..4. The top-level
`mask[i]` drives the cell of column `4 + i`. The intended settings are
thermometer codes: exact upper bits and masked lower bits. Then the masked
bits are OR-ed, no carry crosses into the exact part, and the exact part
together with the 4-bit CPA (`cpa_4bit`, a ripple-carry adder) adds the
upper columns correctly. `lpsa_pkg::MASK_W4 = 7'b1110000` is the setting
with four masked bits. Any other pattern is accepted, and the hardware then
does exactly what the cells do.

Mean relative error over all nonzero products (the top-level testbench
prints these numbers):

| masked CMA bits | mask | mean relative error |
|---|---|---|
| 0 | 1111111 | 2.53 % |
| 1 | 1111110 | 2.68 % |
| 2 | 1111100 | 2.99 % |
| 3 | 1111000 | 3.58 % |
| 4 | 1110000 | 4.65 % |
| 5 | 1100000 | 6.11 % |
| 6 | 1000000 | 7.98 % |
| 7 | 0000000 | 10.20 % |

For every operand pair, masking one more bit never increases the product.
The testbench checks this.

## Top-level interface (`lpsa_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 8 | multiplicand, unsigned |
| `b` | in | 8 | multiplier, unsigned |
| `mask` | in | 7 | CMA control; bit i covers column 4+i; 1 = exact |
| `results` | out | 16 | approximate product |

The sizes are fixed by the structure. The package `lpsa_pkg` names them:
operand width, the CMA at columns 10..4, the CPA at columns 14..11, and V at
columns 13..4. The compressor tree is wired for 8-bit operands. Only
`atc_merge` (one iCAC group) and `cma_chain` take width parameters.

## Files

| file | content |
|---|---|
| `rtl/lpsa_pkg.sv` | sizes, column positions, types, `MASK_W4` |
| `rtl/icac.sv` | incomplete adder cell |
| `rtl/atc_merge.sv` | one iCAC group merging two offset vectors |
| `rtl/pp_gen.sv` | AND partial-product array |
| `rtl/atc_tree.sv` | three-round approximate tree compressor |
| `rtl/comp_vector.sv` | OR-merged compensation vector V |
| `rtl/cma.sv`, `rtl/cma_chain.sv` | carry-maskable adder cell and 7-bit chain |
| `rtl/cpa_4bit.sv` | 4-bit exact adder |
| `rtl/lpsa_multiplier.sv` | top level |
| `tb/tb_ref_pkg.sv` | integer reference model (OR/AND on shifted rows) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. All of them
are exhaustive or close to it, and each runs in well under a second. For
example, from the project root:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb \
    rtl/lpsa_pkg.sv tb/tb_ref_pkg.sv tb/tb_lpsa_multiplier.sv \
    --top-module tb_lpsa_multiplier -o sim
./obj_dir/sim
```

The other testbenches build the same way; `-y rtl` lets verilator find the
submodules by file name. `tb_lpsa_multiplier`
runs the top at its only configuration:

* all 65536 operand pairs under each of the eight thermometer masks;
* 20000 random vectors with arbitrary mask patterns.

It also counts each mechanism of the design and fails if one never happens:

* a product changed by carry masking;
* the CMA carry into the CPA;
* the CPA carry into bit 15;
* a truncated recovery bit;
* an OR-merge loss.

## Where this RTL makes its own choices

* **The `mask` port.** The published top-level symbol shows only `a`, `b`
  and `results`. The `mask` port is added because the design is meant to
  be configured at run time. To fix the accuracy, tie `mask` to a constant
  such as `MASK_W4`. Synthesis then removes the unused carry logic.
* **Mask polarity.** The cell's description says that mask = 1 selects the
  full adder, but its symbol names the port `maskb`. This RTL follows the
  description, with 1 = exact, and keeps the symbol's name.
* **A masked cell with `cin = 1`.** The description only covers the case
  `cin = 0`. Here the carry-out stays 0 and the sum becomes `(a | b) ^ cin`.
* **Other choices.**
  * Operands are unsigned.
  * The CMA's own carry-in is 0.
  * The 4-bit CPA is a ripple-carry adder.
  * All cells are written as Boolean equations, not as individual gates.
* **Which recovery columns are dropped.** The design drops the lowest ones,
  columns 3..1, and keeps columns 13..4 in V.
* **Q7 in the OR-merge.** The last-round recovery vector Q7 is OR-merged
  together with Q1..Q6, as the published block diagram draws it.
* **Out of scope.** The comparison designs (a Wallace-tree multiplier and
  earlier approximate multipliers) are not included. The reported FPGA
  utilisation figures (Spartan-3E) and the power and area savings were not
  reproduced.
