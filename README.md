# ANT multiplier with a fixed-width reduced-precision replica

A 12x12-bit unsigned multiplier built to keep working when its supply voltage
is lowered below the level at which its longest paths meet the clock period
(voltage overscaling). It uses *algorithmic noise tolerance* (ANT): the
full multiplier runs alongside a much smaller replica that only estimates the
top bits of the product. The replica is short enough to stay correct when the
main multiplier starts making timing errors. Whenever the main product is
further from the estimate than any correct product could be, the estimate is
output instead.

The replica here is a *fixed-width* multiplier. It multiplies the upper
6 bits of each operand and keeps only the upper 6 bits of that product.
Truncating that far loses a lot, so a small error-compensation circuit adds
back an input-dependent correction. The correction comes almost for free from
partial products that were dropped anyway. The main multiplier is a
column-bypassing array multiplier: it switches off the adders of every
array column whose multiplicand bit is zero.

```
            x[11:0] y[11:0]                      vos_err_mask (test only)
               |      |                                  |
          +----v------v----+                             |
          | input register |  (in_valid)                 |
          +--+----------+--+                             |
             |          | x[11:6], y[11:6]               |
   +---------v------+  +v----------------------+         |
   | column_bypass_ |  | fixed_width_rpr       |         |
   | mult  (main)   |  |  kept array columns   |         |
   | 24-bit ya      |  |  + rpr_comp_vector    |         |
   +---------+------+  +-----------+-----------+         |
             |  ya  XOR <----------|---------------------+
             v                     v yr (6 bits, weight 2^18)
          +--+---------------------+--+
          | ant_decision              |
          |  |ya - yr*2^18| > Th ?    |
          |   yes: y = yr*2^18, err=1 |
          |   no : y = ya,      err=0 |
          +-------------+-------------+
                        v
                 output register -> p[23:0], err_detected, out_valid
```

## Modules

| file | role |
|---|---|
| `rtl/ant_pkg.sv` | default width `ANT_N = 12`; `ant_threshold(N)`, which computes Th (455553 for N = 12) |
| `rtl/ant_multiplier.sv` | top: registers, main block, replica, decision |
| `rtl/column_bypass_mult.sv` | NxN carry-save array multiplier with column bypass |
| `rtl/cb_fa_cell.sv` | full adder plus bypass multiplexer, one per array cell |
| `rtl/fixed_width_rpr.sv` | the fixed-width replica: kept columns plus compensation |
| `rtl/rpr_comp_vector.sv` | the compensation bits C1..C6, including the conditional unit Cm |
| `rtl/ant_decision.sv` | distance test against Th and output selection |

Every module except `cb_fa_cell` takes the parameter `N` (even; default
12). `ant_multiplier` and `ant_decision` also take `TH`.

## The fixed-width replica and its compensation

Write x = xh*2^6 + xl and y = yh*2^6 + yl. The exact product is

    x*y = xh*yh*2^12 + (xh*yl + xl*yh)*2^6 + xl*yl

The replica only sees xh and yh. In the 6x6 array of xh*yh, the partial
product xh[i]&yh[j] has weight 2^(12+i+j). The replica keeps the columns
with i+j >= 6, i.e. weights 2^18 and up. Its 6-bit output yr is in units of
2^18: one replica LSB is 262144 product LSBs.

Everything else is lost: the lower columns of xh*yh and the whole cross and
low terms. That loss is always positive. It is also strongly tied to the
highest dropped column, i+j = 5, which has weight 2^17. Let beta be the
number of ones among that column's six partial products, and beta_l the
number of ones in the column below (i+j = 4, five products). Averaged over
uniformly distributed operands, the loss in replica LSBs is:

| case | mean loss (LSB) | pairs (xh,yh) |
|---|---|---|
| beta = 1 .. 6 | 1.31, 2.12, 3.00, 3.94, 4.93, 5.99 | 1458, 1215, 540, 135, 18, 1 |
| beta = 0, beta_l = 0 | 0.37 | 377 |
| beta = 0, beta_l > 0 | 0.74 | 352 |

So adding beta itself is a good correction. It costs no logic: each partial
product of the i+j = 5 column is fed into the lowest kept column as an extra
input bit, instead of being thrown away. The one case where beta is a poor
estimate is beta = 0 with a non-empty column below. There the mean loss is
above half an LSB, so one more unit is added. `rpr_comp_vector` produces six
bits, each of weight 2^18 (bit k-1 of `c` is C_k):

    C_k   = x[12-k] & y[5+k]                    k = 1..5   (column i+j = 5)
    Cm1   = NOR(C_1..C_5)                        beta = 0
    Cm2   = OR over k=1..5 of x[11-k] & y[5+k]   beta_l > 0 (column i+j = 4)
    Cm    = Cm1 & Cm2
    C_6   = (x[6] & y[11]) | Cm                  last product of column 5, or Cm

C_6 adds to beta the last product of that column. Cm1 does not need to
include that product: if it is 1, C_6 is already 1 and Cm changes nothing.
C_6 goes in at the bottom of the compensation inputs, so the Cm gates lie off
the replica's critical path.

`fixed_width_rpr` builds only the kept cells of the 6x6 array, organised
as a carry-save array like the main multiplier. In row j, the lowest kept
cell (j, 6-j) would take its carry from the dropped column i+j = 5. It gets
C_j instead, for j = 1..5. Those are exactly that column's partial products,
so they cost no extra gates. C_6 is the carry-in of the final ripple-carry
adder, at the bottom of the array. The output is therefore the sum of the
kept partial products plus C_1..C_6. For N = 12 that sum never exceeds 63,
so the final carry-out is always 0 and the 6-bit output cannot overflow.
The same holds for every even N from 8 to 16.

Measured over all operand pairs (`tb_fixed_width_rpr`), the mean absolute
error of the replica against the mean exact product is:

| replica | mean abs. error (LSB of 2^18) |
|---|---|
| truncation only | 1.742 |
| + beta (C_1..C_5 and x[6]&y[11]) | 0.341 |
| + Cm (this design) | 0.302 |

## Decision threshold

The decision must never replace a correct product. Th is therefore the
largest distance between any exact product and its replica estimate:

    Th = max over all x, y of | x*y - yr(x,y)*2^18 |

For a fixed (xh, yh) the estimate is fixed, and x*y grows with both xl and
yl. So the maximum lies at one of the four corners xl, yl in {0, 63}. For
N = 12 with the compensation above, Th = 455553, about 1.74 replica LSBs.
It is a design-time constant. The default of the `TH` parameter is
`ant_pkg::ant_threshold(N)`, a constant function that evaluates the
definition above at elaboration time, using a bit-level model of the
replica. If you change N, the threshold follows. If you change the
compensation logic, update `ant_pkg::rpr_model` to match. Elaboration takes
about a second at N = 12 and grows by 4x for each +2 on N.
`tb_fixed_width_rpr` recomputes Th independently from the replica's actual
outputs and compares the two.

A product at distance exactly Th is kept. As a result, an error-free output
is never replaced. Any output is within 2*Th of the exact product: a replaced
output is within Th of it, and a kept output is within Th of the estimate.

## Main block: column-bypassing array multiplier

`column_bypass_mult` is an N-row carry-save array. Row 0 is AND gates. Cell
(j,i) in row j >= 1 adds x[i]&y[j] to the sum from cell (j-1,i+1) and the
carry from cell (j-1,i). All cells of column i therefore share the
multiplicand bit x[i]. If x[i] = 0, no partial product in that column is
set. Row 0 makes no carries, so no carry ever enters that column either. The
cells there would just copy their sum input.

`cb_fa_cell` does exactly that. When x[i] = 0 it gates the adder's inputs to
zero, which stops the adder toggling. A multiplexer then passes the incoming
sum through, and the carry output is 0. The low product bits leave the array
at its right edge. A ripple-carry adder, which is not bypassed, merges the
last row's sums and carries into the upper N bits. The power saved grows with
the number of zero bits in the multiplicand x. Put the operand that is more
often sparse on `x`.

## Top-level interface and timing (`ant_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (the sampling period); asynchronous active-low reset |
| `in_valid` | in | 1 | capture `x`, `y`, `vos_err_mask` at this edge |
| `x`, `y` | in | N | unsigned operands; `x` drives the column bypass |
| `vos_err_mask` | in | 2N | XORed onto the main product; 0 in normal use |
| `out_valid` | out | 1 | `p` and `err_detected` hold a new result |
| `p` | out | 2N | ANT output |
| `err_detected` | out | 1 | the replica value was output |

Operands are registered on the edge where `in_valid` is high. The two
multipliers and the decision block then evaluate in the next cycle. The
result is registered on the following edge. `p` therefore appears two rising
edges after the operands. The design accepts one new pair per cycle, with no
backpressure. Reset clears the registers and the valid flags. The path
through the main multiplier is the one meant to fail under overscaling. The
replica and the decision logic must meet timing at the lowered supply.

### Emulating overscaling errors

Timing errors caused by a low supply cannot be produced by RTL simulation.
`vos_err_mask` stands in for them: its bits are XORed onto the main product
before the decision. It is registered with the operands. Tie it to zero in a
real implementation; synthesis then removes the XORs.

## Where this RTL makes its own choices

- **Interface.** Operands are unsigned. The registers, the 2-cycle latency,
  the valid handshake and the reset are this implementation's choices, as is
  the `vos_err_mask` error-emulation port.
- **Which partial products form the correction columns.** Both correction
  vectors are taken as whole columns of the replica array (i+j = 5 and
  i+j = 4). That gives the intended term counts (C_1..C_5 plus C_6) and the
  intended range of beta_l (0 to 3 when beta = 0).
- **When Cm fires.** Two readings of the original description are possible:
  "beta = 0 and beta_l > 0" or "beta = 0 and beta_l = 0". The gates described
  (an OR over the lower column) and the statistics above both support
  beta_l > 0, which is what is built. The other reading makes the replica
  worse: its mean absolute error would be 0.365 LSB instead of 0.302.
- **Structure.** The internal cell of the bypassing adder, the
  array organisation, the final ripple-carry adder and the replica's adder
  structure are all this design's own. The publication gives the bypass
  principle, the ANT architecture and the compensation logic, not these
  details.
- **Th.** Th was computed from its definition, as explained above. No number
  for it was published.

Area, power, the error rate under overscaling and the minimum supply voltage
cannot be evaluated at RT level and are not addressed here.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if it
hangs.

| testbench | what it checks |
|---|---|
| `tb_cb_fa_cell` | all 16 input combinations, add and bypass |
| `tb_column_bypass_mult` | 6x6 exhaustive; 12x12 corners, one-hot, sparse and random operands |
| `tb_rpr_comp_vector` | all 4096 (xh, yh) pairs against a bit-index model; Cm occurs |
| `tb_fixed_width_rpr` | all 4096 pairs against an arithmetic model; no overflow; Th; the loss statistics and precision table above |
| `tb_ant_decision` | distances Th and Th+1 on both sides for every yr, plus random pairs |
| `tb_ant_multiplier` | 200,003 pairs at the default size with idle gaps and injected errors; exact 2-cycle latency; clean products never replaced; output within 2*Th; every mechanism exercised |

With plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ant_pkg.sv tb/tb_ant_multiplier.sv --top-module tb_ant_multiplier -o sim
./obj_dir/sim
```

The same command works for the other testbenches if you swap in their
names. The full-size run takes a few seconds. In `tb_ant_multiplier`, 20% of
the samples get one high product bit (18..23) flipped, and 20% get random
errors in bits 0..11. With that mix, 31,662 outputs were replaced by the
replica value. Another 47,689 erroneous products stayed within Th of the
estimate and were passed on unchanged: these are mostly the low-bit errors
and single flips of bit 18, which is worth less than Th. The output SNR rises
from 9.4 dB without correction to 36.2 dB with it.
