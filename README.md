# Threshold neurons by difference cuts

A threshold neuron fires when the weighted sum of its inputs reaches a
threshold: `y = 1` if `w_1 x_1 + ... + w_n x_n >= theta`. The usual hardware
forms every product, adds them all with an adder tree or a
multiply-accumulate loop, and only then compares the sum with `theta`. This RTL
takes a different route. It never adds the products one by one. It peels the
whole array of products down in layers called *difference cuts*, and it
can stop as soon as enough of the sum has been peeled off to pass the
threshold. A neuron whose inputs are clearly above threshold answers in a few
clock cycles. A neuron near or below threshold takes longer. Each neuron of a
layer finishes on its own schedule.

The same cuts also give, at no extra cost, the full sum, the products sorted
in ascending order, and the original products rebuilt from the cuts. That is
why the element is called multifunctional.

## The method

Start with the array of products `A_0 = {a_1, ..., a_n}`, all unsigned. In
each cycle `j`:

1. `q_j` is the smallest element that is still above zero.
2. `b_j` is the number of elements still above zero.
3. `q_j` is subtracted from each of those elements. At least one element
   reaches zero: the smallest one, plus every element equal to it.
4. The partial sum `S_j = q_j * b_j` is what this cut removed from the array.

The partial sums add up to the sum of `A_0`, because each element loses
exactly its own value, spread over the cuts in which it was still non-zero.
Example, `A_0 = {3, 5, 5, 0}`:

| cut | q | b | array after | S_j | running S |
|-----|---|---|-------------|-----|-----------|
| 1   | 3 | 3 | {0, 2, 2, 0} | 9  | 9  |
| 2   | 2 | 2 | {0, 0, 0, 0} | 4  | 13 |

The number of cuts equals the number of distinct non-zero values. It is never
more than `n`, and it is fewer when values repeat. The two equal 5s above
vanish in one cut.

**Threshold test.** Keep `Delta_j = theta - (S_1 + ... + S_j)`, starting from
`Delta_0 = theta`. The neuron fires at the first cut where `Delta_j <= 0`.
With `theta = 8`, the example above fires after cut 1 (`9 >= 8`) and never
needs cut 2. If the array runs out with `Delta > 0`, then `y = 0`.

**Sorting.** An element that reaches zero in cut `j` had the original value
`q_1 + ... + q_j`. Writing that value into the next free places of an output
array, cut after cut, gives the elements in ascending order. In the example,
the 0 goes first, then 3, then 5 and 5.

**Restoring.** If each element adds up the `q_j` it saw while it was still
non-zero, it ends up holding its own original value.

## Hardware structure

```
                 x[N], w[M][N], theta, mode, start
                              |
  neural_layer   +------------+-------------+------ ... (M neurons)
                 v                          v
  neural_element: mult_line --(a_i0 = w_i x_i, registered)--> dc_processor
                                                                  |
  dc_processor:   stage 1                          stage 2        |
     N x dc_cell --a, f--> dc_min --q_j--+       dc_thresh        |
        ^   |               dc_count b_j-+--reg--> S_j = q_j b_j   |
        |   +--zeroing--> dc_count z_j   |         S += S_j        |
        +------------- q_j broadcast ----+         Delta -= S_j -> fire
                         sorted-array writer (Q_j = q_1+...+q_j)
```

| module | role |
|--------|------|
| `dc_pkg` | default sizes and the `dc_mode_e` enum |
| `mult_line` | N unsigned multipliers, products registered on `en` |
| `dc_cell` | one element: holds `a_i`, subtracts `q_j` while non-zero, flags `f` (still non-zero) and `zeroing` (`a == q_j`), keeps the restore sum |
| `dc_min` | binary tree giving the minimum of the elements whose flag is set |
| `dc_count` | ones counter; used for `b_j`, for the number of elements reaching zero and for the zeros of `A_0` |
| `dc_thresh` | second pipeline stage: `S_j`, `S`, `Delta`, the firing test |
| `dc_processor` | cells, tree, counters, threshold stage, sorted-array writer and control |
| `neural_element` | `mult_line` followed by `dc_processor` |
| `neural_layer` | top: M neural elements sharing `x`, `theta` and `mode` |

**The two-stage pipeline.** Stage 1 is the cut itself: the cells, the minimum
tree and the counters. It is the long combinational path (an N-input minimum
tree followed by a subtractor). `q_j` and `b_j` are registered. In the next
cycle stage 2 multiplies them, updates `S` and `Delta` and tests
`Delta <= 0`, while stage 1 already works on cut `j+1`. When stage 2 fires
in threshold mode, the cut that stage 1 would take in that same cycle is
suppressed. The reported cut count is therefore the number of cuts the
decision needed. The cells are left holding the cut that made it.

**Elements that have reached zero.** The method, as usually written, lets
spent elements go negative and counts only the non-negative ones. Here a
cell keeps an "above zero" flag instead and ignores further cuts once it is
zero. Elements that are zero in `A_0` (a zero input or weight) never take part
and cost no cycle.

## Interface and timing

`neural_layer` ports (defaults `M = 4`, `N = 24`, `XW = WW = 8`, so element
width `AW = 16`, count width `CW = 5`, sum width `SW = 21`):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: capture `x`, `w`, `theta`, `mode` |
| `mode` | in | `dc_mode_e` | `MODE_THRESHOLD` or `MODE_FULL` |
| `x` | in | N x XW | input vector, unsigned |
| `w` | in | M x N x WW | weight rows, unsigned |
| `theta` | in | SW | threshold |
| `busy`, `done`, `valid`, `y` | out | M | per neuron: running, one-cycle end pulse, result held, output |
| `all_done` | out | 1 | every neuron holds a valid result |
| `sum` | out | M x SW | running sum `S` at the end of the run |
| `n_cycles` | out | M x CW | cuts used |
| `sorted`, `restored` | out | M x N x AW | sorted products, rebuilt products |

Timing, counted in rising clock edges after the edge that samples `start`:

* `neural_element` / `neural_layer`: `done[i]` is high after edge
  `n_cycles[i] + 2`. One edge registers the products, `n_cycles` edges perform
  the cuts, and one edge is the threshold stage.
* `dc_processor` alone: `done` is high after edge `n_cycles + 1`.

`n_cycles` ranges from 0 (all products zero) to N. Results stay valid until
the next `start`. A new `start` may be given at any time and restarts the
run. Inputs need only be stable in the cycle `start` is high.

**Modes.**

* `MODE_THRESHOLD` stops at the first cut with `Delta <= 0`, or when the
  array is empty. `y` is always right. `sum`, `sorted` and `restored` are only
  complete if the run went through every cut. A neuron that fires early
  reports only the partial sum that reached `theta`.
* `MODE_FULL` runs every cut. `sum` is the full dot product,
  `y = (sum >= theta)`, `sorted` holds the products in ascending order and
  `restored` holds them in input order.

`theta = 0` makes every neuron fire on its first cut (or at once, for an
all-zero array).

## Sizes and what they can hold

`N = 24` is the largest array size in the method's published cycle-count
study, which used arrays of 6 to 24 elements with mean 500, standard
deviation 30 to 150 and `theta = 500 n`. All of these fit the default
processor: 16-bit elements, a 21-bit sum, and unused cells loaded with 0.
`tb_dc_workload` repeats that study. With 40 random arrays per point, it
measures an average of about 5 cuts for `n = 6` and about 19 to 22 for
`n = 24`. That is fewer than the `n` additions of a sequential sum.

Equal elements save cuts. A full run takes exactly `n - sum_r (m_r - 1)` cuts,
where `m_r` is the multiplicity of each repeated value. The second part of
`tb_dc_workload` checks this formula. It also rounds the same `n = 24`,
sigma = 90 arrays to multiples of 20, which creates many ties. The
threshold runs then need about 44 % fewer cuts. The saving depends entirely
on how many equal values the data holds. The method's own study reported
savings of 10 to 30 % from equal operands, on data whose tie density is not
stated.

`M = 4`, the 8-bit input and weight widths and the 16-bit product are choices
of this RTL; the method fixes none of them. All are parameters. `SW` and `CW`
follow from `N` and `AW`.

## Where this RTL departs from, or goes beyond, the method

* **Broadcast, not systolic.** The recursion lends itself to a linear
  systolic array, but no such structure is specified. Here every cell sees
  `q_j` in the same cycle through a minimum tree. The critical path therefore
  grows with `log2 N` compare stages.
* **Unsigned operands only.** Negative weights or inputs are not handled.
  The method is presented, and was evaluated, with non-negative elements.
* **The handshake, the two modes, the reset style and all widths** are this
  design's own choices.
* **The sorted-array writer and the restore registers** are one way of
  realising two uses of the cuts that are only named in the method.
* **No timing target.** The method was once implemented on a CPLD with a
  worst-case threshold time of 0.23 us. At most 26 cycles per neuron
  (N = 24), that corresponds to a clock of roughly 113 MHz. The RTL makes
  no claim about any device.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. The unit testbenches compute their
expected values inline. From `tb_dc_processor` upward, the testbenches compare
against `dc_ref_pkg`, a reference model that derives the results from the distinct
values of the array (sorting), not by simulating cuts.

| testbench | what it covers |
|-----------|----------------|
| `tb_dc_count`, `tb_dc_min` | random and corner vectors, two sizes each |
| `tb_dc_cell` | random legal cut sequences; a zero cell ignoring steps; restore |
| `tb_dc_thresh` | random `(q, b)` streams, `theta = 0`, the exact `Delta = 0` boundary |
| `tb_mult_line` | extremes and random operands; hold with `en` low |
| `tb_dc_processor` | both modes; ties, zeros, all-zero arrays, `theta` from 0 to above the sum; exact latency |
| `tb_neural_element` | products into the processor, both modes, latency `n_cycles + 2` |
| `tb_neural_layer` | end to end at default parameters; counts early stops, full runs, firing and non-firing neurons, ties, zero products, neurons of one operation finishing at different times, and mode switches, and fails if any never occurs |
| `tb_dc_workload` | the 6..24 x sigma 30..150 cycle-count study, with every result checked; the cut-count formula for equal elements and the saving from ties |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dc_pkg.sv tb/dc_ref_pkg.sv tb/tb_neural_layer.sv --top-module tb_neural_layer
./obj_dir/Vtb_neural_layer
```

Replace the last file and the top name to run another testbench. Every
testbench finishes in well under a second. `dc_processor` carries
assertions, active with `--assert`, for its handshake and its cut rule:

* `done` is a one-cycle pulse, comes with `valid` and ends `busy`.
* `valid` and `busy` are never high together.
* A cut is only taken while some element is non-zero, and at least one
  element reaches zero in it.
