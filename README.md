# Dynamic-routing accelerator for a capsule network

A capsule network replaces the scalar neurons of a CNN's last layers with
*capsules*: small vectors whose direction encodes the pose of a feature and
whose length encodes the probability that it is present. Between the primary
capsule layer and the ten digit capsules of an MNIST classifier sits
**routing by agreement**, an iterative loop in which every input capsule
distributes its vote among the digit capsules according to how well its
prediction agrees with their current output. In a software profile this loop
is the most expensive part of inference, so this design moves exactly that
loop into hardware. Convolution, the primary capsules and the training
losses stay in software; the hardware receives the prediction matrix
`u_hat` and returns the length of each digit capsule. The longest capsule is
the recognised digit.

The default configuration routes 31 input capsules to 10 digit capsules of
16 dimensions, i.e. a `u_hat` matrix of 160 × 31 words, with two routing
passes.

## The algorithm that is built

With logits `b[j][i]` (input capsule `i`, digit capsule `j`), initially 0:

```
repeat ITERS times:
    c[j][i] = 2^b[j][i] / sum_k 2^b[k][i]          softmax over the digit capsules
    s_j     = sum_i c[j][i] * u_hat_j|i            weighted vote (16-vector)
    v_j     = s_j * |s_j| / (1 + |s_j|^2)          squash: length in [0, 1)
    if not the last pass:
        b[j][i] += u_hat_j|i . v_j                 agreement raises the logit
result: |v_j| for j = 0..9
```

Two points differ from the textbook formulation:

* **`2^b` instead of `e^b`.** Trained networks give logits that are close to
  zero almost everywhere, so the change of base does not change which digit
  wins, and a power of two is a shift plus a small table.
* **A loop flag instead of a general iteration count in the original
  flowchart.** The flag is 0 on the first pass, is set by the logit update,
  and sends the second pass to the length computation. It gives exactly two
  passes. Here it is a pass counter with `ITERS = 2` as the default, so other
  counts are possible.

## Data layout and number format

`u_hat` is stored as **160 rows × 31 columns**. Row `r = j*16 + d` holds
dimension `d` of digit capsule `j`; column `i` is input capsule `i`. Every
step works on this grid or on a reshaped view of it:

| step (state) | result | shape |
|---|---|---|
| Softmax | `c[j][i]` | 10 × 31 |
| Replication_1 | `crep[r][i] = c[r/16][i]`, the coefficients copied onto the rows of `u_hat` | 160 × 31 |
| Dot_Pro | `s[r] = sum_i crep[r][i] * u[r][i]` | 160 |
| Replication_2 | `n2[j] = |s_j|^2`, shared by the 16 rows of capsule `j` | 10 |
| Squashing | `v[r] = s[r] * sqrt(n2[j]) / (1 + n2[j])` | 160 |
| Reshaping | `vm[j][d] = v[j*16+d]` | 10 × 16 |
| Update_b | `b[j][i] += sum_d u[j*16+d][i] * vm[j][d]` | 10 × 31 |
| MAG | `mag_v[j] = |vm[j]|` | 10 |

The names Replication_1, Replication_2 and Reshaping come from the original
flowchart, which names these steps without defining them. The meanings in
the table are this design's reading: they are the data movements that the
other steps need between the row view (160) and the capsule view (10 × 16).

All values are 32-bit fixed-point words with **16 fractional bits**; a word
times 2^-16 is its real value. `u_hat`, `b`, `s` and `v` are signed (Q15.16);
coupling coefficients and lengths are unsigned (Q16.16). For example, an
output word of 62881 means a capsule length of 0.9595. Internally, squared
lengths keep all 32 fractional bits and the squash scale factor keeps 32
fractional bits, so that a length or a squashed element is correct to about
one LSB. Products are summed exactly; results are truncated towards minus
infinity and saturated to 32 bits. None of these rounding and saturation
rules come from the original description.

## Schedule and timing

`routing_ctrl` runs the flowchart one step per clock cycle, and each step is
computed **fully in parallel**: 31 softmax units (10 power-of-two units and
10 dividers each), 160 row dot products of 31 terms, 10 squash units, 310
logit-update dot products of 16 terms and 10 length units. This mirrors the
original design, which was written as a behavioural model and left the
number of adders, multipliers and dividers to the synthesis tool.

```
IDLE -start-> SOFTMAX -> REP1 -> DOT_PRO -> REP2 -> SQUASH -> RESHAPE
                 ^                                              |
                 +------------ UPDATE_B <------- flag = 0 ------+
                                                 flag = 1 ------+-> MAG -> DONE
```

`done` rises **7 × ITERS clock edges** after the edge that samples `start`
(14 cycles for two passes). The original implementation reports 32 cycles
(650 ns) for its own schedule, whose states are not documented; this design
does not reproduce that number. No clock frequency is built in. The original
gives 100 MHz in one place and 20 ns per cycle in another, and these two
figures conflict.

The price of one cycle per step is combinational depth and area. The
critical paths are the 31-term dot products and the 64-bit and 81-bit
dividers in the softmax and squash units. A version for a real FPGA clock
would need these steps pipelined or spread over several cycles.

## Interface (`capsnet_routing`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset: controller to idle, `mag_v` to 0 (the `u_hat` store keeps its contents) |
| `start` | in | 1 | level; sampled while idle |
| `u_we`, `u_row`, `u_col`, `u_wdata` | in | 1, 8, 5, 32 | write one `u_hat` word (row `j*16+d`, column `i`, signed Q15.16). Ignored while a run is busy or done is held |
| `busy` | out | 1 | a run is in progress |
| `done` | out | 1 | results valid; held until `start` falls, then back to idle |
| `mag_v` | out | 10 × 32 | length of each digit capsule, unsigned Q16.16 |

Usage: load all 4960 words of `u_hat`, raise `start`, wait for `done`, read
`mag_v`, take the index of the largest value as the digit, and drop `start`.
The logits are cleared when a run starts, so runs are independent.

Parameters: `N_IN` (31), `N_OUT` (10), `DIM` (16), `ITERS` (2). The address
widths follow from them.

## Files

| file | content |
|---|---|
| `rtl/capsnet_pkg.sv` | sizes, word types, saturation helper |
| `rtl/capsnet_routing.sv` | top: `u_hat` store, state registers, replication and reshaping, instances of all units |
| `rtl/routing_ctrl.sv` | flowchart controller, loop flag, start/done handshake |
| `rtl/softmax_unit.sv` | `2^b` softmax of one input capsule |
| `rtl/pow2_q16.sv` | `2^x`: shift by the integer part, 17-entry table `round(65536·2^(k/16))` with linear interpolation for the fraction (error below 0.02 %) |
| `rtl/dot_pro_unit.sv` | one row of the weighted sum |
| `rtl/norm2_unit.sv` | squared length of a 16-vector (Replication_2, and inside MAG) |
| `rtl/squash_unit.sv` | squash of one capsule |
| `rtl/sqrt_unit.sv` | integer square root, digit by digit, unrolled |
| `rtl/update_b_unit.sv` | one logit update |
| `rtl/mag_unit.sv` | length of one capsule |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each unit's testbench compares it against values computed independently in
the testbench. Exact integer references are used for the dot products, the
squared length and the square root. Real-valued references with stated
tolerances are used for `2^x`, the softmax, the squash and the length.
`tb_routing_ctrl` checks the exact step sequence and latency for two and
three passes, the handshake and reset.

`tb_capsnet_routing` builds ten synthetic `u_hat` matrices (parameter
`IMAGES`) and runs them one after another. In each, the
predictions for one target digit agree across all input capsules and the
others are random. It loads each matrix through the write port and checks
four things:

* the cycle count;
* every capsule length against a real-valued model of the same algorithm, to
  within 2·10^-3;
* that the longest capsule is the target;
* the done/start handshake.

It also counts the mechanisms it exercised: the update branch, the length
branch, restarts and a write ignored while busy. It fails if any of them
never happened.

By default this testbench uses a reduced size (8 input capsules, 6 digit
capsules of 8 dimensions). At the full 160 × 31 size the fully parallel
datapath turns into about 36 MB of C++, which takes verilator over ten
minutes to build on one core. The full size has been simulated with four
images, and it passed with the lengths matching the model. To rerun it, set
the testbench parameters:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_capsnet_routing \
    -GN_IN=31 -GN_OUT=10 -GDIM=16 rtl/capsnet_pkg.sv tb/tb_capsnet_routing.sv
./obj_dir/Vtb_capsnet_routing
```

Any other testbench runs the same way: name it as `--top-module`. Each
prints `TB_RESULT checks=N failures=M`.

No real MNIST prediction matrix is included, so the design has not been
checked against a trained network's output. The checks are against the
algorithm, not against reference classification results.

## Departures from the original design

* Latency is 14 cycles instead of the reported 32, because every step is
  scheduled in one cycle.
* `2^x` uses a table with interpolation, and the square root is a
  digit-by-digit root. The original takes both from elsewhere without giving
  their structure.
* The flowchart's Replication_1, Replication_2 and Reshaping steps are given
  the meanings in the table above.
* The logit update is `b[j][i] += u_hat_j|i · v_j`. The printed update reads
  `b_i` on the right-hand side, which is taken to be `b_ij`.
* The `u_hat` load port, the start/done handshake, reset behaviour, rounding
  and saturation are this design's own choices.
* Not built: the primary-capsule and convolution layers, and the training
  losses. They run in software.
