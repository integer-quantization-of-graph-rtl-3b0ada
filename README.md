# Integer-only GraphSAGE inference with power-of-two rescaling

This design classifies every node of a small graph using a two-layer
GraphSAGE network in a fixed number of clock cycles. Its intended use is
real-time trigger firmware, where a decision must come within a hard
latency budget. Examples are finding tracks from the hits a muon leaves in
a detector, or a fixed-size citation subgraph used as a benchmark. The
whole network is unrolled in space:

* every multiply of every node is a separate multiplier;
* the pipeline takes a new graph on every clock;
* the result appears exactly **19 cycles** later (52.8 ns at a 360 MHz clock).

The arithmetic is integer-only. Features and weights are signed 8-bit
(INT8). Biases are 32-bit integers. Each change of scale between
quantisation domains is a power of two, so each rescale is a rounding right
shift with saturation rather than a multiplier.

## The network

| | layer 1 | layer 2 |
|---|---|---|
| input features | 16 (projected) | 24 |
| output features | 24 | 7 (class logits) |
| aggregation shift `S_beta` | 17 | 12 |
| linear shift `S_gamma` | 7 | 8 |
| activation | ReLU | none |

The graph has a fixed size of `N_NODES = 8`. A node with fewer real
neighbours simply has zeros in its adjacency row. Raw node features, such
as a 1433-dimensional bag of words, are first reduced to 16 values by a
linear projection. That projection happens **upstream** and is not part of
this RTL. The top takes the 16 INT8 projected features per node.

Each layer is a GraphSAGE layer with mean aggregation and **no root
(self) term**. A node's new embedding depends only on its neighbours. The
usual concatenation with the node's own previous embedding is left out.
This saves a second weight matrix per layer. If it is needed, it can be
added later as one more integer sum at the aggregation output.

## The integer datapath, step by step

For layer *l*, node *i*, feature *f* and output channel *o*:

1. **Aggregation** (`sage_aggregate`).
   `T[i][f] = sum_j A[i][j] * h[j][f]`.
   `A` is the adjacency matrix, row-normalised and scaled by `K = 2^12`.
   It is supplied as an input, one entry per node pair:
   `A[i][j] = round(4096 / deg(i))` if there is an edge from *j* into *i*,
   and 0 otherwise. The diagonal is 0 and an isolated node has an all-zero
   row. So `T / 4096` is the mean of the neighbours' features.
2. **Requantise the mean**.
   `hh[i][f] = sat8(R_{S_beta}(T[i][f]))`.
   The shift removes the factor 4096. It also converts from the input scale
   to the hidden scale.
3. **Linear step** (`sage_linear`).
   `a[i][o] = b[o] + sum_f hh[i][f] * w[o][f]`.
   The products are INT8 × INT8. The bias is already in the accumulator's
   integer domain.
4. **Requantise the output**.
   `h'[i][o] = sat8(rho(R_{S_gamma}(a[i][o])))`.
   `rho` is ReLU in layer 1 and the identity in layer 2.

The rounding shift (`po2_rescale`) is

    R_S(x) = (x + 2^(S-1)) >>> S

This is round to nearest, with exact halves rounded towards +infinity.
For example, `R_1(-3) = -1` and `R_1(3) = 2`. The ReLU acts on the shifted
value before saturation, and `sat8` clamps to [-128, 127].

The shift amounts come from the quantisation scales of a trained model. Each
real scale factor is replaced by the nearest power of two. That costs at
most a factor of sqrt(2) in scale accuracy and removes every rescaling
multiplier. The layer-2 aggregation shift is exactly 12, because there the
only scale to undo is `K`. The four shifts are parameters of
`graphsage_top` (`BETA1_SHIFT`, `EFF_SCALE1_SHIFT`, `BETA2_SHIFT`, `EFF_SCALE2_SHIFT`). A different trained model
needs new values for them, and new weights and biases.

### Widths

Signal widths follow a rule from a profiling pass: `B = ceil(log2(m+1)) + 1 + 2`.
Here `m` is the largest magnitude the signal can reach, `+1` is the sign bit
and `2` is a safety margin.

* **Adjacency entries:** `m = 4096`, so `A_W` = 16 bits.
* **Aggregation sum:** this design uses the worst case `7 * 4096 * 127`,
  so `T_W` = 25 bits. The 7 is the most neighbours a node can have in an
  8-node graph.
* **Linear accumulator:** kept at 32 bits. Its bound depends on the size of
  the trained biases, which is not fixed here.

If a profiled model shows smaller bounds, narrow `T_W` and `ACC_W` in
`gnn_pkg`.

## Pipeline and timing

```
 valid_i ─► input reg ─► [ layer 1: 9 cycles ] ─► [ layer 2: 9 cycles ] ─► logits_o, valid_o
   (1)                     agg 4 + linear 5          agg 4 + linear 5        label_o (combinational)
```

| stage | cycles |
|---|---|
| input register | 1 |
| aggregation: products | 1 |
| aggregation: 8-term adder tree, 4 terms per stage | 2 |
| aggregation: rescale register | 1 |
| linear: products and bias | 1 |
| linear: 17- or 25-term adder tree, 4 terms per stage | 3 |
| linear: rescale register | 1 |
| **total for two layers** | **19** |

The split into stages is this design's own choice, set by the adder-tree
radix `TREE_RADIX = 4` in `gnn_pkg`. It reproduces the 19-cycle total
latency of the reference implementation, whose internal stage split is not
known. Changing the radix changes the latency. For the default sizes,
`gnn_pkg::tree_stages()` gives the stage count of each tree.

### Handshake and reset

* There is one `valid` bit per graph and no back-pressure, since the pipeline
  accepts a graph every cycle.
* The adjacency matrix travels through each layer in a delay line. Layer 2
  therefore sees the same graph as the features it receives.
* `rst_n` is synchronous and active low. It clears only the valid chain, so
  graphs in flight are dropped. Datapath registers are not reset.
* Weights and biases are ports and are sampled in the product stages.
  Treat them as constants: change them only while the pipeline is empty.
  In an FPGA build they would be tied to the trained values.

### Outputs

* `logits_o[n][c]`: the INT8 logits for node *n* and class *c*.
* `label_o[n]`: the index of the largest logit, which is also the class a
  softmax would rank first. On a tie the lowest index wins.
* `label_o` is combinational from the output register, so it is valid in
  the same cycle as `logits_o`.

## Files

| file | contents |
|---|---|
| `rtl/gnn_pkg.sv` | sizes, shift constants, width rule, INT8/adjacency/bias types, adder-tree stage functions |
| `rtl/po2_rescale.sv` | `sat8(rho(R_S(x)))`, combinational |
| `rtl/adder_tree_pipe.sv` | pipelined signed adder tree, `RADIX` terms per stage |
| `rtl/sage_aggregate.sv` | adjacency-weighted neighbour sum and rescale, all nodes and features in parallel |
| `rtl/sage_linear.sv` | INT8 matrix-vector product with bias and rescale |
| `rtl/sage_layer.sv` | aggregation, then linear step, plus the adjacency delay line |
| `rtl/class_argmax.sv` | per-node class decision |
| `rtl/graphsage_top.sv` | input register, two layers, argmax |
| `tb/gnn_ref_pkg.sv` | reference model of the integer arithmetic, plus coverage counters |
| `tb/tb_*.sv` | one self-checking testbench per module, except for the adder tree, which is tested inside the aggregation and linear stages |

## Simulation

Every testbench checks itself against `tb/gnn_ref_pkg.sv`. That model
computes the same integer network with floor division instead of shifts.
Each testbench prints `TB_RESULT checks=N failures=M`. To run the
end-to-end test at full size, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/gnn_pkg.sv tb/gnn_ref_pkg.sv tb/tb_graphsage_top.sv \
  --top-module tb_graphsage_top
./obj_dir/Vtb_graphsage_top
```

`-y rtl` lets Verilator find each module in the file of the same name.
To test another module, replace `tb_graphsage_top` with `tb_<module>`.
Building takes about half a minute, and the run takes well under a second.

`tb_graphsage_top` runs the default configuration with no parameter
overrides, using random weights and 200 random graphs. It checks every logit
and label, and it checks the 19-cycle latency of every graph. At the end it
requires that each of these happened at least once:

* a half-way rounding case;
* a ReLU clamp;
* saturation at +127 and at -128;
* an isolated node;
* back-to-back graphs and idle cycles;
* a tie between labels;
* a reset with graphs in flight.

The testbenches for the single modules also check the latency of each
stage: 4 cycles for aggregation, 5 for the linear step and 9 for a layer.

## Limits and departures

* **Trained model.** The weights, biases and profiled signal bounds of a
  trained model are not part of the RTL. The testbenches use random
  weights, so they check the arithmetic, not classification accuracy. The
  reference implementation reached 75.0 ± 1.1 % on its benchmark.
* **Upstream steps.** The input projection (1433 → 16) and the building
  and normalising of the graph (edges, `round(4096/deg)`) are done upstream.
  The RTL takes their results as inputs.
* **Accumulator widths.** `T_W` uses a worst-case bound. `ACC_W` keeps 32
  bits because no profiled bound is available. Both are safe but wider
  than a profiled design would be.
* **Resources.** All 2560 adjacency products and 4416 weight products are
  written as plain `*`. Whether an FPGA tool puts them in DSP slices or in
  LUT fabric is left to the tool and its settings. For example, narrow
  multiplies can be forced into LUTs to save DSP slices.
* **Sizes.** The graph size and feature counts are parameters. Other sizes
  work as long as the worst-case aggregation sum fits in `T_W`.
