# Multiclass random-forest inference engine

This RTL classifies a sample with a random forest. A sample is a vector of
feature values. The forest is a set of decision trees, and the class that
most trees choose wins. The defaults fit a network-intrusion task: 78
features per network flow, 15 classes (benign traffic and 14 kinds of
attack), 10 trees of depth 5, and IEEE-754 single-precision data.

The design follows a published extension of the Conifer framework, a flow
that turns scikit-learn tree ensembles into FPGA logic. That extension makes
three choices, and this RTL keeps all of them:

- Each tree is held in flat arrays of a complete binary tree.
- A leaf stores a class index instead of a score.
- The forest's answer is a majority vote over the trees.

The extension compares two ways of evaluating the trees, *rolled* and
*unrolled*, and both are here. The source describes its hardware only at the
level of a high-level-synthesis flow. So the pipelines, memory layout, load
port, handshakes and cycle timing below are this design's own. The section
"Departures and open points" lists each such choice.

## How a tree is stored

Every tree is stored as a **complete** binary tree of depth `D = MAX_DEPTH`,
in heap order:

| item | count per tree | contents |
|---|---|---|
| internal node `i` | `2^D - 1` | feature index (`FEAT_W` bits) and threshold (`DATA_W` bits) |
| leaf `k` | `2^D` | class index (`CLASS_W` bits) |

At internal node `i`, a sample goes to child `2i+1` when
`x[feature] <= threshold` and to child `2i+2` otherwise. This is the
scikit-learn convention. After `D` steps the walk reaches heap node `n`,
which is leaf `k = n - (2^D - 1)`. Because the tree is complete, no child
pointers or depth values need to be stored: the heap index carries them.

A trained tree is often shallower on some branches. Before it is loaded, it
must be padded to the full depth. Below an early leaf, give every node any
feature and threshold, and give every leaf under it that leaf's class. The
padding does not change any prediction. A forest with fewer trees than
`N_TREES` also fits, when `N_TREES` is a multiple of its tree count: load
every tree `N_TREES / n` times. That scales every vote count by the same
factor, so the majority and the tie rule do not change.

The model is written through a load port, one word per clock. While
`ld_we` is high:

- `ld_leaf = 0` writes internal node `ld_node` of tree `ld_tree` with
  `ld_feature` and `ld_threshold`.
- `ld_leaf = 1` writes leaf `ld_node` of tree `ld_tree` with `ld_class`.

Load the whole model before sending samples, and do not load while a sample
is in flight. The model storage is never reset.

## The two engines

`rf_top` has a parameter `UNROLL` that builds one of two engines. Both have
the same ports and give the same answers.

### Rolled (`UNROLL = 0`, default): `rf_forest_rolled`

- A single walker (`rf_tree_walker`) visits the trees one after another.
- It reads the model from two memories with one-clock synchronous reads
  (`rf_node_ram`). The node memory has `N_TREES*(2^D-1)` words of
  {feature, threshold}. The leaf memory has `N_TREES*2^D` classes.
- For each tree it starts at the root. On each clock, the node word it asked
  for arrives. The walker selects that word's feature from the latched sample
  and compares it with the threshold (`rf_cmp`). From the result it asks for
  the next node, or after `D` levels for the leaf.
- The root of the next tree is requested in the same clock that the leaf
  class returns. So a tree costs `D+1` clocks.
- When the last tree is done, the classes go to the vote (`rf_vote`).

Timing: the engine takes one sample at a time, and `in_ready` is low while
it is busy. `out_valid` is high for one clock `N_TREES*(D+1)+2` clock cycles
after the cycle in which the sample was accepted. With the defaults that is
62 cycles. The logic needed is one comparator, one `N_FEATURES`-to-1
multiplexer and two small memories. Latency grows with the number of trees
times the depth.

### Unrolled (`UNROLL = 1`): `rf_forest_unrolled`

- Each tree has its own `rf_tree_unrolled`, and all trees run in parallel.
- Inside a tree, all `2^D-1` node comparisons happen at once, with one
  comparator and one feature multiplexer per node. The results are
  registered as a **comparison array**.
- In the next stage, a chain of `D` multiplexers follows the comparison
  bits from the root to a leaf, and the leaf's class is registered.
- The vote registers the result.
- The model sits in registers, because every node is read on every clock.

Timing: `in_ready` is always high, and a new sample may enter on every clock.
`out_valid` is high 3 clock cycles after the cycle in which the sample was
presented.

The unrolled engine needs much more logic:
`N_TREES*(2^D-1)` comparators and multiplexers, and the model held in
flip-flops. With the defaults, that is 310 comparators of 32 bits, each with
its own 78-to-1 multiplexer.

## Number formats and the comparison (`rf_cmp`)

- `FLOAT = 1`: operands are IEEE-754 values of `DATA_W` bits (32 for single
  precision). Each one is turned into an unsigned key that sorts like the
  real number:
  - a positive value gets its sign bit set;
  - a negative value has all its bits inverted.

  The keys are then compared. +0 and -0 are forced equal. NaN is not
  supported: a NaN compares by its bit pattern.
- `FLOAT = 0`: operands are two's-complement fixed point with a common
  binary point, such as `ap_fixed<16,6>`. Where the binary point sits does
  not change the order, so a signed compare of the raw bits is exact. Only
  the total width `DATA_W` is a parameter.

The source also evaluates fixed-point formats of 16, 12 and 8 bits. In this
design, those widths are a parameter choice (`DATA_W`, `FLOAT = 0`). A
fixed-point model of up to 16 bits can also run unchanged on the float
engine, because every such value converts exactly to single precision.

## The vote (`rf_vote`)

For each class, the vote counts how many trees chose it. It outputs the
class with the highest count, and a tie goes to the lowest class index. A
tree class of `N_CLASSES` or more is ignored. The counters and the
comparison chain are combinational, and the result is registered, which
takes one clock.

## Interface of `rf_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | active-low synchronous reset (clears control state, not the model) |
| `ld_we`, `ld_leaf` | in | 1 | model write strobe; write a leaf (1) or an internal node (0) |
| `ld_tree` | in | `clog2(N_TREES)` | tree index |
| `ld_node` | in | `MAX_DEPTH` | heap index of the internal node, or the leaf index |
| `ld_feature` | in | `clog2(N_FEATURES)` | feature tested by the node (an out-of-range index reads feature 0) |
| `ld_threshold` | in | `DATA_W` | node threshold |
| `ld_class` | in | `clog2(N_CLASSES)` | leaf class |
| `in_valid`, `in_ready` | in / out | 1 | sample handshake: a transfer happens on a clock edge where both are high |
| `in_x` | in | `N_FEATURES x DATA_W` (packed) | feature vector; `in_x[f]` is feature `f` |
| `out_valid` | out | 1 | one-clock pulse; there is no backpressure on the output |
| `out_class` | out | `clog2(N_CLASSES)` | the forest's class |

| parameter | default | meaning |
|---|---|---|
| `UNROLL` | 0 | 0 = rolled engine, 1 = unrolled engine |
| `N_TREES` | 10 | trees in the forest |
| `MAX_DEPTH` | 5 | depth of every (padded) tree |
| `N_FEATURES` | 78 | features per sample |
| `N_CLASSES` | 15 | classes |
| `DATA_W` | 32 | width of a feature value and a threshold |
| `FLOAT` | 1 | 1 = IEEE-754, 0 = signed fixed point |

## Which evaluated configurations fit

The source evaluates forests of 2 to 200 trees, with depths from 2 to 6, on
the 78-feature, 15-class task. At the defaults (10 trees, depth 5), these
forests fit:

- 2 trees of depth 2, 4 or 5 (each tree loaded five times);
- 10 trees of depth 3, 4 or 5.

These forests do not fit at the defaults:

- 10 trees of depth 6;
- 20 trees or more.

Each of these runs after changing `N_TREES` and `MAX_DEPTH` to its size.
`tb_rf_workloads` builds and checks all of them that way, with random
models and samples; the intrusion dataset itself is not part of this
repository. Building that testbench takes a few minutes, mostly for the
200-tree unrolled engines.
The default size is a choice: the source names no main configuration.

## Departures and open points

- **Stored arrays.** The source keeps the threshold, value and node-depth
  arrays of each tree. This design keeps feature and threshold per internal
  node, and a class per leaf. The feature index is needed to test a node.
  The node depth is implicit in the heap index.
- **Model storage.** In the source flow, the model arrays are compiled into
  the logic. Here they are written at run time through the load port, so a
  single build can run any model of its size.
- **Unrolled engine.** The source says only that the unrolled form evaluates
  all node comparisons at once into a comparison array. Running all trees
  in parallel is an inference: the published unrolled latencies hardly grow
  with the number of trees.
- **Rolled engine.** The source says nothing about how the rolled form is
  built beyond its name. Visiting trees one after another matches its
  latency, which grows with the number of trees.
- **Depth.** The source's flow is limited to trees of depth 8 on this
  task. `MAX_DEPTH` has no such limit here, but the unrolled engine grows as
  `2^D`.
- **Latency.** Cycle counts here cannot be compared with the source's
  latencies. Those are HLS estimates in microseconds, and no clock frequency
  is given.
- **Choices not in the source.** The comparison direction (`<=` goes left),
  the tie rule, the handshakes, the reset behaviour and the pipeline depths
  are this design's choices.
- **Left out.** The software side is not part of this RTL: training,
  conversion to arrays, tree padding and the processor that drives the
  engine.

## Verification

Each testbench checks against a behavioural reference model
(`tb/tb_rf_model_pkg.sv`). The model computes each tree's class and the
vote from the exact real values of the operands, not from the RTL's
bit-level key. Values come from a grid of quarters, so a feature often
equals its threshold, and +0 and -0 both occur.

| testbench | what it checks |
|---|---|
| `tb_rf_cmp` | float and 16-bit fixed-point compares, including signed zeros, infinities and equal operands |
| `tb_rf_vote` | majority, ties, out-of-range classes, one-clock latency |
| `tb_rf_tree_unrolled` | one tree: classes and the 2-cycle latency with back-to-back samples |
| `tb_rf_node_ram` | load writes, one-clock reads, data held while idle, rewrites |
| `tb_rf_tree_walker` | per-tree classes and the `N_TREES*(D+1)+1` cycle timing, with a memory model |
| `tb_rf_forest_rolled` | classes, the `N_TREES*(D+1)+2` cycle latency, waits on `in_ready`, ties |
| `tb_rf_forest_unrolled` | classes, the 3-cycle latency, one sample per clock, model reloads |
| `tb_rf_top` | end to end: six engines side by side (rolled and unrolled in float and 16-bit fixed point, a rolled 12-bit and an unrolled 8-bit fixed-point engine), with counts of each mechanism |
| `tb_rf_top_full` | the default `rf_top` (rolled, 10 x depth 5, 78 features, float) on 200 samples, with 62-cycle latency; then forests of 2 trees (depth 2, 4, 5) and 10 trees (depth 3, 4), padded and repeated into the default build, against the small forest's own vote |
| `tb_rf_workloads` | the larger evaluated sizes (10 trees of depth 6; 20 to 200 trees of depth 2 to 5), each built at its own size with both engines, 78 features, 15 classes |

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rf_pkg.sv tb/tb_rf_top.sv --top-module tb_rf_top
./obj_dir/Vtb_rf_top
```

Verilator warns that `shortreal` is not supported. The testbenches avoid
`shortreal` and decode the float fields by hand.

## Files

- `rtl/rf_pkg.sv`: index-width and tree-size helper functions
- `rtl/rf_cmp.sv`: node compare (float or fixed point)
- `rtl/rf_vote.sv`: majority vote
- `rtl/rf_tree_unrolled.sv`: one tree, all comparisons in parallel
- `rtl/rf_forest_unrolled.sv`: unrolled engine
- `rtl/rf_node_ram.sv`: model memories of the rolled engine
- `rtl/rf_tree_walker.sv`: rolled-engine controller
- `rtl/rf_forest_rolled.sv`: rolled engine
- `rtl/rf_top.sv`: top level, selects the engine
- `tb/`: the testbenches above, the reference model and a harness
  (`tb_rf_top_harness.sv`) used by the end-to-end test
