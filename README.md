# Locked random-forest inference accelerator

A random forest classifies a sample by letting every decision tree walk from
its root to a leaf, comparing one feature with one threshold at each node, and
then taking a majority vote over the trees' leaf labels. This accelerator
hard-wires a trained forest into logic and protects it with **random logic
locking**. Key-gates (XOR or XNOR) sit on most decision outputs and on the
voter's inputs. Only the secret key makes the hardware classify like the
trained model. Any other key gives a working circuit with wrong answers.
Someone who copies the bitstream or netlist therefore does not get a usable
model.

The architecture follows the scheme published as *Logic Locking for Random
Forests: Securing HDL Design and FPGA Accelerator Implementation*. That work
describes locking at the behavioural (HDL) level, with each tree written as a
finite-state machine. This RTL is an independent SystemVerilog implementation
of that scheme. The section "Own choices and departures" lists where it fills
gaps or differs.

## How a locked tree works

Each tree is an FSM with **one state per node**, leaves included. The root is
state 0.

In every clock cycle, the FSM evaluates the node it is in:

1. The feature of that node is already on `rd_data`. It was read from the
   tree's feature RAM while the FSM moved into the node.
2. One comparator computes `feature <= threshold` for that node's threshold.
3. The result passes through the node's key-gate, using the node's key bit.
4. A multiplexer picks the next state from the node's two branch targets.

At a leaf, the leaf's class is written to the label register, `done` pulses,
and the FSM returns to idle.

### Key-gates and the correct key

The locking step places a key-gate on a random 85 % of the decision nodes. The
other nodes get a buffer. The gate kind is taken from the node's bit of the
randomly generated correct key:

| correct key bit | gate | output with correct key | output with wrong key |
|---|---|---|---|
| 1 | XOR  | `d ^ 1 = ~d` | `d` |
| 0 | XNOR | `~(d ^ 0) = ~d` | `d` |

With the correct key, every locked node therefore **inverts** its comparison.
To compensate, the two branch targets of every locked node are stored swapped.
With the correct key, the tree walks exactly as the unlocked tree. A wrong bit
on a locked node sends the walk into the other subtree, and every leaf below
that node becomes unreachable for the samples that should reach it. Key bits
of leaves and of buffer nodes have no effect.

A node's constants are its feature index, threshold, two targets, leaf label
and gate kind. They are elaborated into a constant table indexed by the state.
Synthesis folds this table into logic, just as a `case` statement over the
states would be. No node table exists at run time. The key is the only
secret input.

### Locked majority voter

The voting key has one bit per tree. For tree *j* and class *c*, the voter
forms the vote "tree *j* chose *c*" and passes it through a key-gate driven by
key bit *j*. The gate kinds are chosen with the same 85 % rule. Behind a
locked gate, the comparator produces the inverted vote, which the correct key
bit restores. If the key bit is wrong, tree *j* votes for every class except
its own. The voter then counts votes per class and outputs the class with the
most votes. Ties go to the lowest class index.

## Data flow and operation

```
 host stream ──► sample_loader ──► feature_ram (copy 0) ──► locked_tree_fsm 0 ─┐
 in_valid/ready                 ├► feature_ram (copy 1) ──► locked_tree_fsm 1 ─┼─► locked_voter ─► res_*
                                └► feature_ram (copy 2) ──► locked_tree_fsm 2 ─┘
                                         rf_ctrl: standby / trees / vote / result
```

The accelerator works in batches:

1. **Standby.** The host streams up to `N_SAMPLES` samples, one feature per
   accepted beat (`in_valid & in_ready`), with samples back to back. All RAM
   copies are written together, one copy per tree, so that every tree reads
   its own feature in the same cycle. `n_loaded` counts complete samples.
   `in_ready` is low when the memory is full or the accelerator is busy.
2. **Request.** A one-cycle `start` pulse classifies every stored sample in
   turn. A request made while no complete sample is stored is ignored.
3. **Trees.** For each sample, all trees start together. The controller waits
   until every tree has reported. Trees finish at different times because
   their path lengths differ.
4. **Vote.** The trees are back in their idle state. The voter takes their
   labels and registers the majority class one cycle later.
5. **Result.** `res_valid` is raised with `res_label` and `res_index` (the
   sample number). The result stays until the host takes it with `res_ready`,
   so a slow host stalls the accelerator.
6. After the last result, the loader is cleared and the accelerator returns
   to standby. A partly sent sample is dropped.

**Timing.** A tree needs (internal nodes on its path) + 2 cycles from `start`
to `done`. A sample's result appears (deepest path in internal nodes) + 5
cycles after the request, or after the previous result was taken. For the
default forest, that is 12–13 cycles per sample, plus one cycle per result
handshake. Loading takes one cycle per feature.

### Key layout

`KEY_W = sum(TREE_NODES) + N_TREES`, which is 1482 bits by default. Tree 0's
key (bit *i* for node *i*) occupies the lowest `TREE_NODES[0]` bits. Tree 1's
key comes next, and so on. The voting key (bit *j* for tree *j*) is in the top
`N_TREES` bits. The key is a static input; how it is stored on the device is
left to the integrator. The correct key of the built-in model is
`rf_pkg::correct_key_bit(seed, i)`. The tree seed is `MODEL_SEED + t` and the
voter seed is `MODEL_SEED + 1000`. `tb/tb_locked_rf_top.sv` shows how to
assemble it.

## The model inside: stand-in forest

The RTL contains no trained model. `rf_pkg` defines a deterministic stand-in
forest with the real forest's dimensions. Its trees are in heap order: node
*i* has children 2*i*+1 and 2*i*+2, so a tree of *N* nodes has (*N*−1)/2
internal nodes and (*N*+1)/2 leaves. Feature index, threshold, leaf label, the
locked/buffer choice and the correct key bit are all hashes of
(seed, node, field). To build a real model, replace the bodies of
`node_is_leaf`, `node_left`, `node_right`, `node_feature`, `node_threshold` and
`node_label` with the trained trees' tables, for example from a generated
package. Then replace `correct_key_bit` with your secret key. The hardware
needs no other change: the FSM handles arbitrary branch targets, not only
heap order.

## Modules

| file | role |
|---|---|
| `rtl/rf_pkg.sv` | gate-kind enum, default sizes, stand-in model, key and locking functions |
| `rtl/key_gate.sv` | XOR / XNOR / buffer key-gate |
| `rtl/feature_ram.sv` | sample memory, 1 write + 1 synchronous read port |
| `rtl/sample_loader.sv` | host stream into the memories, sample counting, back-pressure |
| `rtl/locked_tree_fsm.sv` | one locked decision tree as an FSM |
| `rtl/locked_voter.sv` | locked majority voter |
| `rtl/rf_ctrl.sv` | batch sequencer (standby, trees, vote, result) |
| `rtl/locked_rf_top.sv` | the accelerator |

### Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `N_TREES` | 3 | trees in the forest |
| `TREE_NODES` | `{16'd501, 16'd493, 16'd485}` | node count per tree, 16 bits each, tree 0 in the lowest bits |
| `N_FEATURES` | 784 | features per sample (28×28 pixels) |
| `N_CLASSES` | 10 | classes |
| `FEAT_W` | 8 | bits per feature |
| `LOCK_PCT` | 85 | percentage of decision nodes / voter inputs with a key-gate (0 gives the unlocked design) |
| `N_SAMPLES` | 16 | samples stored per batch |
| `MODEL_SEED` | 1 | seed of the stand-in model |

The defaults are the three-tree MNIST forest: trees of 485, 493 and 501
nodes, 784 grey-scale features and 10 classes.

The same RTL also covers the other configurations that were evaluated for the
scheme. Re-elaborate it with each one's sizes:

| configuration | tree sizes (nodes) | features | classes |
|---|---|---|---|
| Accdel | 483 / 471 / 475 | 4 | 14 |
| Activities | 215 / 189 / 223 | 18 | 5 |
| Wearable | 389 / 413 / 517 | 54 | 5 |
| Wireless | 441 / 489 / 395 | 8 | 5 |
| MNIST single tree | 485 | 784 | 10 |

The feature memory at default size is 3 × 16 × 784 × 8 bits ≈ 301 kbit, about
30 of the 553 10-kbit block RAMs of a DE-10 Standard (Cyclone V 5CSXFC6D6F31)
board.

## Own choices and departures

These points are not fixed by the published scheme and were decided here:

- **Comparison direction.** The scheme's equation writes `<` / `>=`, while
  its example code tests `<=`. This RTL uses `feature <= threshold` → left
  branch.
- **Branch swap for locked nodes.** This is the compensation that makes the
  XOR/XNOR-by-key-bit rule correct. The published description does not spell
  it out.
- **Leaves as states.** A leaf is its own FSM state, and it writes the label
  register in its own cycle. The published text also describes the label being
  written in the last decision node. One state per node was chosen so that
  the state count matches the node count.
- **Voter locking.** Where the voter's key-gates sit is not specified. Here,
  each tree's key bit gates all of that tree's per-class votes, and the 85 %
  rule also decides which voter inputs are locked. Ties go to the lowest
  class.
- **Feature width.** 8 bits, unsigned. Other datasets are assumed to be
  quantised to 8 bits.
- **Memory and handshakes.** The sample count per batch (16), the
  valid/ready streams, batch operation and the reset behaviour (asynchronous,
  active low) are this design's own choices. So is the one-cycle synchronous
  RAM read, which is hidden by addressing the RAM from the FSM's next state.
  The host link (USB on the evaluated board) is outside the RTL.
- **State width.** The state register is `$clog2(N_NODES)` bits: 9 for the
  default trees, 10 for the 517-node tree.
- **Node table instead of a `case` statement.** The node constants are an
  elaborated table rather than a generated `case` statement. Both describe
  the same constant logic.
- **Not modelled.** The scheme's suggestions for larger forests (importance-
  based key-gate allocation, pruning, ensemble trimming, parallel units) are
  discussed but not specified as hardware, so they are not modelled.
  Side-channel balancing buffers on unlocked nodes are also not modelled.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_key_gate`: exhaustive truth table. It also checks that the gate chosen
  for a key bit inverts under that bit.
- `tb_feature_ram`: random write/read-back, one-cycle latency, and
  read-during-write returning old data.
- `tb_sample_loader`: addresses and data of every write, sample counting,
  stalls when full or busy, and clear.
- `tb_locked_tree_fsm`: a 485-node tree against a software walk of the
  unlocked tree. It checks the label and latency (path + 2) for 100 samples,
  corruption under random keys, no effect from buffer/leaf key bits, and that
  a wrong root bit takes the other subtree.
- `tb_locked_voter`: 3-tree/10-class and 5-tree/14-class voters against a
  software count, with ties and with wrong key bits.
- `tb_rf_ctrl`: the batch sequence with model trees of random latency and a
  randomly stalling host.
- `tb_locked_rf_top`: the whole accelerator at default size. It runs five
  batches against a software forest and checks labels, indices and
  per-sample latency. It also requires each of these events at least once:
  an ignored empty request, a memory-full stall, a busy stall, result
  back-pressure, trees finishing at different cycles, a voting tie, a
  dropped partial sample, and corruption under a wrong key.
- `tb_rf_workloads` (with harness `rf_dataset_bench`): the five dataset
  forests and the single-tree configuration. Each must match the model under
  the correct key. Each is then re-run under random key guesses (100 keys; 10
  for the MNIST forest), and the agreement with the correct classification
  must fall. With random samples, agreement dropped to roughly 7–30 %
  depending on the configuration.

All samples are random. Results on real datasets, and accuracy figures,
depend on a real trained model.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_locked_rf_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/rf_pkg.sv tb/tb_locked_rf_top.sv
./obj_dir/Vtb_locked_rf_top
```

Replace the top module and file with any other testbench. Lint a module with
`verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/rf_pkg.sv rtl/<module>.sv`.
