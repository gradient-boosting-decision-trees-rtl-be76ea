# GBDT inference accelerator for pixel classification

This is a hardware engine that runs a trained gradient-boosted decision-tree model
(LightGBM style, one-vs-all). Its target is classifying hyperspectral image pixels on a
small FPGA, at the rate the sensor produces them. The model is one-vs-all: each class has
its own set of trees. A class's score is the sum of the leaf values its trees reach for
the pixel, and the predicted class is the one with the highest score.

The architecture rests on three ideas:

1. **Classes run in parallel.** Classes do not depend on each other during inference, so
   each class has its own *class module* with a private node memory. All class modules
   walk their trees at the same time on one shared features register.
2. **A compact node format.** Every node, leaf or not, fits in one 32-bit word. This keeps
   a whole model in on-chip block RAM: by default 8192 words per class, which is eight
   32-Kbit block RAMs.
3. **Interleaved trees hide the pipeline hazard.** You cannot fetch the next node of a tree
   until the current comparison has resolved, so a simple three-stage pipeline would stall.
   Instead, each class module walks three trees at once and takes them in turn. Each tree
   gets one pipeline slot every three cycles, which is exactly the time its next address
   needs. The module therefore executes one node per cycle at the shorter cycle time of a
   three-stage pipeline, with no prediction or speculation.

The RTL follows the published architecture of this accelerator: the node format, the
class module (single-cycle and multi-threaded), the parallel class modules, the AND of
their finish flags and the argmax. The published description leaves out control and
communication. The stream input, the output handshake, the model-load port, the
controller, reset behaviour and the tie rule of the argmax are therefore this design's
own choices. They are marked as such below and in each file's header.

## Node word format

Trees are stored in **pre-order**: a node, then its whole left subtree, then its right
subtree. The left child of a non-leaf node is therefore always the next word. Only the
right child needs an address, and it is stored as a distance from the current node.

| bits  | non-leaf node (bit 0 = 0)                  | leaf node (bit 0 = 1)                          |
|-------|--------------------------------------------|------------------------------------------------|
| 31:24 | `feature`: index of the input feature      | `leaf_value[15:8]`                             |
| 23:16 | `cmp_value[15:8]`                          | `leaf_value[7:0]`                              |
| 15:8  | `cmp_value[7:0]`                           | `next_tree[13:6]`                              |
| 7:2   | `rel_right[6:1]`                           | `next_tree[5:0]`                               |
| 1     | `rel_right[0]`                             | `is_last_tree`                                 |
| 0     | `is_leaf` = 0                              | `is_leaf` = 1                                  |

The fields:

- **Non-leaf node.** `feature` (8 bits) is the index of the input feature to test.
  `cmp_value` (16 bits) is the threshold. `rel_right` (7 bits) is the distance from this
  node to its right child, 1 to 127. If `feature[f] <= cmp_value`, the next node is at
  address +1; otherwise it is at address + `rel_right`.
- **Leaf node.** `leaf_value` is a 16-bit two's complement fixed-point number. It is
  sign-extended and added to the 32-bit class score. The hardware does not care where the
  binary point is, as long as all leaves use the same one. `next_tree` is the absolute
  address of the next tree's root; the low `ADDR_W` bits are used. If `is_last_tree` is
  set, this is the last tree of its set, and its walk ends here.
- **Features** are compared as unsigned 16-bit integers.

A small example, two trees of one class stored from address 0:

| addr | word                                  | meaning                                   |
|------|---------------------------------------|-------------------------------------------|
| 0    | feature 2, cmp 85, rel 4              | root: go to 1 if f[2] <= 85, else to 4    |
| 1    | feature 108, cmp 42, rel 2            | go to 2 if f[108] <= 42, else to 3        |
| 2    | leaf 0.3, next 5                      |                                           |
| 3    | leaf 0.5, next 5                      |                                           |
| 4    | leaf 0.7, next 5                      | every leaf of tree 1 points at tree 2     |
| 5    | feature 15, cmp 34, rel 2             | root of tree 2                            |
| 6    | leaf 0.05, last                       |                                           |
| 7    | leaf -0.05, last                      | leaves of the last tree end the walk      |

`gbdt_pkg::make_inner()` and `gbdt_pkg::make_leaf()` build these words.

Limits that follow from the format:

- The left subtree of any node must have fewer than 127 nodes.
- A tree set must start below 2^14 (and below 2^ADDR_W).
- At most 256 features can be addressed.

## The multi-threaded class module (`class_module_mt`)

This is the default engine, and the part that takes the most care to understand.

**Three tree sets.** The trees of a class are split into three *sets*, stored one after
another in the class's memory. Inside a set, trees are chained through `next_tree`, and
the leaves of the set's last tree carry `is_last_tree`. Set 1 starts at address 0. Sets 2
and 3 start at the addresses held in two registers, `initial_2` and `initial_3`. Each set
has its own address register, `addr_1..addr_3`; these play the role of three program
counters. Each set also has its own end flag, `end_1..end_3`.

**Pipeline.** Threads take turns in a fixed order 1, 2, 3, 1, 2, 3, ... in stage 1.

| stage | work                                                                               | registers at its end                           |
|-------|------------------------------------------------------------------------------------|------------------------------------------------|
| 1     | fetch: the current thread's `addr_t` addresses the node memory (synchronous read)  | RAM output, `last_addr_1`, thread id           |
| 2     | decode: the node's `feature` field selects one of the N_FEATURES inputs            | `node`, `feature`, `last_addr_2`, thread id    |
| 3     | execute (`node_exec`): compare, choose +1 / +rel / next_tree, add leaf value       | `addr_t`, `result`, `end_t`                    |

Thread *t* is in stage 3 in the cycle just before its next stage-1 slot. The new `addr_t`
is written at the end of stage 3 and used by the very next fetch, so no forwarding or
stall is needed. When a thread executes the last leaf of its set, it sets its end flag.
From then on its slots stay empty, which is the only source of lost cycles. To keep that
loss small, split the trees so the three sets take about the same time, for example by
average depth.

**Timing.**

- Assert `start` for one cycle while `busy` is low. This clears the score and the flags
  and loads `addr_1 = 0`, `addr_2 = initial_2`, `addr_3 = initial_3`.
- Suppose set *t* (t = 0, 1, 2) visits n_t nodes for this pixel. Then `done` goes high
  **max over t of (3·n_t + t)** clock edges after the start edge, and `result` is final
  at that point.
- `done` and `result` hold until the next start.

The testbenches check this count exactly. With balanced sets, the module averages
slightly more than one cycle per executed node. On the synthetic workload models below
it measures 1.06 to 1.09 cycles per node.

**Restrictions.**

- Each set must contain at least one tree. A single leaf with value 0 and `is_last_tree`
  set is enough.
- `start`, node writes and `initial_*` writes are not allowed while `busy` is high.
  Assertions check this.

## The single-cycle class module (`class_module_sc`)

This is the first, simpler version, selected with `MULTI_THREADED = 0`. There is one
address register, `last_node`, and all trees form a single chain starting at 0. Each
cycle, the word at `last_node` comes out of the memory. Its feature is selected and
compared, and the next address goes both into `last_node` and into the memory's read
port. One node is executed per clock, with the whole memory-to-adder path in a single
cycle. That path limits the clock frequency, which is why the multi-threaded module
exists. `done` rises n clock edges after the start edge, where n is the number of nodes
visited. A model for this engine uses one set only, so `initial_*` writes are ignored.

## The accelerator (`gbdt_accelerator`)

```
 s_* stream ──> feature_buffer ──> features register ──┬──> class module 0 ──┐ result / done
 (16 bit/beat)   (shadow buffer)                        ├──> class module 1 ──┤
                                                        └──> class module N-1─┤
                                                  AND of done ─> controller ─┘──> argmax ──> m_* output
```

**Input.** Features arrive one 16-bit word per beat on a valid/ready stream, feature 0
first. `feature_buffer` collects N_FEATURES beats in a shadow buffer, then holds
`s_ready` low until that pixel has been taken.

**Start.** When no pixel is in progress, the controller copies the shadow buffer into the
features register in one cycle. One cycle later it pulses `start` to every class module.
The shadow buffer is free again at once, so the next pixel streams in while the current
one is being classified.

**Finish.** The pixel is finished when all class `done` flags are high. The argmax result
is then captured into the output register:

- `m_class` is the predicted class.
- `m_score` is its score.
- `m_scores` holds all class scores.

The output uses a valid/ready handshake. If the previous prediction has not been taken,
the capture waits, and so does the next pixel.

**Argmax.** `argmax` is a combinational reduction tree. It compares scores as signed
values, and on equal scores the lower class index wins.

**Model load.** Load the model while `busy` is low. Each write is one cycle with
`cfg_we = 1`, `cfg_class` selecting the class, and `cfg_kind` selecting what is written:

| `cfg_kind` | effect                                                                  |
|------------|-------------------------------------------------------------------------|
| 0          | node memory[`cfg_addr`] = `cfg_data`                                    |
| 1          | `initial_2` = `cfg_addr` (start of set 2; multi-threaded engine only)   |
| 2          | `initial_3` = `cfg_addr` (start of set 3)                               |

**Fewer classes than class modules.** Set `N_CLASSES` to the model's class count. If you
leave it larger, give each unused class a one-word model: a leaf with `is_last_tree` set
and a very negative value, with `initial_2 = initial_3 = 0`. Every thread of that class
then finishes after one node, and the class cannot win unless all real scores fall below
that value.

### Parameters

| parameter        | default | meaning                                                           |
|------------------|---------|-------------------------------------------------------------------|
| `N_CLASSES`      | 16      | class modules (the largest evaluated data sets have 16 classes)  |
| `N_FEATURES`     | 224     | features per pixel (evaluated data sets: 103 to 224)             |
| `ADDR_W`         | 13      | node memory of 2^13 = 8192 words per class                        |
| `MULTI_THREADED` | 1       | 1: `class_module_mt`, 0: `class_module_sc`                        |

The node word layout, the feature width, the 32-bit score and the three threads are
constants in `gbdt_pkg`.

At the defaults the design holds 16 × 8192 × 32 bits = 4 Mbit of node memory, about
10,700 flip-flops and sixteen 224-to-1 16-bit multiplexers. This matches the 128 block RAMs
(32 Kbit of data each) that the largest evaluated models occupy.

### Evaluated model shapes

These are the four data sets the architecture was evaluated on, all within the default
size:

| data set | features | classes | trees | trees per class |
|----------|----------|---------|-------|-----------------|
| IP       | 200      | 16      | 2533  | about 158       |
| KSC      | 176      | 13      | 2600  | 200             |
| PU       | 103      | 9       | 1206  | 134             |
| SV       | 224      | 16      | 2146  | about 134       |

The trained models themselves are not included here. Their node counts are known only
from the block RAM use reported for them: at most 8192 words per class.

## Files

| file                          | contents                                                       |
|-------------------------------|----------------------------------------------------------------|
| `rtl/gbdt_pkg.sv`             | constants, node word structs, word builders                    |
| `rtl/trees_nodes_ram.sv`      | per-class node memory, synchronous read                        |
| `rtl/node_exec.sv`            | execute logic of one node                                      |
| `rtl/class_module_mt.sv`      | multi-threaded, three-stage class module                      |
| `rtl/class_module_sc.sv`      | single-cycle class module                                     |
| `rtl/feature_buffer.sv`       | input stream, shadow buffer and features register             |
| `rtl/argmax.sv`               | best-class selection                                          |
| `rtl/gbdt_accelerator.sv`     | top level                                                     |
| `tb/tb_gbdt_model.sv`         | reference model: random tree generator in the node format and a software tree walk |
| `tb/tb_accel_env.sv`          | reusable end-to-end environment for the top                   |
| `tb/tb_*.sv`                  | one self-checking testbench per block, plus the runs below    |

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gbdt_pkg.sv tb/tb_gbdt_model.sv tb/tb_gbdt_full.sv --top-module tb_gbdt_full
./obj_dir/Vtb_gbdt_full
```

Replace `tb_gbdt_full` with any other testbench name.

- **Block testbenches.** `tb_trees_nodes_ram`, `tb_node_exec`, `tb_argmax`,
  `tb_feature_buffer`, `tb_class_module_mt` and `tb_class_module_sc` compare each block
  with values computed in the testbench. The two class-module tests also check the exact
  start-to-done cycle count and the number of executed nodes.
- **`tb_gbdt_accelerator`** runs the whole design end to end at reduced size:
  4 classes × 32 features with the multi-threaded engine, and 3 × 20 with the
  single-cycle one. It streams random pixels with random gaps and applies random output
  back-pressure, including long stalls. It checks every prediction, every class score and
  every start-to-finish cycle count. It also counts how often each mechanism occurred and
  fails if one never did: input back-pressure, input accepted during a computation,
  output capture held back, left and right steps, next-tree jumps, and a tree set ending
  before the others.
- **`tb_gbdt_full`** runs the same checks with the top at its default parameters:
  16 classes, 224 features, 8192 words per class. It uses about 135 random trees per
  class and 40 pixels, and takes under a second.
- **`tb_gbdt_workloads`** builds synthetic models shaped like the four data sets above
  (same feature count, class count and trees per class, split into three equal sets),
  and runs 16 pixels of each.

## How far to trust it, and where it departs

- **Verified in simulation only.** All of it is checked against an independent software
  walk of randomly generated trees. No trained LightGBM model was converted and run,
  because none is included.
- **Random trees, not trained ones.** The random trees are at most 6 levels deep. The
  published models are deeper, so their cycle counts per pixel (about 1,450 to 2,600) are
  not reproduced here. The cycles-per-node overhead of the multi-threaded module is of
  the same kind.
- **No physical results.** Timing closure, clock frequency, resource use and power on an
  FPGA were not measured.
- **Width of `rel_right`.** It is 7 bits, following the node format (bits 7:1). One
  drawing of the single-cycle datapath labels it 6 bits. With 7 bits, a right child can
  be up to 127 words away.
- **Fixed word layout.** The node word width and its field widths are constants in
  `gbdt_pkg`, not parameters. Changing them means editing the package, and the
  `7:1` / `15:2` slices in the testbench model.
- **Leaf value and features.** The leaf value is read as signed and the features as
  unsigned; the format does not say which.
- **Communication is this design's own.** The DMA that moves pixels from external memory
  into the accelerator is not part of this RTL. Its place is taken by the `s_*` stream
  port, and any DMA or AXI-Stream source can drive it. How the model gets into the node
  memories is also this design's: the `cfg_*` port, where an FPGA build could instead
  initialise the block RAMs in the bitstream.
- **Argmax ties** go to the lower class index.
- **Argmax structure.** `argmax` is purely combinational over all class scores. At large
  `N_CLASSES` it may need a pipeline register. The controller would then have to wait
  one more cycle after finish before it captures the prediction.
