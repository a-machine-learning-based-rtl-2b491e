# Isolation Forest detector for cache-based side-channel attacks

Cache side-channel attacks such as Spectre and Meltdown leave a mark on the
processor's performance counters: more cache misses, more squashed
instructions, odd fetch patterns. This block sits beside a CPU whose main job
is encryption. Once per time window it reads up to four carefully chosen
hardware performance counters (HPCs) of that CPU, and it can also use the
number of instruction fetches, as a four-value *sample*. It then classifies
the sample with an **Isolation Forest**. When the sample looks anomalous it
raises an alert to the operating system. The OS decides what to do about it.

The forest is trained offline on attack-free runs only (a *one-class*
classifier). It therefore needs no examples of attacks and can also flag
attacks it has never seen. The hardware only runs inference. The trained model
is loaded at run time over AXI4-Lite: the trees, which counters to watch, the
window length and the decision threshold. Switching to another cipher means
loading another model, not building new hardware.

The architecture follows the master's thesis *"A Machine Learning-based
Security Architecture to Detect Microarchitectural Side-Channel Attacks in
Microprocessors"* (academic year 2021-22). The thesis describes the
blocks and their roles but gives no RTL. The section "What is this design's
own" below lists every choice made here that the thesis does not fix.

```
               AXI4-Lite (model, window, threshold, enable / status)
                          |
                    +-------------+    feature table    +-------------+
                    | axil_config |-------------------->|feature_table|
                    +-------------+                     +-------------+
                      |   |    | node writes                 |
     window length    |   |    +-----------+                 v
   +--------------+   |   |                |         +-------------+  HPC line
   | sample_timer |<--+   |                |  tick   | hpc_sampler |<--------> CPU counters
   +--------------+ -------------------------------->+-------------+
          | tick          |                |                 ^ fetch count
          v               |                |         +---------------+
   +---------------+      |                |         | fetch_monitor |<--- fetch bus (snoop)
   | fetch_monitor |------+--------------------------+---------------+
   +---------------+                       v  sample (4 x 32 bit)
                                 +-------------------+
                                 | iforest_tree x100 |  path lengths h_t(x)
                                 +-------------------+
                                           v
                                 +-------------------+
                                 | iforest_predictor |---> alert, alert_mean, alert_irq
                                 +-------------------+
```

## How a decision is made

An isolation tree is a binary tree grown on a random subset of the training
samples, usually 256 of them. Each inner node splits on one feature at a
random threshold, and growth stops at depth ceil(log2 256) = 8 or when a node
holds a single sample. An anomaly lies far from the bulk of the data, so a few
random cuts isolate it: it reaches a leaf close to the root. A normal sample
sits among many others and ends up deep.

For one tree, the *path length* of a sample x is

    h(x) = (number of edges from the root to the leaf reached) + c(n_leaf)

where `n_leaf` is the number of training samples that ended in that leaf. The
correction `c(n)` is the average path length of an unsuccessful search in a
binary search tree of n items. It accounts for the part of the tree that was
never grown below that leaf:

    c(n) = 2*H(n-1) - 2*(n-1)/n,  H(i) ~ ln(i) + 0.5772156649,  c(1) = 0, c(2) = 1

The forest averages h(x) over all trees. The usual anomaly score is
`s = 2^(-E[h(x)] / c(256))`, and a sample is an outlier when s is above a
limit. Because s only falls as E[h(x)] rises, that test is the same as
comparing the **mean path length with a threshold**. This hardware does the
comparison in that form, so it needs no exponential and no logarithm:

    outlier  <=>  mean_t h_t(x) < THRESH

### Numbers in hardware

* Feature values are unsigned 32-bit counts per window.
* Path lengths, leaf corrections and the threshold are unsigned **Q8.8**
  (16 bits, 1/256 resolution). The largest path is 8 + c(256) = 18.2, which
  fits easily.
* A tree unit computes `depth*256 + leaf_adj`, where `leaf_adj` is
  `round(256*c(n_leaf))` stored in the leaf.
* The predictor adds the 100 path lengths (23 bits) and divides by the tree
  count. It flags the sample when the integer mean is below `THRESH`.
* `THRESH = 0` never flags anything. This is the reset value.

### From a scikit-learn model to a configuration

1. For every tree, put node k of the complete binary tree at index k. The
   root is at 0, and node i has its left child at 2i+1 and its right child at
   2i+2. Slots a tree does not use are never visited, so they need no writes.
2. Inner node: the feature index (0-3, a slot of the feature table) and the
   threshold. The walker goes **left when x <= threshold**, as scikit-learn
   does. For integer counts, use `floor(threshold)`. For a feature that is a
   rate (events per cycle), multiply the threshold by the window length, since
   the hardware sees the count over the window.
3. Leaf: the leaf bit and `round(256*c(n_node_samples))`.
4. Threshold: scikit-learn flags x when `score_samples(x) < offset_`, with
   `score_samples = -2^(-E[h]/c(max_samples))`. So
   `THRESH = round(256 * (-c(max_samples) * log2(-offset_)))`.

## The tree unit (`iforest_tree`)

Each tree is a small walker over its own node table (`N_NODES` = 511 entries
of 51 bits, one write port, one registered read port). A `start` pulse latches
the sample and reads the root in the same clock. From then on, one node is
examined per clock:

* **Inner node:** select the feature, compare, count one more edge, and
  address the child.
* **Leaf:** register `depth*256 + leaf_adj` and raise `done`. `done` stays
  high until the next `start`.

Timing: a walk that ends at depth d takes **d + 2 cycles** from `start` to
`done`, so at most 10 cycles for a depth-8 tree. All 100 trees walk the same
sample at the same time, and the predictor waits for the slowest one.

Two guards keep a bad table from hanging the unit. A child index past the
table ends the walk, with no leaf correction added. So does a depth of
ceil(log2(N_NODES)) levels. An assertion flags node writes while a walk is in
progress. The configuration port refuses such writes anyway: they get SLVERR
while monitoring is enabled.

## Sampling: windows, counters and fetches

* **`sample_timer`** pulses `tick` at the end of every window of `WINDOW`
  cycles. The windows run back to back. The default is 1,600,000 cycles:
  1.6 ms at 1 GHz, which matches a 500 us sampling interval on a 3.2 GHz part.
  The timer only starts once the CPU counters are programmed.
* **`hpc_sampler`** drives the HPC line to the CPU. It uses a plain
  request/acknowledge handshake: `hpc_req` is held with `hpc_op`, `hpc_idx`
  and `hpc_wdata` stable until the CPU answers with a one-cycle `hpc_ack`
  (plus `hpc_rdata` for reads). There is one request at a time. Operations:
  * `HPC_OP_CONFIG` runs when monitoring is enabled, once per enabled HPC
    slot. It programs counter `idx` with the event code and clears it.
  * `HPC_OP_READ_CLEAR` runs at every tick. It returns counter `idx` and
    restarts it, so each read covers exactly one window.

  Slots whose source is the fetch bus take the fetch count, and disabled
  slots read 0. With k HPC slots, each answered L cycles after the request,
  the sample is ready `k*(L+2) + (4-k) + 2` cycles after the tick. If a tick
  arrives while a sample is still being read, that tick is dropped and counted
  in `MISSED`.
* **`fetch_monitor`** snoops the instruction bus between instruction memory
  and the fetch unit. It only listens and drives nothing on that bus. It
  counts `fetch_valid && fetch_ready` transfers per window. The count
  saturates.

A decision is out about 30 cycles after the window ends. That leaves the
whole next window free, so windows never overlap in the forest.

## Configuration port (`axil_config`)

AXI4-Lite, 32-bit data.

* AW and W may arrive in either order. B is sent once both are held.
* A read returns R one cycle after AR.
* Write strobes are ignored: every write is a full word.
* Unmapped reads return 0.

| Address | Name | Access | Meaning |
|---|---|---|---|
| 0x000 | CTRL | rw | bit0 enable. The rising edge programs the counters, then windows start |
| 0x004 | WINDOW | rw | window length in cycles. Reset value `WINDOW_DEFAULT` = 1,600,000 |
| 0x008 | THRESH | rw | [15:0] mean-path-length threshold, Q8.8 |
| 0x00C | STATUS | r / w1c | bit0 alert (sticky; write 1 to clear), bit1 counters programmed |
| 0x010 | SAMPLES | r | samples classified |
| 0x014 | MISSED | r | window ticks dropped |
| 0x018 | MEAN | r | mean path length of the last sample |
| 0x01C | ALERTS | r | samples flagged |
| 0x020 + 4i | FEAT i | rw | bit31 enable, bit30 source (0 HPC, 1 fetch), [15:0] HPC event code |
| bit 21 set | nodes | w | tree = addr[20:12], node = addr[11:3], word = addr[2] |

A node takes two writes:

* **Word 0** is the threshold. It is only staged.
* **Word 1** holds bit31 = leaf, [17:16] = feature index and [15:0] = leaf
  correction. Writing it stores the whole node.

Node writes are refused with SLVERR while CTRL.enable is set, and also when
the tree or node index is out of range.

To load a model:

1. Clear CTRL.
2. Write the nodes, the feature slots, THRESH and WINDOW.
3. Set CTRL.enable.

## Alert bus

* `alert` pulses for one cycle for every sample flagged as an outlier.
* `alert_mean` carries that sample's mean path length. It shows how anomalous
  the sample was.
* `alert_irq` is a level for an interrupt line. It stays high until software
  writes 1 to STATUS bit0.

## Parameters and size

| Parameter | Default | Origin |
|---|---|---|
| `N_TREES` | 100 | forest size used in the thesis |
| `N_NODES` | 511 | complete tree of depth 8, the depth limit for 256 samples per tree |
| `N_FEAT` | 4 | at most four counters are watched at once |
| `WINDOW_DEFAULT` | 1,600,000 | 1.6 ms at 1 GHz |

At the default size, coarse synthesis with yosys gives about 6,800 word-level
cells, 16,700 flip-flop bits and 2.6 Mbit of node memory (100 x 511 x 51
bits). The memory is meant for block RAM.

The thesis reports 452 LUTs and 61 flip-flops for one tree. That tree was
built as a fixed state machine for a single trained tree, with the tree's
thresholds folded into logic. The table-driven tree here costs memory but can
be reloaded.

## Checked workloads

The thesis evaluates eight configurations: AES, Blowfish, IDEA and RSA, each
attacked by Spectre and by Meltdown. All eight use the same forest shape: 100
trees, 256 samples per tree and four features (each tree splits on at most
two of them). That shape fits the default parameters exactly. The per-window
counts also fit: even at eight events per cycle, 1.6 M cycles give 12.8 M,
which is far below 2^32.

Some selected features are ratios or statistics, for example "instructions
issued per cycle" or "standard deviation of load latency". The CPU must
provide these as values on the HPC line. A per-cycle rate becomes a
per-window count once its threshold is scaled by the window length.

## What is this design's own

The thesis fixes the blocks, the forest size, the four-feature limit, the
1.6 ms window, the AXI configuration port, the bidirectional HPC line, the
read-only fetch-bus connection and the alert to the OS. The following are
choices made here:

* **Table-driven trees.** Each tree is a walker over a loadable node table,
  not an FSM generated from one trained tree. The thesis wants the module to
  be reconfigurable, and this is what allows it.
* **Node fields.** The complete-binary-tree layout, Q8.8 path lengths and
  "left when x <= threshold" are choices made here. Inner nodes do not store
  the training statistics (sample count, mean value and its error). They play
  no part in prediction.
* **The decision.** The threshold is set on the mean path length, which is
  equivalent to a threshold on the anomaly score. The mean uses integer
  division.
* **Windows.** Windows run back to back. The timer does not restart after
  each decision. The thesis says both that the timer is reset after a
  normal sample and that the module simply waits for the next window. The
  back-to-back timer follows the second reading, and gives every window the
  same length whatever the decision.
* **The HPC line.** The request/acknowledge protocol, the read-and-clear
  reads and the dropping of ticks while a read is in progress are choices
  made here.
* **Fetch activity.** It is read as "transfers per window".
* **Register map, status counters and alert bus.** The register map, the
  status counters, and the alert bus's pulse, mean and sticky interrupt are
  all choices made here.

Not in the RTL:

* the CPU and its performance counters. The testbenches use a behavioural
  model, `tb/pmu_model.sv`.
* the OS's reaction to an alert.
* the offline flow that picks the features and trains the forest.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_iforest_tree` | 20 random trees x 200 samples against a reference walk; latency d+2; result held |
| `tb_iforest_predictor` | mean, decision and one-cycle-after-last-tree timing with random tree delays |
| `tb_sample_timer` | tick spacing for periods 1 to 1600, first window, period change |
| `tb_fetch_monitor` | per-window transfer counts with random bus traffic |
| `tb_feature_table` | reset, random writes against a shadow copy |
| `tb_hpc_sampler` | counter set-up, sample values (rate x window), latency formula, missed ticks, reconfiguration |
| `tb_axil_config` | every register, node writes, SLVERR cases, status counters, alert clear, random AXI ordering |
| `tb_security_module` | end to end with 12 trees of 63 nodes and 400-cycle windows |
| `tb_security_module_full` | the same at the default size: 100 trees of 511 nodes, 1.6 M-cycle windows |
| `tb_workload_iforest` | a forest trained in the testbench (100 trees, 256 samples and 2 features per tree, 1% contamination), default size, 2,000-cycle windows: exact decisions, all attack windows flagged, few false alerts |

The end-to-end tests load random trees over AXI and run normal windows, in
which the CPU model counts 0-2 events per cycle, and attack windows, with 8-10
per cycle. They compare every decision with a reference forest evaluated on
the sample the testbench gathered itself. They also require each mechanism to
occur at least once:

* counter set-up and reads
* the fetch feature
* a normal decision and an alert
* clearing the alert
* a node write refused while enabled
* dropped ticks

The default-size run needs about a minute of simulation.

Running a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_security_module \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/iforest_pkg.sv tb/tb_tree_pkg.sv tb/tb_security_module.sv
./obj_dir/Vtb_security_module
```

Replace the top module and file for any other testbench. `tb_tree_pkg.sv` is
only needed by the tree and end-to-end tests.

## Limits

* Most tests use random trees. `tb_workload_iforest` grows a forest the way
  scikit-learn does, but on synthetic counter rates, not on traces of real
  ciphers under attack. The tests show that the hardware evaluates a given
  forest exactly and that the threshold conversion above works. They say
  nothing about detection accuracy on real workloads, which depends on the
  trained model.
* The HPC line protocol has to be matched to the real CPU's
  performance-monitoring interface, for example with an adapter to its
  model-specific registers.
