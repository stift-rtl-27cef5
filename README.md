# STIFT: a reduction tree that does its own folding

In a flexible DNN accelerator, a row of multiplier switches (MSs) produces partial sums (psums)
every cycle. A reduction network (RN) adds them up. The MSs are split into *clusters*: each cluster
is a contiguous group of MSs working on one dot product. A dot product is usually longer than its
cluster, so it is computed in several *folding iterations*, and the per-iteration sums must be added
together over time. Plain adder trees send each iteration's sum back to memory and feed it in again,
which stalls the pipeline. Adding a bank of accumulators next to the tree keeps the pipeline full,
but almost doubles the adders.

STIFT keeps the pipeline full **without extra accumulators**. When a tree is cut into several
clusters, the adders above the clusters sit idle. STIFT gives the tree a second root and a few
*folding links*, so that every cluster, whatever its size and place, can claim one idle adder as its
accumulator. Each node of the tree is an *extended adder switch* (eAS). It either adds psums
spatially, or accumulates one cluster's iteration sums temporally in a register it carries.

This repository holds synthesizable SystemVerilog for that network, its folding-configuration
logic and self-checking testbenches.

## Topology

For `NUM_MS` leaves (default 256) there are `NUM_MS` eASs:

* `NUM_MS-1` tree nodes, numbered by **in-order position** `p = 0 .. NUM_MS-2`. A node at level `l`
  (level 1 sits directly on the MSs) with index `k` within its level has `p = k*2^l + 2^(l-1) - 1`,
  so its level is 1 plus the number of trailing ones of `p`. Node `p` of level 1 adds MSs `p` and
  `p+1`. The children of a node at level `l >= 2` are `p ± 2^(l-2)`. The first root is
  `NUM_MS/2-1`.
* The **second root**, node `NUM_MS-1`. It has no children and serves only as an accumulator.

It has three kinds of links:

1. **Tree links**: the ordinary child-to-parent links.
2. **Augmented (lateral) links.** Two same-level neighbours with different parents (index `k` odd
   and `k+1`) are joined. A cluster that straddles a subtree boundary can join its two halves low in
   the tree instead of taking a shared ancestor, so clusters of any size can sit side by side. The
   lateral path is combinational: the receiving node adds the psum in the same cycle.
3. **Folding links.** Node `p` of level `L` gets the up-registers of `p - 2^(lvl-1)` for
   `lvl = 1 .. L-1`. Those nodes are its left child plus the right spine of its left subtree. The
   second root is treated as a node of level `log2(N)+1`, so it sees the first root and the whole
   right spine of the tree. These sources feed the eAS's left-input multiplexer, which has `L-1`
   inputs at level `L`.

### Which node accumulates a cluster

Each cluster ends at one node, its **collapse point** `c`, at level `l`, where its last two parts
meet. Its accumulator is always **`c + 2^(l-1)`**:

* if `c` has an even index in its level, this is its parent, fed by the left-child link;
* if the index is odd, this is a higher node fed by a folding link. For the first root it is the
  second root.

The accumulator reads `c` on multiplexer input `l-1`. `stift_fold_cfg` works this out for every node
from the list of collapse points. The accumulator is usually idle in the spatial reduction: an
even-index collapse point covers the middle of its parent's left subtree, so any other cluster in
the parent's range reaches its own collapse point through the lateral links instead. Exceptions
exist (see the last section); the hardware detects them.

Example, 16 MSs (second root = node 15):

| layout (cluster sizes) | collapse points | accumulators |
|---|---|---|
| 16 | 7 | 15 |
| 8, 8 | 3, 11 | 7 (tree link), 15 (folding link) |
| 4, 4, 4, 4 | 1, 5, 9, 13 | 3, 7, 11, 15 |
| 3, 5, 2, 6 | 1, 5, 8, 13 | 3, 7, 9, 15 |

## The extended adder switch (`stift_eas`)

A single two-input adder serves both modes. A second adder adds the lateral psum.

* **Adder-switch mode** (`as_cfg.en`). `add_l`, `add_r` and `add_lat` pick what enters the sum.
  `sum_to_lat` sends the sum sideways instead of up. `fwd` passes one child's psum, which belongs
  to another cluster, unchanged on the output the sum does not use. A node at a cluster boundary
  can thus send one child's psum up and the other's sideways. The lateral output never depends on
  the lateral input, so two neighbours can never form a combinational loop.
* **Accumulator mode** (`acc_en`). The adder sums the psum selected by `acc_sel` and the internal
  register. After `acc_iters` psums the total goes out on `gb_valid/gb_data` to the global buffer,
  and the register restarts at zero. The next dot product of the same cluster can follow on the
  very next cycle.

A valid bit travels with every psum. There is no back-pressure: the MSs may pause (an idle cycle
is simply a cycle with no valid psums), and the tree never stalls them. Assertions check that psums
meeting in an adder arrive in the same cycle.

## Timing

* Level-`l` outputs are registered. For a cluster that collapses at level `l`, its result appears
  on `gb_*` exactly `l` clock edges after the edge that took in its last psums.
* Every cluster takes one iteration per cycle. `I` iterations with no idle cycles finish `I-1+l`
  cycles after the first psums. This is the property that distinguishes STIFT from a plain tree.
* Within one level, a psum that crosses a lateral link passes two adders in series (the sender's
  and the receiver's) before the level register.

## Configuration interface (`stift_rn`)

| port | meaning |
|---|---|
| `cfg_load` | latch a mapping (only while no psum is in flight) |
| `cfg_as[p]` | adder-switch settings of node `p` (`stift_pkg::as_cfg_t`) |
| `cfg_collapse[p]`, `cfg_iters[p]` | a cluster collapses at `p`, with this many iterations |
| `cfg_error` | the mapping needs one accumulator twice, or one that is busy as an adder |
| `ms_valid/ms_data` | one psum per MS per cycle |
| `gb_valid[p]/gb_data[p]` | results, on the port of the accumulating node |

The spatial routing in `cfg_as` comes from an offline mapper, as in MAERI-style accelerators. The
accumulator settings are derived in hardware at load time. Level-1 nodes can never accumulate, so
their `gb_*` ports stay zero.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_MS` | 256 | leaves (power of two, 4 to 1024 with the 4-bit select) |
| `DATA_W` | 16 | psum width, INT16, wrapping two's-complement arithmetic |
| `ITER_W` | 16 | iteration counter width (up to 65535 iterations) |

## Files

* `rtl/stift_pkg.sv`: configuration types and node-geometry functions.
* `rtl/stift_eas.sv`: extended adder switch.
* `rtl/stift_fold_cfg.sv`: accumulator selection from collapse points.
* `rtl/stift_rn.sv`: the network (top).
* `tb/stift_tb_pkg.sv`: a greedy test-side mapper (routing plus collapse points).
* `tb/tb_stift_eas.sv`, `tb/tb_stift_fold_cfg.sv`: unit tests.
* `tb/tb_stift_rn.sv`: 16-wide end-to-end test. It runs the five reference layouts above (plus
  eight clusters of 2) and 300 random layouts, with idle cycles and back-to-back dot products.
* `tb/tb_stift_rn_full.sv`: default 256-wide network on the synthetic workloads, each folded
  512 times: single clusters of 2..128 MSs; 64×2, 32×4 … 1×128 clusters; irregular layouts over
  128 MSs; one cluster over all 256 MSs; and the dot-product lengths of BERT layers (768 on 256
  MSs with 3 iterations, 64 on four 64-MS clusters).

Every testbench prints `TB_RESULT checks=N failures=M`. Example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/stift_pkg.sv rtl/stift_eas.sv rtl/stift_fold_cfg.sv rtl/stift_rn.sv \
  tb/stift_tb_pkg.sv tb/tb_stift_rn_full.sv --top-module tb_stift_rn_full
./obj_dir/Vtb_stift_rn_full
```

The 256-wide test builds in about half a minute and runs in under a second.

## How far to trust it, and where it departs

* **Verified.** Values, the choice of accumulating node, exact latency and one-iteration-per-cycle
  throughput were checked for every layout above and for every random layout the test mapper
  could route, at 16 and 256 MSs. The mapping-error flag was checked too.
* **Routing is not in hardware.** The routing rule of the underlying adder tree (ART, from MAERI) is
  not reproduced. The test mapper in `tb/stift_tb_pkg.sv` is a simple greedy stand-in. It merges
  parts of a cluster at the first node or lateral link where they meet, and it routes about
  70% of random 16-wide layouts. Layouts it gives up on are skipped, not failed. So this
  repository does **not** show that every cluster layout can be served. It shows that every layout
  routed this way is served correctly.
* **Second root.** Here the second root is node `N-1` and has folding links from the whole right
  spine. A link rule that connects only the two roots would not let a cluster that collapses at
  node 11 or 13 (16-wide) reach it, which the reference layouts need.
* **Not every layout fits.** Every node on the right spine (and the first root) hands its cluster to
  the second root, so two clusters that collapse there collide. For example, in a 16-wide network,
  clusters on MSs 0..13 and 14..15 both need node 15. No routing avoids this: the first cluster
  straddles the root, and a 2-MS cluster on the last pair can only collapse on the right spine. The
  hardware refuses such a mapping with `cfg_error`. The layouts that are used to evaluate the
  design (aligned equal clusters, single clusters, the irregular example) are not affected.
* **Multiplexer count.** Only nodes from level 2 up, plus the second root, have a left-input
  multiplexer (`L-1` inputs at level `L`, so a single input at level 2): `N/2` in all. The original
  STIFT design is reported with `N-1` multiplexers, so it probably also has a selector in each
  level-1 node, which this version does not need.
* **Own choices.** The valid-bit protocol, the iteration counter inside each accumulator, the reset
  (asynchronous, active low), the configuration registers, one result port per node, the exact set
  of adder-switch modes and the error flag are all choices of this implementation.
* **Not included.** The distribution and multiplier networks, the global buffer and the DRAM are
  left out: the RN's ports stand in for them. So are floating-point (FP16/FP32) adders; only
  integer arithmetic is built. The baseline tree and accumulator-bank networks are not built
  either.
