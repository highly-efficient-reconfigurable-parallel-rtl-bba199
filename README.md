# Parallel grid graph-cut engine

This engine computes the minimum s-t cut (equivalently the maximum flow) of a
4-connected grid graph. Binary labelling problems in vision, such as foreground/background
segmentation, reduce to this: each pixel is a node, its data cost becomes the capacities to
the source and the sink, and the smoothness cost becomes the capacity of the arcs to its four
neighbours. The cut splits the pixels into two sides. That split is the optimal labelling.

A single max-flow search is hard to run in parallel. The engine sidesteps this with *dual
decomposition*. It cuts the grid into strips that overlap by one row, solves each strip on
its own core, and then adjusts the overlap until the strips agree. At the default size
there are 16 cores of 32 x 32 nodes, so 16K nodes and 64K arcs sit on chip at once. The
host streams each batch in over a byte-wide bus, using a compact delta-coded packet format.
The engine returns one bit per node.

## Contents

| file | role |
|------|------|
| `rtl/bk_pkg.sv` | shared constants, packet kinds, the decoded command struct |
| `rtl/bk_parallel_engine.sv` | top: arbiter, per-core FIFO + decoder + core, control unit |
| `rtl/load_arbiter.sv` | hands bus packets to the cores in round-robin order |
| `rtl/core_fifo.sv` | byte FIFO in front of each core |
| `rtl/delta_decoder.sv` | expands node and arc packets into graph commands |
| `rtl/bk_core.sv` | one max-flow / min-cut core over a 32 x 32 grid |
| `rtl/control_unit.sv` | solve / agree iteration and label write-back |
| `tb/graph_ref_pkg.sv` | reference grid graph with an Edmonds-Karp max-flow, for checking |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_engine_full` at full size |

## Splitting the graph

A batch is a grid of `R = N_CORES*(GRID_H-1) + 1` rows by `GRID_W` columns. At the defaults
this is 497 x 32 = 15904 distinct nodes. Core `b` holds rows `b*(GRID_H-1)` to
`b*(GRID_H-1) + GRID_H-1`. So the last row of core `b` and the first row of core `b+1` are
the same graph nodes. This is the *overlap*.

The host prepares each strip before sending it:

* Every weight that belongs to an overlap node is halved and given to both copies. This
  covers the node's source and sink capacities and the horizontal arcs inside the overlap
  row. Adding the two strips back together then gives exactly the original graph.
* Vertical arcs are never shared. Each one belongs to exactly one strip.
* The engine assumes weights are already split. It does not do the halving itself.

If both copies of every overlap node end up with the same label, the joined labelling is
a minimum cut of the whole graph. The two halves' costs simply add up, and neither half
can do better on its own. When the copies disagree, the engine runs the agreement
iteration described below.

## Loading: packets, delta coding and the arbiter

The host sends four kinds of packet. Bits [7:6] of the first byte give the kind.

| kind | bytes | layout (byte 0 first) |
|------|-------|------------------------|
| NODE_U | 6 | `{00, id[13:8]}`, `id[7:0]`, `cs[15:8]`, `cs[7:0]`, `ct[15:8]`, `ct[7:0]` |
| NODE_C | 3 | `{01, 000000}`, `dcs`, `dct`: the node id is the previous id + 1 |
| ARC_U | 8 | `{10, i[13:8]}`, `i[7:0]`, `{00, j[13:8]}`, `j[7:0]`, `cap[15:8]`, `cap[7:0]`, `rev[15:8]`, `rev[7:0]` |
| ARC_C | 4 | `{11, 0000, dir}`, `di`, `dcap`, `drev`: `i` = previous `i` + `di`, and `j` is the neighbour of `i` in direction `dir` |

Field meanings:

* `cs` and `ct` are the node's source and sink capacities.
* `cap` is the capacity of arc i→j, and `rev` the capacity of arc j→i.
* Node ids are local to the core, in row-major order.
* Directions are 0 = right, 1 = left, 2 = down and 3 = up.

How delta coding works:

* A compressed packet gives each value as a signed byte.
* That byte is added to the same field of the previous packet of the same kind (node or
  arc) for the same core.
* The host uses the compressed form whenever all the differences fit in a byte. Neighbouring
  pixels usually have similar weights, so that is most of the time.
* Otherwise it sends the uncompressed form, which also resets the reference.
* On random test grids about 96% of packets were sent compressed.

Packets go over one shared bus, one byte per cycle with valid/ready.

* **Arbiter.** `load_arbiter` reads each packet's length from its first byte. It gives
  packet `k` of a batch to core `k mod N_CORES`, so the host must interleave its packets
  core by core.
* **Per-core path.** Each core has its own byte FIFO (`core_fifo`) and decoder
  (`delta_decoder`).
* **Graph building overlaps the transfer.** A core writes each decoded command into its
  graph memory in one cycle, so all 16 cores build their graphs while the bus streams.
* **Stalls.** When the FIFO of the addressed core is full, the arbiter holds the bus
  (`bus_ready` low). The cycles spent this way are counted in `n_bus_stall`.
* **Reset of the references.** The decoders' delta references are reset at the end of
  every batch.

## The core: how one strip is solved

`bk_core` holds per node:

* a signed *terminal residual* `tr = cs - ct`. A positive value is spare capacity from
  the source, and a negative value is spare capacity to the sink. Only the difference
  matters for the cut, so the two weights are folded into one number;
* the residual capacity of its four outgoing arcs, `rc[dir][node]`. The reverse of
  direction `d` is `d ^ 1`.

Solving is a breadth-first augmenting-path search that examines one arc per cycle:

1. **Scan.** Take nodes in index order as roots. A node with `tr > 0` that is not yet
   marked starts a search.
2. **Grow.** Breadth-first from the root, over arcs with residual capacity. Mark every
   node reached and remember the direction it was entered from.
3. **Augment.** The search stops on the first node with `tr < 0`. The path back to the
   root is walked twice:
   * the first walk finds the bottleneck: the smallest of the root's `tr`, the end's
     `-tr` and the arc residuals on the path;
   * the second walk pushes it. Each forward residual drops by the bottleneck, each
     reverse residual rises by it, and both `tr` values move toward zero.
4. **Unmark and retry.** Only the nodes of this tree are unmarked. The same root is
   searched again.
5. **Close a tree.** If a search runs out without finding a sink, its tree stays marked.
   Later augmentations all start at unmarked roots and run through unmarked nodes. So they
   never change an arc into or out of a closed tree, and the tree can never reach a sink
   again. It is not searched again.

When every root has been handled, the marked set is exactly the set of nodes reachable
from the source in the residual graph. That set is the source side of the minimum cut, and
it is output as `labels` (1 = source side). For any given graph the labelling is
deterministic: it is the smallest source side among the minimum cuts.

Between solves the control unit can add a signed amount to any node's `tr`. The residual
graph is kept. The next solve therefore starts from the flow already found, and only the
nodes whose dual variable moved need new work.

Cost: the default 32 x 32 core stores 1024 x (24 + 4 x 17) bits of graph. It also keeps a
queue, parent directions and the mark bits. Solve time depends on the graph. A random
1K-node graph took about 170K cycles from scratch; a re-solve after a few terminal changes
only has to repair what those changes disturbed.

## Agreement iteration (control unit)

For each overlap node, the dual variable λ is added to the energy of one copy and
subtracted from the other. Both copies then see the same total cost. λ moves until the
copies agree. The control unit runs the iteration:

1. **Solve.** Start all cores and wait for every `done`.
2. **Compare.** Compare the two copies of each overlap node. Where they differ, move λ by
   the current step toward agreement. λ is not stored. The change is sent straight into
   both copies' `tr`:
   * in core `b` (the copy in its bottom row), `-step` if that copy is on the source side
     and `+step` otherwise;
   * in core `b+1` (the copy in its top row), the opposite.
3. **Send the adjustments.** They go out in two passes of `GRID_W` cycles: bottom rows
   first, then top rows. Each core therefore takes at most one adjustment per cycle.
4. **Finish or repeat.**
   * If nothing differed, the batch has *converged*.
   * Otherwise the unit solves again (step 1).
   * After `MAX_ITER` solves it gives up with `converged` low. The labels are still
     written back, but overlap copies may then disagree.

The step starts at `STEP` = 8 and is halved after every `HALVE` = 8 solves, down to 1.
With a fixed step, a few overlap nodes can flip back and forth forever. With the shrinking
step they settle. In tests the iteration count ranged from 1 solve (no disagreement at all)
to 136 solves for a full 16-core batch of random weights.

## Write-back

After the last solve the labels go out on `wb_*`, a valid/ready byte stream:

* cores in order, core 0 first, then nodes in order within each core;
* eight labels per byte, with the lowest node in bit 0;
* `N_CORES * GRID_W * GRID_H / 8` bytes in all (2048 at defaults);
* overlap rows are sent by both of their cores.

Then `done` pulses, with `converged` and `iterations` valid. The cores are cleared, which
takes 1K cycles, ready for the next batch.

## Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `bus_data`, `bus_valid`, `bus_ready` | in/in/out | 8/1/1 | packet byte stream |
| `solve_req` | in | 1 | pulse after the last byte of a batch |
| `wb_data`, `wb_valid`, `wb_ready` | out/out/in | 8/1/1 | label byte stream |
| `busy`, `done` | out | 1 | batch in progress; end-of-batch pulse |
| `converged`, `iterations` | out | 1/16 | result of the last batch |
| `n_pkt_compressed`, `n_pkt_plain` | out | 32 | packets decoded since reset |
| `n_bus_stall` | out | 32 | cycles the bus was held by a full FIFO |
| `n_adjust` | out | 32 | dual steps sent |
| `n_aug` | out | 32 | augmenting paths pushed, all cores |
| `arc_err` | out | 1 | sticky: an arc between non-neighbours was received and ignored |

Using the top:

* A batch may be sent as soon as `busy` is low.
* `solve_req` may be pulsed right after the last byte. The control unit waits until every
  FIFO and decoder is empty before it starts the cores.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CORES` | 16 | cores (strips) |
| `GRID_W`, `GRID_H` | 32, 32 | nodes per core, columns x rows |
| `FIFO_DEPTH` | 16 | bytes per core FIFO |
| `MAX_ITER` | 256 | solve limit per batch |
| `STEP`, `HALVE` | 8, 8 | initial dual step; solves between halvings |

Limits on the widths:

* Weights are 16 bits.
* Terminal residuals are 24 bits, signed.
* Arc residuals are 17 bits, so an arc can hold its capacity plus its reverse's.
* Node ids in packets are 14 bits, so a core can hold up to 16K nodes.

## Measured behaviour

Full size (defaults), one batch on a 497 x 32 grid. The weights form a random field that
drifts smoothly and jumps now and then. Terminal weights run from 0 to 1000 and arc weights
from 0 to 300:

* Loading took 182,743 cycles for 182,055 bytes, so the bus was busy 99.6% of the time.
  Packets: 46,220 compressed, 1,908 plain, 688 stall cycles.
* Solving, agreement and write-back took 1,282,932 cycles: 136 solves, 2,699 dual steps
  and 24,732 augmenting paths.
* The result was converged, and the cut equals the reference maximum flow (3,968,400).

At 260 MHz this batch would take about 5.6 ms in total.

With 8 cores of 32 x 64 nodes (`N_CORES=8, GRID_H=64`), a batch of the same kind on a
505 x 32 grid loads in 184,432 cycles. It solves in 1,333,186 cycles (62 solves) and is
also exact. The reference design reports 1.79 ms for this configuration. The sub-graphs
are larger here, but there are fewer overlaps to agree on. The reference design this
architecture follows reports 0.95 ms for a 16K-node batch on 16 cores. See the departures
below.

## Departures from the reference design

* **Core algorithm.** The reference cores run the Boykov–Kolmogorov algorithm. That
  algorithm grows a source tree and a sink tree and repairs them between augmentations.
  This core grows only source-side breadth-first trees and rebuilds the current tree after
  each augmentation. It finds the same minimum cut, in more cycles.
* **Bus width.** The bus is one byte per cycle. The reference figures imply about
  520 MB/s at 260 MHz, which is two bytes per cycle.
* **Latency.** Measured latency is about six times the reference figure. This comes from
  the core algorithm, the one-arc-per-cycle search, and the iteration schedule of the
  agreement loop.
* **Split dimension.** Only the one-dimensional (row-strip) split is built. A 4 x 4
  two-dimensional arrangement of strips is described as an extension for large images
  and is not included.
* **Host-side work.** These parts run on the host and are not part of this RTL:
  * splitting large images into 16K-node batches and merging their results;
  * halving the overlap weights;
  * delta encoding;
  * ordering the packets.

  The testbenches contain a model of the host's packet encoder.
* **Packet fields.** The packet sizes (6/3 bytes per node, 8/4 per arc) follow the
  reference. The field layout within each packet is this design's own.

## Verification

Every module has a self-checking testbench that ends with a `TB_RESULT checks=… failures=…`
line and has a watchdog.

| testbench | what is checked |
|-----------|-----------------|
| `tb_core_fifo` | random push/pop against a queue model, full/empty, back-pressure |
| `tb_load_arbiter` | 600 random packets to 16 cores; every byte arrives at the right core in order; stalls |
| `tb_delta_decoder` | random packet streams from a host-encoder model; every command against the source graph; reference reset |
| `tb_bk_core` | three random 32 x 32 graphs; labels against Edmonds-Karp (flow and cut); three rounds of random terminal changes with incremental re-solve; `clear`; `arc_err` |
| `tb_control_unit` | behavioural cores; exact adjustment list and signs, write-back bytes, convergence, `MAX_ITER` limit, step schedule |
| `tb_bk_parallel_engine` | 4 cores of 8 x 8, three batches; engine cut equals the reference max flow; overlap agreement; load throughput; each mechanism (compressed/plain packet, stall, dual step, re-solve, convergence) seen |
| `tb_engine_full` | same as above at the default size, one batch (about one minute of simulation) |
| `tb_engine_8core` | same as above with 8 cores of 32 x 64 nodes (16K nodes in all), one batch |

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bk_parallel_engine \
    rtl/bk_pkg.sv tb/graph_ref_pkg.sv rtl/core_fifo.sv rtl/load_arbiter.sv \
    rtl/delta_decoder.sv rtl/bk_core.sv rtl/control_unit.sv rtl/bk_parallel_engine.sv \
    tb/tb_bk_parallel_engine.sv
./obj_dir/Vtb_bk_parallel_engine
```

For another testbench:

* Change the top module and the last file.
* The unit testbenches need only `bk_pkg.sv`, `graph_ref_pkg.sv` where they use it, and
  the module under test.
* Packages must come first on the command line.
