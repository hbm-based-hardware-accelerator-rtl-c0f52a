# Streaming GNN sampler and HBM min-heap aggregator

Training or running a graph neural network with neighbour sampling spends much
of its time on two memory-bound steps: picking a few random neighbours of every
central node, and fetching and aggregating the feature vectors of those
neighbours. This RTL does both in hardware:

* **Sampling in the time domain.** A conventional hardware sampler draws a random
  number, reads memory at that address, and repeats: its cost grows with the
  sample size. Here the neighbour list of a node is instead read as one AXI
  burst. The streaming sampler decides, while each beat goes past, which
  indexes are taken. Sampling then costs only the time to stream the list.
  Most graph nodes have few neighbours (degree follows a power law), so this
  time is usually short.
* **Feature fetch over many HBM ports, aggregation by a min-heap tree.** Feature
  rows are spread over up to 32 HBM segments, each read through its own AXI
  port. The rows of one central node are scattered unevenly over those ports,
  and the ports answer at different speeds. Each port first folds the rows of
  one central node into a partial result. A binary tree of small merge cells
  then combines the partial results of all ports. The central node travels with
  its rows as the AXI ID, called the **CID** below. The tree works like a
  k-way merge keyed on that ID.

The block structure follows the architecture published as "HBM-based Hardware
Accelerator for GNN Sampling and Aggregation" (Gui et al.). That description
fixes the sampler's comparator array, the per-port partial aggregation and the
tree cell's rule. It leaves open the handshakes, the batch protocol, the
widths and the memory layout; those are this implementation's own choices, and
each is listed below.

## Dataflow

```
 node stream ─► sampler_ctrl ──► onchip_mem   {neighbour-list base, degree}
                     │  └──────► rand_gen     SAMPLE positions in [0, degree)
                     │                 │ (latched by the sampler)
   HBM neighbour ◄───┤ AXI bursts      ▼
   index port ───────┴─► streaming_sampler ─► feature_acq_array
                                                 sample_dispatch (buffer, 1 sample/cycle)
                                                 feature_port × N_SEG ─► HBM feature ports
                                                                              │ R (RID = CID)
                         partial_aggregator × N_SEG ◄─────────────────────────┘
                                   │ (FIFO per segment)
                         minheap_aggregator (N_SEG-1 agg_tree_cell)
                                   │
                         agg_mean ─► agg_* result stream
```

`gnn_sa_top` wires these together. The HBM is not part of the RTL. Its
neighbour-index port and its `N_SEG` feature ports are AXI read channels (AR
and R only) on the top's boundary.

## The streaming sampler

For each central node, `rand_gen` produces `SAMPLE` (32) random positions in
`[0, degree)`. The sampler latches them and clears a position counter. The
neighbour list then streams in, `WAYS` (4) indexes per beat. On every beat:

* way `w` sits at position `counter + w`;
* that position is compared with all 32 latched random numbers (a 4 × 32
  comparator array);
* the OR of a way's comparators is its **sample mask bit**;
* the number of comparators that match is its **multiplicity**;
* the counter then advances by `WAYS`.

If two random numbers collide, the OR counts the neighbour once. That is
sampling without replacement, and it can yield fewer than 32 samples. The
multiplicity gives sampling with replacement: exactly 32 samples, duplicates
included. Both are computed on every beat. The `with_repl` input chooses which
one the dispatcher uses; with it set, a neighbour is fetched once per copy.

`rand_gen` keeps one xorshift32 generator per lane. It maps a raw value `x`
into range as `(x * degree) >> 32`, which needs no divider. Every lane steps
once per central node.

## CIDs, batches and why the tree never deadlocks

This is the part that needs the most care.

* **CIDs.** The controller numbers the central nodes of a batch 0, 1, 2, …
  That number is the AXI ID of every read made for the node, and it follows
  the node's rows through the whole pipeline. The ID is 6 bits wide, so a
  batch has at most 64 nodes. A batch ends at a node flagged `nd_last`, or
  after 64 nodes.
* **End-of-batch marker.** When a batch ends, the controller sends an
  end-of-batch beat through the sampler. The dispatcher hands it to every
  segment's queue in the same cycle. Each `feature_port` holds it until all of
  its outstanding reads have returned, then passes it to its partial
  aggregator. The aggregator flushes the partial result it is building and
  pushes a marker entry into its FIFO.
* **Order within a segment.** Reads are issued in CID order. Responses on a
  port are assumed to come back in request order (HBM controllers keep order
  per port). So every partial-result FIFO holds strictly increasing CIDs,
  closed by a marker.
* **Tree cell rule.** A cell waits until both of its inputs hold an entry.
  - Equal CIDs: the two vectors are combined lane by lane, the row counts are
    added, and both inputs are consumed.
  - Different CIDs: the smaller CID goes on, and the larger one is held. Its
    `ready` stays low, which also holds everything behind it up the tree.
  - A marker counts as larger than any CID. When two markers meet, one marker
    goes on.

  The cell never passes a CID while one input is empty, because that input
  could still deliver a smaller or equal CID. The root therefore emits every
  CID that had at least one sample exactly once, fully aggregated, in
  increasing order, and then one marker per batch.
* **No deadlock.** A segment contributes at most one partial result per CID, so
  one batch puts at most 64 entries and one marker into each FIFO. The FIFO
  depth is 2^ID_W + 2 = 66. While a batch is still being dispatched, no FIFO
  can fill up, so no port stops returning data, and every segment's marker
  eventually arrives. Only then can the next batch's entries queue behind it.
  The testbenches hold the result stream off for thousands of cycles across
  two batches to check this.

A central node of degree 0 uses up its CID but produces no samples and no
result. The consumer sees a gap in the CID sequence.

## Feature layout in HBM and the two operating modes

Each feature segment is 256 MB. A block of `2^seg_shift` consecutive node
indexes lives in each segment: segment = `v >> seg_shift` and row =
`v mod 2^seg_shift`. Rows are 1024 bytes apart, which is room for the largest
supported feature (1024 INT8 values). The read address is
`segment·2^28 + row·1024`. The power-of-two block size is a choice of this
design.

| mode | inputs | what happens |
|---|---|---|
| aggregate | `acq_only=0`, `feat_beats = DIM·8/256` (4 for 128-dim) | rows are aggregated; one result per central node on `agg_*` |
| raw acquisition | `acq_only=1`, `feat_beats` up to 32 (1024 dims) | rows are read and left on the HBM data ports for the consumer; only the batch markers reach `agg_*` |

`op` selects `AGG_SUM`, `AGG_MAX`, `AGG_MIN` or `AGG_MEAN` (signed INT8 lanes,
16-bit accumulators). For the mean, the partial aggregators and the tree add
the rows, and `agg_mean` divides by the row count at the root, rounding toward
zero. Every result also carries its row count `agg_cnt`. Hold all
configuration inputs stable during a batch.

## Top-level interface (`gnn_sa_top`)

| group | signals | notes |
|---|---|---|
| config | `op`, `with_repl`, `acq_only`, `seg_shift[5:0]`, `feat_beats[5:0]` | static per batch |
| table load | `tbl_we`, `tbl_waddr`, `tbl_wbase[32:0]`, `tbl_wdegree[31:0]` | `base` = byte address of the node's neighbour list; the list must start on a 16-byte beat boundary |
| central nodes | `nd_valid`, `nd_ready`, `nd_id[31:0]`, `nd_last` | `nd_last` closes a batch |
| neighbour port | `nbr_ar_*` (ID 6, addr 33, len 8), `nbr_r_valid/ready/data[127:0]` | bursts of at most 16 beats |
| feature ports | `fa_ar_*[N_SEG]`, `fr_valid/ready/id/data[255:0]/last[N_SEG]` | one burst per sample, ARID = CID |
| results | `agg_valid`, `agg_ready`, `agg_eob`, `agg_cid`, `agg_cnt[7:0]`, `agg_vec[DIM][15:0]` | `agg_eob` = end of batch |

All streams use valid/ready. Reset is asynchronous and active low.

## Parameters

Defaults live in `rtl/gnn_pkg.sv`. Most modules also take them as `P_*`
parameters.

| name | default | origin |
|---|---|---|
| `WAYS` | 4 | published example of the sampler (4 indexes per beat) |
| `SAMPLE` | 32 | published sample size |
| `N_SEG` | 32 | published maximum number of HBM ports |
| `SEG_LOG2` | 28 | 256 MB segments, published |
| `DIM` | 128 | published hidden dimension for aggregation |
| `MAX_FEAT_DIM` / `ROW_BYTES` | 1024 | published maximum feature length |
| `ELEM_W` | 8 | INT8, published |
| `HBM_DW` | 256 | own choice (width of one HBM AXI port) |
| `ID_W` | 6 | own choice (batch of 64 central nodes) |
| `ADDR_W` | 33 | own choice (8 GB) |
| `MAX_BURST` | 16 | own choice |
| `NODES` | 262144 | own choice (covers graphs up to 2^18 nodes) |
| `ACC_W`, `CNT_W` | 16, 8 | own choice; a sum of 32 INT8 values fits 13 bits |
| FIFO depths | sample buffer 16, request queue 8, results 66, 16 reads outstanding | own choice |

## Timing

* sampler: one beat (4 neighbours) per cycle, one register stage;
* dispatcher: one sample per cycle into the segment queues;
* each partial aggregator: one beat per cycle;
* tree: one register per level; once full, the root delivers one aggregated
  central node per cycle;
* mean stage: one more register.

The published prototype ran at 100 MHz on an FPGA with 8 GB of HBM. No
timing closure has been done on this RTL.

The controller handles one central node at a time. A node's table lookup and
random numbers take two cycles, then its burst(s) stream. Sampling of the next
node overlaps with the feature reads of earlier nodes.

## How far to trust it, and where it departs from the published design

Each of these is a choice of this implementation, not part of the published
design:

* batches, CID numbering, the end-of-batch marker, and the "wait for both
  inputs" reading of the tree cell rule;
* in-order responses per HBM port; out-of-order responses across IDs would
  need reordering in front of the partial aggregators;
* the dispatcher hands on one sample per cycle, which can limit throughput
  when many ports are idle;
* only one central node's neighbour list is in flight at a time, because the
  sampler's latched random numbers belong to a single node;
* mean aggregation is done once after the tree, with truncating division;
* degree-0 nodes give no result;
* the random generator and its range reduction;
* all widths and FIFO depths.

Not in the RTL: the HBM itself (a behavioural AXI read model is in
`tb/hbm_rd_model.sv`), the host, and the conventional random-address sampler
that the streaming sampler replaces.

The published evaluation graphs are PubMed, PPI, NELL, Flickr, OGBN-arxiv and
Reddit (19,717 to 232,965 nodes; 50 to 602 features, NELL 61,278 sparse). All
of them fit the default sizes:

* node table: 2^18 entries;
* 128-dim aggregation;
* rows of up to 1024 INT8 values; NELL only after compressing its sparse
  features into that length;
* 32 segments × 8192 nodes with `seg_shift = 13`;
* 33-bit addresses, enough for Reddit's 115 M edges (about 437 MB of
  neighbour indexes).

## Simulating

Every block has a self-checking testbench in `tb/`, ending with a
`TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gnn_pkg.sv tb/tb_gnn_sa_top.sv \
          --top-module tb_gnn_sa_top -o sim && ./obj_dir/sim
```

Substitute any testbench name:

* `tb_streaming_sampler`, `tb_rand_gen`, `tb_onchip_mem`, `tb_sampler_ctrl`,
  `tb_sample_dispatch`, `tb_feature_port`, `tb_feature_acq_array`,
  `tb_partial_aggregator`, `tb_agg_tree_cell`, `tb_minheap_aggregator`,
  `tb_agg_mean`: block tests;
* `tb_gnn_sa_top`: end to end with 4 segments and a 1024-node graph, in every
  mode (sum, mean, max, min, with and without replacement, raw acquisition).
  It compares every result with a reference model and counts split bursts,
  duplicate samples, degree-0 nodes, forced batch ends, held and merged tree
  cells, and FIFO back-pressure;
* `tb_gnn_sa_top_full`: the top at its default size (32 segments, 2^18-entry
  table), 80 central nodes of a 262,144-node graph, mean aggregation, checked
  against the reference. It takes about a minute, mostly compilation;
* `tb_workload_pubmed`: a graph of PubMed size (19,717 nodes, mean degree
  about 4.5, power-law-like), run on the default-size top. It does mean and
  max aggregation and raw acquisition of 500-byte rows. The other evaluation
  graphs differ only in size; their fit is argued above rather than
  simulated, because their node and edge counts make a cycle-accurate run
  long.

The graph used by the testbenches is generated by hash functions
(`tb/tb_graph_pkg.sv`), so no data files are needed.
