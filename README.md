# OCO-GAT: a Graph Attention Network accelerator with a reordered calculation

A Graph Attention Network (GAT) layer computes, for every node `i`,

```
h'_i  = W h_i
a_ij  = exp(LeakyReLU(a^T [h'_i || h'_j])) / sum_k exp(LeakyReLU(a^T [h'_i || h'_k]))
z_i   = ELU( sum_j a_ij h'_j )
```

Done literally, this needs a division for every edge. Worse, no weighted sum can start until
all neighbours of `i` have been visited to get the denominator. That forces a pipeline to
drain at every node. This design computes the same result in a different order:

```
h'_i = W h_i                       p_i = a1 . h'_i        q_j = a2 . h'_j
e_ij = LeakyReLU(p_i + q_j)        e'_ij = exp(e_ij)
z_i  = ELU( (sum_j e'_ij h'_j) / (sum_j e'_ij) )
```

Each edge now yields two quantities, `e'_ij` and `e'_ij h'_j`, which are only summed. The one
division per node (per output element) is moved to the very end. Edges of different source
nodes can therefore follow each other through the pipeline with no gap. The attention kernel
is split into `a1` and `a2`, which turns the dense part of the attention into two dot products
per node, done right after `W h`.

The RTL is SystemVerilog 2017 and synthesizable. Behavioural code is used only in `tb/`.

## Block structure

```
            external storage (one port, 16 x 16-bit words)
                         |
                  main_controller  ------------------------------+
                   |          |                                  |
          combination_module  |  adjacency stream                | result read-back
   (320 x 16 PE array, Weight |                                  |
    and Node Feature Buffers) |                                  |
                   | h',p,q   |                                  |
                 distributor <+                                  |
        /            |            \                              |
 agg_computing_module x 4  (one per sub-slice of target nodes)   |
   16 lanes each: indexing_controller + computing_pe +           |
   left-attn / right-attn / com-result / adjacency buffers       |
        \            |            /                              |
              agg_sync_module: 16 sync_pe + Result Bank ---------+
```

* **combination_module** handles one node at a time. Each cycle its `ROWS x COLS` array of
  `comb_pe` multipliers multiplies `ROWS` input features with `ROWS` rows of `W^T`. A column
  adder tree and an accumulator finish `h'` in `ceil(F / ROWS)` cycles. Two 16-element dot
  products then give `p` and `q`.
* **distributor** writes the results into the aggregation buffers. Node `n` is a *target* in
  sub-slice `s = n div tgt_per_acm`: its `q_n` and `h'_n` go to every lane of module `s`. It is
  also a *source* in group `g = n div src_per_lane`: its `p_n` goes to lane `g` of every
  module. Adjacency entries arrive tagged with their lane and are appended to that lane's
  adjacency buffer.
* **agg_computing_module**: each of the 4 modules has 16 lanes. Each lane owns a private copy of
  all four buffers (the distributed storage), so no lane ever waits for another's memory port.
* **agg_sync_module**: Sync PE `g` combines lane `g` of all four modules. Those lanes hold the
  same source nodes, each against a different quarter of the targets.

## The node-pair pipeline

This is the part that makes the design work, and the part to read first in the code.

A lane turns its adjacency list into one *task* per edge, one per cycle:

| step | stages | module | work |
|---|---|---|---|
| Indexing | 2 | `indexing_controller` | read adjacency entry; read `p_i`, `q_j`, `h'_j` |
| 1st Step | 3 | `computing_pe` | register, `p+q` (saturating), LeakyReLU (slope 51/256) |
| 2nd Step | 4 | `computing_pe` | `x * log2 e`, table lookup, interpolation, shift: `e' = exp(e)` |
| 3rd Step | 3 | `computing_pe` | `e' * h'_j` (16 multipliers), accumulate, output register |
| Sync | 3 | `sync_pe` | sum over 4 modules, divide, ELU |

Every task carries its source id, a `last` flag (final neighbour of this source in this
sub-slice) and an `empty` flag. The Coeff Reg and Product Reg start afresh on the task after a
`last`. The task with `last` set sends the two sums to the Sync module 10 cycles after it left
the Indexing stage. No stage ever waits for a source node to finish.

**Empty tokens.** A source may have no neighbour in some sub-slice. Its adjacency list there
then holds one entry flagged `empty`. That entry adds zero but still closes the source, so each
of the four modules emits exactly one partial result per source, in the same order. The Sync PE
can then match results by position: it pops one entry from each module's buffer when all four
have one (an assertion checks that the ids agree).

**Sync buffers and stall.** The four modules progress at different speeds, because a source
can be dense in one sub-slice and sparse in another. Each Sync PE therefore has a Coeff Buffer
and a Product Buffer (FIFOs, 32 deep) per module. When one of them has fewer than 16 free
entries (`AFULL_MARGIN`), it raises `stall` to its lane. The lane then stops issuing new tasks.
Up to 12 tasks are already in flight, and the margin leaves room for all of them. A Sync PE
whose inputs are partly empty shows `sync_waiting`. The top brings both signals out as
`lane_stall` and `sync_waiting`.

**Division.** `z_c = (sum e'h'_c << 8) / sum e'` is computed for the 16 elements, once per
node. A node with no neighbour at all gets `z = 0`.

## Number formats

| quantity | format |
|---|---|
| features, weights, `a1`, `a2`, `h'`, `p`, `q`, `e`, `z` | signed 16-bit, 8 fraction bits (Q7.8) |
| `e' = exp(e)` | unsigned 24-bit, 12 fraction bits; saturates above `e = 8.3`, underflows to 0 below `-8.3` |
| coefficient and product sums | signed 40-bit, 12 fraction bits |

`h'`, `p` and `q` are rescaled with an arithmetic shift and saturated to 16 bits.
`exp(x)` is computed as `2^(x log2 e)`. The integer part of the exponent becomes a shift. The
fraction is looked up in a 65-entry table of `round(2^(k/64) * 65536)` and linearly
interpolated, for a relative error of about 1e-4. The helpers live in `oco_pkg`. The ELU of the
Sync PE reuses them.

## External storage layout and job configuration

A host prepares the graph and fills the storage. Addresses count 256-bit words (16 values).

* **Adjacency** at `cfg_adj_base`: first a word holding the entry count `T` in bits 31:0, then
  `T` words. Each has the lane number `L = s * 16 + g` in bits 31:16 and an entry in bits 15:0:
  `{empty, last, tgt[13:0]}`. Here `tgt` is local to the sub-slice (`j - s * tgt_per_acm`).
  Within one lane, entries must follow the group's source nodes in ascending order. Lanes may
  be interleaved.
* **Weights** of head `h` at `cfg_wgt_base + h * cfg_wgt_stride`: `f_in` words of `W^T`
  (word `k` = the 16 weights of input feature `k`), then `a1`, then `a2`.
* **Features**: node `n` at `cfg_feat_base + n * cfg_feat_stride`, as `ceil(f_in / 16)` words.
* **Results**: `z` of node `n`, head `h` at
  `cfg_res_base + h * cfg_res_stride + n * cfg_res_nstride`. With `res_stride = 1` and
  `res_nstride = n_heads`, the eight heads of a node are contiguous. That is exactly the feature
  layout the next layer reads (`f_in = 128`, `feat_stride = 8`).

`cfg_tgt_per_acm` and `cfg_src_per_lane` set the partition. The node count must be at most
`4 * tgt_per_acm` and at most `16 * src_per_lane`, with `tgt_per_acm <= TGT_MAX` and
`src_per_lane <= SRC_MAX`. Assertions check this when `start` is given.

A job runs as follows: load the adjacency once. Then, for each head: load the weights, load
every node's features and run the combination, run the aggregation, and write back the
results. `done` pulses at the end.

**Storage port.** A read request `rd_req`/`rd_addr` is taken when `rd_ready` is high. Answers
come back in order on `rd_valid`/`rd_data`, with any latency, and several reads may be
outstanding. A write `wr_req`/`wr_addr`/`wr_data` completes when `wr_ready` is high.

## Parameters (top-level defaults)

| parameter | default | meaning |
|---|---|---|
| `N_ACM` | 4 | Aggregation Computing Modules (sub-slices) |
| `LANES` | 16 | Computing PEs per module = Sync PEs |
| `COLS` | 16 | hidden dimension (`h'` length) |
| `ROWS` | 320 | input features per combination cycle (320 x 16 = 5120 PEs) |
| `F_IN_MAX` | 4096 | longest input feature vector |
| `SRC_MAX` | 256 | source nodes per lane (slice: 16 x 256 = 4096 nodes) |
| `TGT_MAX` | 1024 | target nodes per module (4 x 1024 = 4096 nodes) |
| `ADJ_MAX` | 4096 | adjacency entries per lane |
| `FIFO_DEPTH` | 32 | Sync buffer depth per module |

The PE counts (5120 combination PEs, 64 computing PEs, 16 sync PEs) match the reference
configuration. How they are split into rows, columns and modules, and all buffer depths, are
this implementation's choices.

## What it runs, and what it does not

At the defaults, Cora (2708 nodes, 1433 features, hidden size 16) and Citeseer (3327 nodes,
3703 features) fit into one slice. Each layer is one job. The second layer is a second job that
reads the first layer's node-major results.

Not implemented:

* **Slice switching.** Graphs with more than 4096 nodes (Pubmed, PPI) would need the controller
  to step through row bands of the adjacency matrix. It does not.
* **Hidden sizes above `COLS`** (PPI uses 128). These would need several column passes.
* **Overlapping heads and layers.** Running the combination of the next head during the
  aggregation of the current one needs ping-pong buffers, which are not built. Heads run one
  after another.
* **A layer loop in hardware.** The host starts each layer.
* **The DDR4 memory and its controllers.** They are outside the design; the testbenches use a
  behavioural model.

## Where the time goes

In the Cora-sized run, one layer takes about 3.0 million cycles. Only about 10 thousand of
them are spent in aggregation. The rest goes to streaming the 90 feature words of each node,
for each head, through the single 256-bit storage port. The Combination Module needs 5 cycles per
node, but it gets its data at one word per cycle. The aggregation pipeline is therefore far
from the limit in this configuration. To shorten the run, widen the storage interface, or keep
the features on chip across heads.

## Files

`rtl/`: `oco_pkg` (formats, exp/ELU/LeakyReLU helpers, adjacency entry type), `buffer_ram`,
`comb_pe`, `combination_module`, `distributor`, `indexing_controller`, `computing_pe`,
`agg_computing_module`, `sync_fifo`, `sync_pe`, `agg_sync_module`, `main_controller`,
`oco_gat_top`.

`tb/`: one self-checking testbench per block, `tb_<module>.sv`. Three end-to-end benches share
`tb_oco_body.svh`. `tb_oco_gat_top` runs at reduced size. `tb_oco_gat_full` runs with all
defaults on 512 nodes, 400 features and 2 heads. `tb_oco_gat_cora` also uses the defaults. It
runs a Cora-sized first layer: 2708 nodes, 1433 features and 8 heads, with about 29k random
adjacency entries. `ext_mem_model.sv` is the storage model.

The end-to-end benches build a random graph. Part of it is dense in one sub-slice, so that
lanes stall and Sync PEs wait, and it includes an isolated node. They compute `h'`, `p` and `q`
exactly in integer arithmetic. The softmax, division and ELU are computed in floating point.
Every embedding must agree within 4/256. The benches also count how often each mechanism
occurred (stalls, Sync waits, empty tokens, an isolated node, read backpressure, several heads,
multi-chunk nodes) and fail if any of them never happened. The unit benches check cycle
latencies as well as values.

## Simulating

Run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/oco_pkg.sv \
    tb/tb_oco_gat_top.sv --top-module tb_oco_gat_top -o sim && ./obj_dir/sim
```

Replace the bench name for any other test. Each bench prints
`TB_RESULT checks=<n> failures=<m>`. The full-size bench takes about two minutes to compile
and a few seconds to run.
