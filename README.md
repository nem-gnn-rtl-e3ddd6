# NEM-GNN: a near-memory GNN layer engine built into a CPU's L1 cache

A graph convolutional layer computes `ReLU(D^-1 · Â · H · W)`: every node's
feature vector `H_i` is multiplied by a dense weight matrix (the *combination*),
and the results are summed over each node's neighbours and itself (the
*aggregation*), normalised by the node degree. Combination is dense and
regular; aggregation is sparse and irregular. This design turns the L1 data
cache of a CPU core into the combination engine and puts a small amount of
logic next to it for the rest:

* The weights sit in the SRAM banks. An 8T SRAM cell has a separate read port
  whose read bit line only discharges when both the stored bit *and* the read
  word line are 1. Driving a feature bit onto the read word line therefore
  reads out `W AND h` for a whole weight row in one access, with no DAC or ADC.
  Eight such bit-planes, shifted and added, give `W · H_j` for 128 weights at a
  time, in every bank at once.
* Aggregation does not wait for the combination of the whole graph. As soon
  as node *i*'s combination vector is ready it is added into the aggregation
  rows of *i* and of each of its neighbours (compute-as-soon-as-ready plus
  broadcast), while the banks already work on node *i+1*.
* The degree matrix is generated once from the compressed adjacency, in the
  background of the first layer, and reused by every later layer.

Everything is written in synthesizable SystemVerilog, in `rtl/`, with one
self-checking testbench per module in `tb/`.

## Parts and data flow

```
         h_req/h_data (from L2)            w_* / cache_* (normal cache port)
                 |                                    |
                 v                                    v
   +---------------------------------------------------------------+
   | 256 x pim_lane  (32 tiles x 8 banks, each 32 x 1024-bit SRAM) |
   |   pim_bank -> partial-products array -> 128 x shift_add       |
   |   (ect_unit in NEM-C2 mode)                                   |
   +---------------------------------------------------------------+
                 | 256 x 128 products
                 v
          adder_reduction (tree over banks) -> comb_array (128 x 32 b)
                 | combination vector of node i
                 v
  adj_buffer (CSR) -> agg_engine (UWC / WC, CAR + broadcast) -> agg_array
        |                                                  (256 x 128 x 32 b)
        +-> d_generator (degrees, D^-1)  --------------------+
                                                             v
                                    D^-1 scaling -> aux_control (ReLU, softmax)
                                                             |
                                                   out_valid / out_vec
```

| Module | What it is |
|---|---|
| `nem_pkg` | widths (8-bit weights and features, 32-bit accumulators, Q1.16 `D^-1`), the combination-mode enum, the CSR entry struct |
| `pim_bank` | one L1 bank: write port plus a read port whose word line carries a feature bit; output is `row AND rwl` one cycle later |
| `ect_unit` | early-compute-termination control for NEM-C2 (valid bit, ECT register, per-row 3:1 select) |
| `shift_add` | sum of the eight bit-plane rows of an 8-column slice, `Σ pp[k] << k`, signed |
| `pim_lane` | a bank with its partial-products array and 128 shift-add units; runs one element in NEM-C1, -C2 or -C3 mode |
| `adder_reduction` | balanced adder tree summing the products of all banks per output column, one register stage |
| `comb_array` | 128 x 32-bit accumulator: first pass overwrites, later passes add |
| `adj_buffer` | CSR store: row pointers and `{node, dir, weight}` entries, two read ports |
| `agg_engine` | the unweighted (UWC) / weighted (WC) aggregation engine |
| `agg_array` | 256 rows x 128 x 32-bit aggregation accumulators with a per-row valid bit |
| `d_generator` | degree counting, a restoring divider for `D^-1`, and the row-times-scalar normaliser |
| `aux_control` | ReLU and the softmax control (argmax, exponentials, sum) |
| `nem_gnn_top` | the layer controller that ties everything together |

## Combination in the banks

The feature element `H_j` is 8-bit unsigned and the weights are 8-bit signed.
SRAM row `r` of bank `b` holds the 128 weights `W[j][0..127]` of feature
index `j = 256·r + b`. For one node, every bank receives its own element `H_j`
and produces the 128 products `W[j][y]·H_j`; the reduction tree adds the 256
banks, and feature vectors longer than 256 elements are done in several
passes (up to 32, one per SRAM row) that the combination array accumulates.

Each lane first fills an 8-row *partial-products array* (row `k` =
`W AND H_j[k]`), then the shift-add units collapse it. Three ways of filling
it are built, selected per layer by `cfg_comb_mode`:

* **NEM-C3, pre-compute (default).** One read with the word line at 1 gives
  the product for a '1' bit (the product for a '0' bit is zero). The next cycle
  every row is written with that read ANDed with its own feature bit. Always
  2 cycles per element.
* **NEM-C2, early compute termination.** Bits are applied LSB first, one
  read per cycle, each written straight into its row. As soon as a '1' is seen,
  that read is kept in the ECT register, because for any later bit the read
  would be either the same row (bit 1) or zero (bit 0). The next cycle all the
  remaining rows are written at once through a 3:1 multiplexer: bank read while
  no '1' has been seen, ECT register if the row's bit is 1, zero otherwise. An
  element whose first '1' is at bit `p` takes `p + 3` cycles, an all-zero
  element 9 cycles. The gain depends on the data, which is why C3 is the
  default.
* **NEM-C1, replication.** The weights are stored eight times, once in each
  tile of a group of eight tiles. Tile `t` applies only bit `t mod 8` of its
  element, in one read, and its lane outputs `W·H_j[k]·2^k`. The reduction
  tree then performs the shift-and-add across the replicas. A pass covers only
  32 elements (256 banks / 8), so software must store weight row
  `j = 32·r + 8·(b div 64) + (b mod 8)` in SRAM row `r` of bank `b`. This mode
  needs `TILES` to be a multiple of 8, which is checked by an assertion.

The same banks remain an ordinary cache. A mode register written through
`lconf_we/lconf_compute` switches them: in normal mode `cache_re` reads any
row, and `start` is ignored. Weights are written through `w_*` in either mode.

## Aggregation: compute as soon as ready

The adjacency is kept in compressed sparse row form. Each entry is
`{neighbour (16 b), dir (1 b), weight (8 b)}`. The self loop is not stored;
the engine adds it. `dir = 0` marks an outgoing edge.

When node *i*'s combination vector arrives, `agg_engine` latches it and walks
*i*'s CSR row. It reads one entry per cycle into an update-index register and
does the read-modify-write of that neighbour's aggregation row the next cycle:

* self loop first, with weight 1;
* undirected graph: every entry;
* directed graph: only outgoing entries (the others are counted as skipped);
* unweighted (UWC): `row += vec`;
* weighted (WC): `row += weight · vec`.

A node with `d` entries keeps the engine busy for `d + 2` cycles. Only non-zero
adjacency entries are ever visited.

The controller (`nem_gnn_top`) runs the nodes one after another:

1. Request the features of the node from the L2 side.
2. Run all lanes.
3. Wait for the reduction.
4. Hand the combination vector to the engine, then start on the next node at
   once.

If the engine is still busy with the previous node, the hand-over waits;
`stat_handoff_stalls` counts those cycles. `stat_overlap_cycles` counts the
cycles in which aggregation and combination ran together.

## Degrees and normalisation

`d_generator` counts, for every node, its CSR entries plus one for the self
loop. For a directed graph it counts only the incoming entries (`dir = 1`).
A 17-step restoring divider forms `D^-1 = floor(65536 / degree)` as unsigned
Q1.16. This takes `d + 20` cycles per node. It starts with the first layer and
overlaps that layer's combination (`stat_dgen_overlap_cycles`). It then keeps
its result until the adjacency is rewritten or the graph kind (directed or
undirected) changes, so later layers skip it.

After the last node has drained, each aggregation row is processed in order:

1. Multiply by its `D^-1`: `(x · dinv) >>> 16`, with 128 multipliers.
2. Apply ReLU.
3. On the last layer (`cfg_softmax`), run the softmax control over the first
   `cfg_num_classes` elements:
   * One pass finds the maximum and its index, which is the predicted class
     (`out_class`).
   * A second pass forms `e^(x - max)` as `2^-(d·log2 e)`. The integer part
     of the exponent is a shift, and the fraction is approximated as
     `1 - f/2`, giving error below 7 %. Results are Q1.16, with elements read
     as 8-fraction-bit fixed point. The pass also sums them into
     `out_exp_sum`.
4. Stream the row out on `out_valid/out_node/out_vec`. These rows are the next
   layer's features.

## Interface and timing of the top

* Configuration (held during a layer):
  * `cfg_comb_mode`
  * `cfg_weighted`
  * `cfg_directed`
  * `cfg_num_nodes` (≤ `NODES`)
  * `cfg_num_passes` (≤ `ROWS`)
  * `cfg_softmax`
  * `cfg_num_classes`
* `start` is a one-cycle pulse, accepted only in compute mode. `busy` is high
  until `done` pulses.
* Feature fetch: the top raises `h_req` with `h_req_node` and `h_req_pass`.
  The L2 side answers at any later cycle with a one-cycle `h_valid` and
  `h_data[0..255]` (element `256·pass + b` in slot `b`). In NEM-C1 mode only
  slots `0..31` are used, holding element `32·pass + slot`.
* Adjacency: `rp_*` writes row pointer `n`, which is the first entry index of
  node `n`; pointer `num_nodes` ends the last row. `ent_*` writes an entry.
  Writing either invalidates `D^-1`.
* Per element and node:
  * A lane takes 2 cycles (C3, C1) or `p + 3` cycles (C2).
  * The reduction adds 1 cycle.
  * The hand-over adds 1 cycle.
  * Normalisation takes 3 cycles per row, or `2·classes + 3` with softmax.

## Where this design departs from the source description

* **Schedule.** All 256 banks share the feature index of one node, and nodes
  are combined one after another. The described accelerator uses tile- and
  bank-level parallelism over both nodes and features with one 128-entry
  combination array; its exact split was not specified, so this simplest
  consistent mapping was chosen.
* **Capacity.** One layer run holds at most 256 nodes (one aggregation bank)
  and 4096 CSR entries. Larger graphs would have to be cut into blocks of 256
  nodes by software. Handling edges between blocks is not built.
* **Bank geometry.** Each bank is 32 rows x 1024 bits (4 KB), so that one row
  holds the 128 hidden-dimension weights.
* **Number formats.** Signed weights, unsigned features, and Q1.16 `D^-1`
  are this design's choice.
* **Softmax.** The exponential approximation is this design's own. The final
  division of each exponential by the sum is not built, since the class
  decision does not need it.
* **Adjacency conventions.**
  * Degree means the self loop plus the stored entries that feed the node.
  * A directed graph aggregates along outgoing entries only.
  * Where the description's figures and text disagree on the direction bit
    or on the degree, the text was followed.
* **What is not built.**
  * The host CPU and its MACC/MACA/LCONF instruction decode: `start`, `cfg_*`
    and `lconf_*` stand in for them.
  * The L2 cache and DRAM.
  * The analog bit-line circuitry: only its logic function is modelled.
  * GAT attention and GraphSage sampling.
* **Reduction tree.** The source places an adder reduction next to every
  bank. Here every bank holds a different weight row of the same dot product,
  so one tree sums the 256 banks' products.
* **Aggregation banks.** The source splits the aggregation array into banks
  of 256 nodes each (nodes 0-255, 256-511, ...). Only the first bank is built.
* **Shared arithmetic.** The source has the degree normaliser reuse the
  aggregation engines' multipliers. Here `d_generator` and `agg_engine` each
  have their own row of 128 multipliers. This keeps the two modules
  independent, at the cost of area.
* **Latencies and handshakes.** All cycle counts and handshakes above are this
  design's own, since the source gives none.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/nem_pkg.sv tb/tb_pim_lane.sv --top-module tb_pim_lane -Mdir obj -o sim
./obj/sim
```

Replace `tb_pim_lane` with any testbench name. The unit testbenches use
reduced bank sizes (4 rows x 32 columns) and check values against models
computed in the testbench, plus the latencies given above.

`tb_nem_gnn_top` runs the whole layer engine at a reduced size: 8 tiles of
1 bank, 4 x 32-bit banks, 4 outputs and an 8-node graph. It runs five layers:

* NEM-C3 with two passes;
* NEM-C2, weighted and directed, with softmax;
* a repeat that must reuse `D^-1`;
* a layer whose features arrive at once, forcing a hand-over stall;
* NEM-C1 with replicated weights.

Every output element is compared with `ReLU(floor(agg · floor(2^16/deg) / 2^16))`
computed independently. The testbench also counts how often each mechanism
happened and fails if any never did:

* pre-compute, replica and ECT broadcast;
* an element without a '1';
* multi-pass accumulation;
* CAR overlap and hand-over stall;
* degree generation overlap and `D^-1` reuse;
* directed skip, weighted edge and softmax;
* the mode switch.

`tb_nem_gnn_citeseer` fills one aggregation bank with a graph shaped like
the CiteSeer citation network. It has 256 nodes and 700 random edges
(CiteSeer's 2.74 edges per node), with sparse features and 8-pass feature
vectors. It runs the four CiteSeer graph kinds as four layers:

| Layer | Edges | Direction | Combination mode |
|---|---|---|---|
| plain | unweighted | undirected | NEM-C3 |
| CS1 | weighted | directed | NEM-C2 |
| CS2 | weighted | undirected | NEM-C3 |
| CS3 | unweighted | directed | NEM-C3 |

It checks every output element and the update/skip counters. One layer takes
about 17,000 cycles with NEM-C3 and 32,000 with NEM-C2, with this
testbench's feature density.

The regression stops at this size. At the default size (256 banks of 4 KB),
Verilator generates a separate model for each of the 256 lanes. One NEM-C3
layer was also simulated at the default parameters: 6 nodes, a ring with a
chord, 256 input features and 128 outputs. All 769 checks passed. Building
that model took about 13 minutes; the simulation itself took under a second.
Expect similar build times if you simulate `nem_gnn_top` without a parameter
list.
