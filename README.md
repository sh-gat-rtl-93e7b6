# SH-GAT layer engine in SystemVerilog

This RTL computes one layer of a graph attention network (GAT) on sparse node
features. It follows the accelerator architecture published as *SH-GAT:
Software-hardware co-design for accelerating graph attention networks on FPGA*.
That architecture rests on three ideas:

* **Split attention weights.** The attention vector `a` is split into `a1`, which
  is applied to the centre (source) node, and `a2`, which is applied to a
  neighbour. Each node's score is then a dot product of its own, and no
  concatenation `z_i || z_j` is needed.
* **Base-2 softmax.** `exp` is replaced by `2^x`, which hardware forms with a
  shift.
* **Pre-fetched subgraphs.** Software stores each source node's feature row
  followed by copies of its neighbours' rows. The hardware therefore reads
  features only in sequence, with no random addressing and no pipeline waits.
  The sparse rows then go to a pool of independent sparse processing elements
  (SP-PEs). Each row is handed to whichever SP-PE becomes free, which balances
  the load.

One layer computes, for every source node `i` and its neighbours `j`:

```
z_n   = W h_n                         (sparse row x dense weights, SPMM)
e_i   = a1 . z_i ,  e_j = a2 . z_j    (DMVM array)
s_ij  = LeakyReLU(e_i + e_j)          (AF)
α_ij  = 2^s_ij / Σ_k 2^s_ik           (AF, base-2 softmax)
h_i'  = act( Σ_j α_ij z_j )           (aggregator, z_j reused from the buffer)
```

## Numbers

All values, including features, weights, attention entries, scores,
coefficients and outputs, are 32-bit signed fixed point with 16 fraction bits
(Q16.16). A product is `(a*b) >>> 16`, truncated to 32 bits. Sums wrap at 32
bits. The softmax keeps `2^x` as an unsigned 32-bit Q16.16 value and adds these
in a 48-bit accumulator. The reference design does not state its arithmetic
format; this one was chosen for this RTL. Its shared helpers (`qmul`, widths,
the GCSR element type) are in `rtl/sh_gat_pkg.sv`.

## Input format: GCSR on three channel groups

Node features arrive as sparse rows. Each nonzero element carries three fields:

| field       | bits | meaning |
|-------------|------|---------|
| value       | 32   | the nonzero feature value |
| col-index   | 16   | its column (input-feature index) |
| node-info   | 16   | `row_len[15:1]` = nonzeros in this row, `flag[0]` = 1 for a source node, 0 for a neighbour |

The rows of a layer form one sequence: each source row is followed by its
neighbours' rows. A row with flag 1 starts a new subgraph. This sequence is
dealt **round-robin** over three channel groups: row 0 goes to group 0, row 1 to
group 1, row 2 to group 2, row 3 to group 0, and so on. Each group has two
channels:

* the **value channel** (`val_*`), carrying 32-bit values;
* the **info channel** (`inf_*`), carrying `{node-info, col-index}` in bits
  31:16 and 15:0, plus `inf_last`.

`inf_last` is set on the final element of the layer. Every element of a row
repeats that row's node-info. A row with no nonzeros is sent as one element with
`row_len = 0` and value 0. All channels use valid/ready handshakes, and the two
channels of a group may be skewed.

To include a self-loop, list the source node once more as its own neighbour.
The sum runs over exactly the neighbour rows sent.

## Block structure

```
 weight stream ─► weight_loader ─► spmm: F_OUT sets × LANES sp_pe  (set k holds column W_k, copied per lane)
 alpha stream  ─► alpha_loader ──────────────────────┐ (a1/a2 selected by each node's flag)
 3 channel groups ─► feature_loader ─► pe_schedule ─►│ spmm ─► dmvm_array ─► aggregator z_ij buffer
                                          ▲          │                          │  ▲
                    completion + address ─┘          │       scores e_i+e_j ─►  af_unit (LeakyReLU, 2^x softmax)
                    slot release ◄──────────────────────────────────────────────┘  │ α_ij
                                                                    h_i' ◄── aggregator MACs
```

| module | role |
|---|---|
| `sh_gat_top` | wires the whole layer engine |
| `weight_loader` | turns the column-major weight stream into (column, row) writes, using a row counter and a column counter |
| `alpha_loader` | holds `a1` (first F_OUT words) and `a2` (next F_OUT words); a mux per lane chooses by source flag |
| `feature_loader` + `sync_fifo` | joins each group's two channels into elements and buffers 16 of them per group |
| `pe_schedule` | binds rows to free SP-PE lanes, streams them, tags them, manages subgraph slots |
| `spmm` / `sp_pe` | 16 sets × 3 SP-PEs; each SP-PE does a sparse-row × weight-column multiply-accumulate |
| `dmvm_array` / `dmvm` | per lane: 16 multipliers, a register stage and a pipelined adder tree give `e` |
| `af_unit` / `leaky_relu` / `softmax_unit` | LeakyReLU (slope 0.2), then the base-2 softmax |
| `aggregator` | the z_ij buffer (z and e for each node of 2 subgraphs), the score sequencing and `Σ α z` |

Default parameters:

* F_OUT = 16 output features (the hidden size used in the evaluation).
* LANES = 3: three channel groups, three SP-PEs per set and three DMVMs.
* SM_LANES = 2 softmax/aggregation lanes.
* NSLOT = 2 subgraph slots.
* MAX_SG = 256 nodes per subgraph (source plus neighbours).
* DEPTH = 4096 weight words per SP-PE. This covers input dimensions up to 4096.
* FIFO_DEPTH = 16.

## The schedule: how rows reach the SP-PEs

`pe_schedule` is the hardest part to follow.

* **Finding the next row.** The next row in sequence sits at the head of group
  `next_grp`. It can be bound when three things hold: its first element is
  buffered, that group is not already streaming a row, and some lane is free.
  The row then goes to the lowest-numbered free lane. From the next cycle, that
  lane reads the group's buffer directly at one element per cycle. Up to three
  rows stream at once, one per group, but a row may land on any lane.
* **Freeing a lane.** A lane becomes free only when its SP-PE reports completion
  with its address (`out_valid`/`out_addr` of set 0). This happens two cycles
  after the row's last element. Short rows therefore hand their lane back early,
  and a long row does not block the other two lanes.
* **Group order.** Rows are taken from groups 0, 1, 2, 0, ... in turn. After the
  layer's `last` element the group pointer returns to 0, so the next layer's
  sender must start on group 0 again.
* **Tags.** Each row carries the tag `{slot, index, flag}`:
  * A source row opens a subgraph. It takes a free slot of the z_ij buffer and
    index 0.
  * Neighbours take indices 1, 2, and so on.
  * When the next source arrives, or when the `last` element passes, the
    subgraph is closed with its node count.
* **Back-pressure.** If no slot is free, binding stops (`stall_slot`). The group
  buffers then fill and the channel `ready` signals drop, so the memory side
  stops loading until the aggregator finishes a subgraph.

Lanes finish out of order. The z_ij buffer therefore accepts up to three writes
per cycle at any `{slot, index}`. A slot is processed once its close message has
arrived and as many vectors have been written as that message gave.

## Softmax and aggregation

For a complete slot, the aggregator reads `e_i` (index 0). It then sends
`e_i + e_j` for neighbours 1…n−1 to `af_unit`, two per beat. The softmax works
in two phases:

* **Collect.** Each score goes through LeakyReLU and a shift unit that forms
  `2^x`. Writing `x = n + f` with integer part `n` and fraction `f`, the unit
  takes `1.f` and shifts it by `n`. This is a linear approximation of `2^f`. `n`
  is clamped to 14, and values with `n < −16` become 0. Each `2^x` is added into
  the running sum and also stored in a register file.
* **Divide.** After the last beat, two dividers emit
  `α = floor(2^x · 2^16 / sum)` per beat, in arrival order.

The aggregator uses each α beat immediately. It reads the matching `z_j` back
from the buffer and adds `α·z_j` into 16 accumulators. After the last
coefficient it applies `act`, which is ReLU when `act_en` is 1 and identity
otherwise. It then offers `h_i'` on `h_valid/h_ready` and releases the slot. A
subgraph without neighbours produces `act(0)`.

## Timing

| stage | timing |
|---|---|
| SP-PE | 1 element per cycle per lane; result 2 cycles after the row's last element |
| row binding | 1 row per cycle; a freed lane can take a new row 2 cycles after its completion pulse |
| DMVM | 1 vector per cycle, latency 5 cycles (1 + log2 16) |
| softmax | ⌈(n−1)/2⌉ collect beats, then ⌈(n−1)/2⌉ divide beats per subgraph |
| output | one 16-word vector per subgraph, in source order |

A two-layer model was simulated on random graphs with the sizes of three
citation datasets: layer 1 maps the input features to 16 hidden features with
ReLU, and layer 2 maps those to the class scores. Each layer's cycle count runs
from `start` to its last output. Each channel beat carries one element.

| graph | nodes | input features | classes | layer 1 rows | layer 1 cycles | layer 2 cycles |
|---|---|---|---|---|---|---|
| Cora-sized | 2708 | 1433 | 7 | 12,866 | 126,195 | 53,574 |
| CiteSeer-sized | 3327 | 3703 | 6 | 12,677 | 217,514 | 57,485 |
| PubMed-sized | 19717 | 500 | 3 | 109,129 | 2,356,068 | 460,234 |

The published accelerator reports 19.4 µs, 22.1 µs and 150.2 µs for two layers
at 225 MHz, which is roughly 4,400 to 34,000 cycles. This RTL is one to two
orders of magnitude slower, for two reasons:

* Each channel beat here carries one element. The HBM ports of the target board
  are far wider.
* Each SP-PE takes one element per cycle, and there are only three row lanes.

The reference design does not describe how it packs several elements into a
beat, or how its SP-PEs would consume more than one element per cycle.

## Where this RTL departs from, or adds to, the reference design

* **Not built:** the memory controller (the AXI masters on the HBM channels) and
  the HBM itself. Their data appears as plain streams on the top-level ports:
  * weights: one word per beat, column-major;
  * attention vector: `a1` then `a2`;
  * features: 3 × 2 channels;
  * output: one vector per beat.

  The buffers that the reference design places in the memory controller live
  here in the loaders: weight memories in the SP-PEs, the attention vector in
  `alpha_loader`, and element FIFOs in `feature_loader`.
* **Round-robin rows.** Rows are spread round-robin over the three channel
  groups. The reference design starts every subgraph on group 0 and leaves
  channels idle, using them later for overflow. That placement is not
  implemented.
* **Three SP-PEs per set,** as the text states. One figure of the reference
  design draws four.
* **Per-lane feature ports.** Each lane has its own feature port, instead of one
  shared bus.
* **Any lane may carry a source.** The attention half is chosen by each node's
  flag rather than fixed per DMVM.
* **The aggregator's multiply-accumulate** is a bank of 2 × 16 MACs. The
  reference design describes it only as "also computed with the SPMM".
* **Designer's choices:**
  * the LeakyReLU slope (0.2);
  * the output activation (ReLU or identity);
  * the `2^x` fraction handling;
  * the fixed-point format;
  * all buffer depths;
  * the `last` marker and repeated node-info;
  * the valid/ready handshakes;
  * the asynchronous active-low reset.
* **Clock gating.** Each SP-PE has an enable input (`en`). The gated clock of
  the reference design is left to the FPGA tools.
* **Layers.** The engine runs one layer per pass. For a two-layer model, run it
  twice (the testbenches do this):
  * pulse `start`;
  * load the next weights, with unused columns set to zero when there are fewer
    than 16 classes;
  * send the hidden features as GCSR rows.

## Limits a user must respect

* `F_OUT` must be a power of two.
* A subgraph may hold at most `MAX_SG` nodes (an assertion checks this).
* `in_dim` must not exceed `DEPTH`.
* The first row of a layer must be a source row (an assertion checks this).
* Saturation is not implemented: fixed-point sums that leave the Q16.16 range
  wrap around.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sh_gat_pkg.sv tb/tb_ref_pkg.sv tb/tb_sh_gat_top.sv --top-module tb_sh_gat_top
./obj_dir/Vtb_sh_gat_top
```

The reference arithmetic lives in `tb/tb_ref_pkg.sv`. It is written with wide
integers, separately from the RTL.

* `tb_<module>` tests each block on its own.
* `tb_sh_gat_top` runs a two-layer model end to end at the default parameters
  on a small random graph (40 nodes).
* `tb_sh_gat_datasets` runs two-layer models on Cora-, CiteSeer- and
  PubMed-sized graphs (about 40 s in total).

Both end-to-end tests use `tb_gat_harness`. The harness checks every output
vector against the reference and prints the cycle count. It also counts each
mechanism and fails if any of them never occurs:

* slot stalls;
* rows on a lane other than their group number;
* several lanes streaming at once;
* empty rows;
* subgraphs without neighbours;
* partial softmax beats;
* input and output back-pressure;
* ReLU clamping.
