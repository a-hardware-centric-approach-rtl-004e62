# Sparse-Blox: blockwise activation pruning for CNN accelerators

After a ReLU, a large share of a CNN layer's output activations is zero. Those
zeros are scattered, though, so exploiting them usually costs index or
compression logic. Sparse-Blox trades a little accuracy for sparsity that is
regular and cheap to use. It cuts every output feature map into fixed blocks
that match the accelerator's PE array (8 x 8 for an 8 x 8 systolic array),
sums each block, and compares the sum with a per-layer threshold:

- A block whose sum is **at or below** the threshold is *pruned*. Its data is
  never written to local memory. Only its 16-bit block position goes into a
  small cache.
- Any other block is written to local memory unchanged.

When the next layer reads a block back, its position is looked up in the
cache first. On a hit the block is known to be all zero. The reader gets a
single "'0'-block" beat instead of data, and can skip the MAC work for that
block. On a miss the block comes from local memory as usual. Pruning thus
saves local-memory space, memory traffic and computation, at the cost of one
adder tree, one comparator and the position cache.

The thresholds are found offline, one per layer, by searching the trade-off
between pruned blocks and network accuracy. Threshold 0 prunes only blocks
that are already all zero, so it is lossless. Higher thresholds prune more
blocks and cost some accuracy.

This RTL implements the extension and a local memory around it. The PE array
with its activation function, the off-chip memory and the offline threshold
search are not part of it; their signals are the top-level ports.

## Block diagram

```
              PE array + activation (not included)
                 | wr_* (rows)              ^ rsp_* (rows or '0'-block)
                 v                          | rd_req_*
   +-------------------------------------------------------------+
   | sparse_blox                                                 |
   |  sb_adder_tree --> sb_decision <-- sb_threshold_regs        |
   |       |               |   \ cache_insert                    |
   |       v               v    v                                |
   |  sb_block_buffer   (keep/drop)  sb_sparse_cache <--lookup-- sb_read_ctrl
   |       | write kept rows                                  |   |
   +-------|--------------------------------------------------|---+
           v                                                  v (miss reads)
                        sb_local_memory  <--ext_*-->  off-chip side
```

`sb_accel_top` = `sparse_blox` + `sb_local_memory`.

## Files

| file | content |
|---|---|
| `rtl/sb_pkg.sv` | default sizes, `sb_decision_e` (keep / prune / overflow) |
| `rtl/sb_adder_tree.sv` | sum of magnitudes per row (binary tree), accumulated over the rows of a block |
| `rtl/sb_threshold_regs.sv` | per-layer threshold table, current-layer pointer |
| `rtl/sb_decision.sv` | `sum <= th` comparison, cache-full fallback, event counters |
| `rtl/sb_block_buffer.sv` | row FIFO that holds a block until its decision, then writes or drops it |
| `rtl/sb_sparse_cache.sv` | two banks of pruned block positions, associative lookup |
| `rtl/sb_read_ctrl.sv` | block reads: '0'-block on a hit, local-memory rows on a miss |
| `rtl/sb_local_memory.sv` | local memory, one block row per word, three ports |
| `rtl/sparse_blox.sv` | the extension: the blocks above plus layer sequencing |
| `rtl/sb_accel_top.sv` | top: extension + local memory |

## Sizes and parameters

| parameter | default | meaning |
|---|---|---|
| `LANES` | 8 | activations per row (block width) |
| `ROWS` | 8 | rows per block (block height) |
| `DATA_W` | 16 | activation width, signed |
| `POS_W` | 16 | block position width |
| `NUM_LAYERS` | 64 | threshold entries |
| `CACHE_DEPTH` | 8192 | positions per cache bank (two banks) |
| `LMEM_BLOCKS` | 1024 | blocks held by the local memory (1024 x 64 x 16 bit = 128 KiB) |
| `SUM_W` | `DATA_W + clog2(LANES*ROWS)` = 22 | block sum and threshold width |

The 8 x 8 block and the 16-bit position are the design's reference values.
The other defaults are choices of this implementation. Other block shapes
are set through `LANES` and `ROWS`: 16 x 16 and 1 x 16 (a 16-lane vector
unit), and also 4 x 4 and 3 x 7 arrays. `LANES` need not be a power of two.
All of these are simulated (see Verification).

## The write path: from PE rows to a keep/drop decision

The PE array delivers each output block as `ROWS` beats of `LANES` signed
activations (`wr_valid`/`wr_ready`/`wr_row`). `wr_pos` must hold the block
position for all the beats of a block. Every accepted row goes to two places
at once:

1. **`sb_adder_tree`** takes the magnitude of each activation, adds the row
   with a binary tree of `ceil(log2 LANES)` levels, and accumulates the row
   sums. The block sum is registered one cycle after the last row
   (`sum_valid`). Magnitudes are used so that activation functions with
   negative outputs are handled too. After a ReLU this is the plain sum.
2. **`sb_block_buffer`** stores the row. The decision is only known after
   the last row, so the rows must wait.

**`sb_decision`** compares the sum with the current layer's threshold, in
the same cycle as `sum_valid`:

| condition | outcome | effect |
|---|---|---|
| `sum > th` | keep | rows written to local memory at word `pos*ROWS + row` |
| `sum <= th`, cache bank not full | prune | `pos` appended to the cache, rows dropped |
| `sum <= th`, cache bank full | overflow | kept like a dense block, counted |

Keeping a block that could have been pruned is always correct. Only a
dropped block must be in the cache. That is why the full cache falls back
to keeping.

The buffer is a FIFO of `2*ROWS+2` rows with a small queue of decisions. On
the drain side it walks the oldest block one row per cycle: it writes the
row for a kept block and discards it for a pruned one. A row waits `ROWS+1`
cycles for its decision, so the FIFO never fills in steady state. The write
stream runs at one row per cycle without stalls, for one-row blocks too.
`wr_ready` falls only during a layer change.

## The read path: '0'-block on a hit

`sb_read_ctrl` takes one block request at a time (`rd_req_valid`,
`rd_req_ready`, `rd_req_pos`). For a request accepted at clock edge *t*:

- the cache lookup result is registered, so it is known in cycle *t+1*;
- **hit**: one beat in cycle *t+1* with `rsp_zero=1`, `rsp_last=1` and
  all-zero data. Local memory is not read. The PE array can skip the whole
  block.
- **miss**: rows 0..`ROWS-1` are read from local memory in consecutive
  cycles and returned in cycles *t+2 .. t+ROWS+1* with `rsp_zero=0`.
  `rsp_last` marks the final row.

Responses have no back-pressure. A new request can be accepted in the cycle
after a hit, or in the cycle that carries the last row of a miss.

## The position cache and layer sequencing

The cache has to remember one layer's pruned positions until the next layer
has read them. Meanwhile that next layer is producing its own pruned
positions. `sb_sparse_cache` therefore has two banks:

- the **write bank** receives the current layer's pruned positions, in
  order;
- the **read bank** holds the previous layer's positions and answers
  lookups. The lookup compares the request with every valid entry in
  parallel (one match line per entry) and registers the result.

The layers are sequenced with two pulses:

- `net_start` (while idle) starts an inference. It empties both banks, sets
  the threshold pointer to layer 0 and clears the counters.
- `layer_done` may come together with the last row of a layer, or later,
  after the layer's reads have been issued. `sparse_blox` then holds
  `wr_ready` and `rd_req_ready` low (`layer_stall`) until the last block has
  been summed, decided and drained, and no read is open. Then, in one cycle,
  the banks swap (the old read bank is emptied and becomes the write bank)
  and the threshold pointer steps to the next layer.

Waiting for the drain matters. If the banks swapped right away, the insert
of a pruned block at the end of a layer would be lost. The next layer would
then read sentinel data from local memory where it should have got a
'0'-block.

## Status and counters

`idle`, `cur_layer`, `cache_wr_count` and `cache_rd_count` report the state.
`cnt_blocks`, `cnt_pruned`, `cnt_overflow`, `cnt_rows_dropped`,
`cnt_rd_hits` and `cnt_rd_misses` count since `net_start`. Together they
give the pruned-block counts and the saved memory transfers and block
computations of a run.

## Local memory

`sb_local_memory` holds one block row per word, so block *p* occupies words
`p*ROWS .. p*ROWS+ROWS-1`. The block position doubles as the block's
local-memory address; its low `clog2(LMEM_BLOCKS)` bits are used, and an
assertion requires `wr_pos < LMEM_BLOCKS`. The memory has three ports:

- a write port for kept blocks;
- a read port for cache misses;
- a read/write port toward off-chip memory (`ext_*`), used to load inputs
  and offload results.

Reads have one cycle of latency. When both write ports hit the same word in
one cycle, the off-chip write wins. The memory that pruned blocks leave
free is not managed here. Tiling a layer that is larger than the local
memory, and the transfers to and from off-chip memory, are the host
accelerator's job.

## How closely this follows the reference design, and where it departs

Taken from the reference description:

- blocks matched to the PE array, 8 x 8 by default;
- an adder tree summing each block;
- comparison with a per-layer threshold that is loaded into the hardware;
- pruned blocks kept only as 16-bit positions in a cache that spans one
  layer to the next;
- a zero block on a cache hit and a normal read on a miss;
- no change to the PE array or the local memory.

Choices of this implementation, where the description gives no detail:

- the handshakes, widths, reset (asynchronous, active low) and all latencies;
- summing magnitudes rather than raw values;
- **prune at `sum <= th`**. One statement of the rule says "less than". The
  operation diagram uses "at or below", and this RTL follows the diagram.
  With `<=`, threshold 0 prunes exactly the blocks that are already zero.
- the block buffer. The reference shows a selector between the PE results
  and local memory with a '0'-block input. Here the '0'-block is produced on
  the read side, because a pruned block is never written.
- the two-bank cache with associative lookup, and its depth;
- the overflow fallback when a cache bank is full;
- the layer sequencing with `layer_done` and `layer_stall`;
- the threshold write port, the layer pointer and the event counters;
- the local memory's depth and ports.

Not included: the PE array and activation, the off-chip memory, and the
offline threshold search. Skipping the MACs of a '0'-block is up to the PE
array, which receives `rsp_zero`.

Sizing notes for real networks. The estimates below use standard layer
shapes of ResNet-50 at a 224 x 224 input.

- **8 x 8 blocks:** the largest ResNet-50 activation map is 802,816 values,
  or 12,544 blocks. That fits the 16-bit positions. At the roughly 19% of
  pruned blocks reported for a 1% accuracy loss, one 8,192-entry bank is
  ample.
- **1 x 16 blocks:** the same map is 50,176 blocks, and about 31% of them
  can be pruned. That is more than one bank holds, so some prunable blocks
  would be kept as overflow.
- **Yolo-v5s at a large input resolution:** it also exceeds one bank in its
  first layers.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
None needs anything but Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sb_pkg.sv tb/tb_sb_accel_top.sv --top-module tb_sb_accel_top
./obj_dir/Vtb_sb_accel_top
```

| testbench | what it checks |
|---|---|
| `tb_sb_adder_tree` | block sums against a model for 8x8, 16x16, 1x16, 3x7; extreme values; `sum_valid` timing; `clear` |
| `tb_sb_threshold_regs` | table load, pointer stepping and saturation, restart, rewrite |
| `tb_sb_decision` | `<=` rule at and around the threshold, overflow, counters |
| `tb_sb_block_buffer` | write order and addresses, dropped blocks never written, no stall in a back-to-back stream |
| `tb_sb_sparse_cache` | fill, full, swap, lookups against a model with one-cycle answer, clear |
| `tb_sb_read_ctrl` | hit answer in cycle t+1, miss rows in t+2..t+ROWS+1, counters |
| `tb_sb_local_memory` | three ports against a model, write priority |
| `tb_sparse_blox` | end-to-end scenario (below) on the extension with tiny cache banks |
| `tb_sb_accel_top` | end-to-end scenario on the top, reduced sizes |
| `tb_sb_accel_full` | end-to-end scenario on the top with every default size |
| `tb_sb_accel_geometries` | end-to-end scenario in the 1x16, 16x16, 4x4 and 3x7 geometries (small cache banks) |

The end-to-end scenario (`tb/sb_accel_tb_body.svh`) acts as the PE array and
the off-chip side. It runs three layers and one extra layer:

- **Setup.** It fills local memory with a sentinel, loads input blocks and
  thresholds, and starts an inference.
- **Each layer.** The scenario reads back every block of the previous layer
  in random order while it writes new blocks. The blocks are all-zero,
  exactly at or one above the threshold (including negative values), sparse,
  or dense. The layer ends with `layer_done` on the last row, and the
  scenario checks that the layer change stalls and then steps the pointer.
- **Checks.** Kept blocks must be in local memory and pruned ones must not.
  Hits must return the '0'-block in one cycle, misses must return the right
  rows, and every counter must match a reference model.
- **Extra layer.** It writes `CACHE_DEPTH + ROWS` zero blocks to force
  overflow.
- **Coverage.** Keep, prune, overflow, hit, miss, layer-change stall, bank
  swap and the threshold boundary must each occur at least once.

At the default sizes this takes under a minute, most of it compile time.
Each module also has a deliberately broken variant (for example `<` instead
of `<=`, a swap that does not wait for the drain, lookups in the wrong
bank), and the testbenches fail on every one of them.
