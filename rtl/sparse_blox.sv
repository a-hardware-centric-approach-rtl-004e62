// sparse_blox: blockwise activation pruning between PE array and local memory.
//
// Write side: the PE array (after its activation function) delivers each
// output block as ROWS beats of LANES activations, with the block position
// held on wr_pos for all beats of a block. The adder tree sums the
// magnitudes of the block; the decision logic compares the sum with the
// current layer's threshold. Blocks at or below the threshold are pruned:
// only their position is stored in the sparse-block cache and their rows are
// dropped from the block buffer. Other blocks are written to local memory.
//
// Read side: when the next layer reads a block, its position is looked up in
// the cache. A hit is answered with a single '0'-block beat (rsp_zero) so the
// PE array can skip that block; a miss is served from local memory.
//
// Layer sequencing: net_start (one cycle, while idle) starts an inference:
// threshold pointer to layer 0, cache emptied, counters cleared. layer_done
// (one cycle, together with or after the last row of a layer, once the
// layer's reads have been issued) asks for a layer change. wr_ready and rd_req_ready then stay low (layer_stall) until
// the write pipeline has drained and no read is open; then the cache banks
// swap (this layer's sparse positions become the lookup set of the next
// layer) and the threshold pointer steps.
//
// Throughput: one row per cycle on the write side without stalls; a read hit
// takes one cycle, a miss ROWS+1 cycles.
//
// The adder tree, the threshold comparison and the cache of sparse block
// positions follow the document; the handshakes, the block buffer, the layer
// sequencing and the overflow fallback are this implementation's choices.
module sparse_blox
  import sb_pkg::*;
#(
  parameter int unsigned LANES       = sb_pkg::SB_LANES,
  parameter int unsigned ROWS        = sb_pkg::SB_ROWS,
  parameter int unsigned DATA_W      = sb_pkg::SB_DATA_W,
  parameter int unsigned POS_W       = sb_pkg::SB_POS_W,
  parameter int unsigned NUM_LAYERS  = sb_pkg::SB_NUM_LAYERS,
  parameter int unsigned CACHE_DEPTH = sb_pkg::SB_CACHE_DEPTH,
  parameter int unsigned LMEM_BLOCKS = sb_pkg::SB_LMEM_BLOCKS,
  parameter int unsigned SUM_W       = DATA_W + $clog2(LANES * ROWS),
  parameter int unsigned LAYER_W     = $clog2(NUM_LAYERS),
  parameter int unsigned ADDR_W      = $clog2(LMEM_BLOCKS * ROWS),
  parameter int unsigned CNT_W       = $clog2(CACHE_DEPTH + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // threshold loading
  input  logic                         cfg_th_we,
  input  logic [LAYER_W-1:0]           cfg_th_layer,
  input  logic [SUM_W-1:0]             cfg_th_value,
  // layer sequencing
  input  logic                         net_start,
  input  logic                         layer_done,
  output logic                         layer_stall,
  output logic [LAYER_W-1:0]           cur_layer,
  // block rows from the PE array
  input  logic                         wr_valid,
  output logic                         wr_ready,
  input  logic [LANES-1:0][DATA_W-1:0] wr_row,
  input  logic [POS_W-1:0]             wr_pos,
  // block reads of the PE array
  input  logic                         rd_req_valid,
  output logic                         rd_req_ready,
  input  logic [POS_W-1:0]             rd_req_pos,
  output logic                         rsp_valid,
  output logic                         rsp_zero,
  output logic                         rsp_last,
  output logic [LANES-1:0][DATA_W-1:0] rsp_data,
  // local memory ports
  output logic                         mem_we,
  output logic [ADDR_W-1:0]            mem_waddr,
  output logic [LANES-1:0][DATA_W-1:0] mem_wdata,
  output logic                         mem_re,
  output logic [ADDR_W-1:0]            mem_raddr,
  input  logic [LANES-1:0][DATA_W-1:0] mem_rdata,
  // status
  output logic                         idle,
  output logic [CNT_W-1:0]             cache_wr_count,
  output logic [CNT_W-1:0]             cache_rd_count,
  output logic [31:0]                  cnt_blocks,
  output logic [31:0]                  cnt_pruned,
  output logic [31:0]                  cnt_overflow,
  output logic [31:0]                  cnt_rows_dropped,
  output logic [31:0]                  cnt_rd_hits,
  output logic [31:0]                  cnt_rd_misses
);

  // ---------------------------------------------------------------- layers
  logic layer_pend, wr_idle, rd_idle, do_swap;
  logic tree_busy, buf_idle, buf_ready;
  logic sum_valid;
  logic [SUM_W-1:0] sum, th;

  assign wr_idle     = !tree_busy && !sum_valid && buf_idle;
  assign do_swap     = layer_pend && wr_idle && rd_idle;
  assign layer_stall = layer_pend;
  assign idle        = wr_idle && rd_idle && !layer_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          layer_pend <= 1'b0;
    else if (net_start)  layer_pend <= 1'b0;
    else if (do_swap)    layer_pend <= 1'b0;
    else if (layer_done) layer_pend <= 1'b1;
  end

  sb_threshold_regs #(.NUM_LAYERS(NUM_LAYERS), .SUM_W(SUM_W), .LAYER_W(LAYER_W)) u_th (
    .clk, .rst_n,
    .cfg_we    (cfg_th_we),
    .cfg_layer (cfg_th_layer),
    .cfg_th    (cfg_th_value),
    .layer_rst (net_start),
    .layer_next(do_swap),
    .cur_layer (cur_layer),
    .th        (th)
  );

  // ------------------------------------------------------------ write side
  logic wr_fire;
  logic [POS_W-1:0] pos_q;
  assign wr_ready = buf_ready && !layer_pend;
  assign wr_fire  = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pos_q <= '0;
    else if (wr_fire) pos_q <= wr_pos;
  end

  sb_adder_tree #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .SUM_W(SUM_W)) u_tree (
    .clk, .rst_n,
    .clear    (net_start),
    .in_valid (wr_fire),
    .in_row   (wr_row),
    .busy     (tree_busy),
    .sum_valid(sum_valid),
    .sum      (sum)
  );

  logic               cache_full, cache_insert, dec_valid;
  sb_decision_e       decision;

  sb_decision #(.SUM_W(SUM_W)) u_dec (
    .clk, .rst_n,
    .stat_clr    (net_start),
    .sum_valid   (sum_valid),
    .sum         (sum),
    .th          (th),
    .cache_full  (cache_full),
    .dec_valid   (dec_valid),
    .decision    (decision),
    .cache_insert(cache_insert),
    .cnt_blocks  (cnt_blocks),
    .cnt_pruned  (cnt_pruned),
    .cnt_overflow(cnt_overflow)
  );

  sb_block_buffer #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W),
                    .LMEM_BLOCKS(LMEM_BLOCKS), .ADDR_W(ADDR_W)) u_buf (
    .clk, .rst_n,
    .in_valid        (wr_fire),
    .in_ready        (buf_ready),
    .in_row          (wr_row),
    .in_pos          (wr_pos),
    .dec_valid       (dec_valid),
    .dec_keep        (decision != SB_PRUNE),
    .mem_we          (mem_we),
    .mem_addr        (mem_waddr),
    .mem_wdata       (mem_wdata),
    .idle            (buf_idle),
    .cnt_rows_dropped(cnt_rows_dropped)
  );

  // ------------------------------------------------------------- read side
  logic             lk_valid, lk_done, lk_hit;
  logic [POS_W-1:0] lk_pos;
  logic             rd_ctrl_ready;

  assign rd_req_ready = rd_ctrl_ready && !layer_pend;

  sb_read_ctrl #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W),
                 .LMEM_BLOCKS(LMEM_BLOCKS), .ADDR_W(ADDR_W)) u_rd (
    .clk, .rst_n,
    .stat_clr    (net_start),
    .rd_req_valid(rd_req_valid && !layer_pend),
    .rd_req_ready(rd_ctrl_ready),
    .rd_req_pos  (rd_req_pos),
    .rsp_valid   (rsp_valid),
    .rsp_zero    (rsp_zero),
    .rsp_last    (rsp_last),
    .rsp_data    (rsp_data),
    .lk_valid    (lk_valid),
    .lk_pos      (lk_pos),
    .lk_done     (lk_done),
    .lk_hit      (lk_hit),
    .mem_re      (mem_re),
    .mem_raddr   (mem_raddr),
    .mem_rdata   (mem_rdata),
    .idle        (rd_idle),
    .cnt_hits    (cnt_rd_hits),
    .cnt_misses  (cnt_rd_misses)
  );

  sb_sparse_cache #(.POS_W(POS_W), .DEPTH(CACHE_DEPTH), .CNT_W(CNT_W)) u_cache (
    .clk, .rst_n,
    .clear    (net_start),
    .swap     (do_swap),
    .ins_valid(cache_insert),
    .ins_pos  (pos_q),
    .full     (cache_full),
    .lk_valid (lk_valid),
    .lk_pos   (lk_pos),
    .lk_done  (lk_done),
    .lk_hit   (lk_hit),
    .wr_count (cache_wr_count),
    .rd_count (cache_rd_count)
  );

  // ------------------------------------------------------------ assertions
  // The block position must stay constant over the rows of a block and fit
  // the local memory.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_fire && tree_busy) |-> (wr_pos == pos_q))
    else $error("sparse_blox: wr_pos changed inside a block");
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_fire |-> (32'(wr_pos) < LMEM_BLOCKS))
    else $error("sparse_blox: block position outside local memory");

endmodule
