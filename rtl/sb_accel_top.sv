// sb_accel_top: Sparse-Blox together with the accelerator's local memory.
//
// This is the extended accelerator data path between the PE array and
// off-chip memory: the PE array's result stream enters on wr_*, its block
// reads go through rd_req_*/rsp_*, and the off-chip side reaches the local
// memory through ext_*. Thresholds are loaded with cfg_th_*; net_start and
// layer_done sequence the layers (see sparse_blox). The PE array and the
// off-chip memory are not part of this RTL; their signals are the ports.
//
// Timing: see sparse_blox; the off-chip port reads with one cycle latency.
module sb_accel_top #(
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
  input  logic                         cfg_th_we,
  input  logic [LAYER_W-1:0]           cfg_th_layer,
  input  logic [SUM_W-1:0]             cfg_th_value,
  input  logic                         net_start,
  input  logic                         layer_done,
  output logic                         layer_stall,
  output logic [LAYER_W-1:0]           cur_layer,
  input  logic                         wr_valid,
  output logic                         wr_ready,
  input  logic [LANES-1:0][DATA_W-1:0] wr_row,
  input  logic [POS_W-1:0]             wr_pos,
  input  logic                         rd_req_valid,
  output logic                         rd_req_ready,
  input  logic [POS_W-1:0]             rd_req_pos,
  output logic                         rsp_valid,
  output logic                         rsp_zero,
  output logic                         rsp_last,
  output logic [LANES-1:0][DATA_W-1:0] rsp_data,
  input  logic                         ext_en,
  input  logic                         ext_we,
  input  logic [ADDR_W-1:0]            ext_addr,
  input  logic [LANES-1:0][DATA_W-1:0] ext_wdata,
  output logic [LANES-1:0][DATA_W-1:0] ext_rdata,
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

  logic                         mem_we, mem_re;
  logic [ADDR_W-1:0]            mem_waddr, mem_raddr;
  logic [LANES-1:0][DATA_W-1:0] mem_wdata, mem_rdata;

  sparse_blox #(
    .LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W),
    .NUM_LAYERS(NUM_LAYERS), .CACHE_DEPTH(CACHE_DEPTH), .LMEM_BLOCKS(LMEM_BLOCKS),
    .SUM_W(SUM_W), .LAYER_W(LAYER_W), .ADDR_W(ADDR_W), .CNT_W(CNT_W)
  ) u_sb (.*);

  sb_local_memory #(
    .LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .LMEM_BLOCKS(LMEM_BLOCKS), .ADDR_W(ADDR_W)
  ) u_lmem (
    .clk,
    .sb_we   (mem_we),
    .sb_waddr(mem_waddr),
    .sb_wdata(mem_wdata),
    .sb_re   (mem_re),
    .sb_raddr(mem_raddr),
    .sb_rdata(mem_rdata),
    .ext_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata
  );

endmodule
