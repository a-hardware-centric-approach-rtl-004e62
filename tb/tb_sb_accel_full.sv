// tb_sb_accel_full: end-to-end test of sb_accel_top with every size at its
// default (8x8 blocks, 16-bit positions, 64 thresholds, two cache banks of
// 8192 positions, 1024-block local memory), 64 blocks per layer. The
// scenario and its checks are described in sb_accel_tb_body.svh; its last
// layer streams 8200 all-zero blocks to overflow a full-size cache bank.
module tb_sb_accel_full;
  localparam int LANES = sb_pkg::SB_LANES, ROWS = sb_pkg::SB_ROWS;
  localparam int DATA_W = sb_pkg::SB_DATA_W, POS_W = sb_pkg::SB_POS_W;
  localparam int NUM_LAYERS = sb_pkg::SB_NUM_LAYERS, CACHE_DEPTH = sb_pkg::SB_CACHE_DEPTH;
  localparam int LMEM_BLOCKS = sb_pkg::SB_LMEM_BLOCKS;
  localparam int SUM_W = DATA_W + $clog2(LANES * ROWS), LAYER_W = $clog2(NUM_LAYERS);
  localparam int ADDR_W = $clog2(LMEM_BLOCKS * ROWS), CNT_W = $clog2(CACHE_DEPTH + 1);
  localparam int NB = 64;

  localparam bit STANDALONE = 1'b1;

  `include "sb_accel_tb_body.svh"

  sb_accel_top dut (.*);
endmodule
