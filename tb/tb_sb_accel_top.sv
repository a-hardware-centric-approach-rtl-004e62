// tb_sb_accel_top: end-to-end test of the extended accelerator data path at
// reduced sizes (cache banks of 8 positions, 128-block local memory, 16
// blocks per layer) so that a cache overflow is quick to reach. The scenario
// and its checks are described in sb_accel_tb_body.svh.
module tb_sb_accel_top;
  localparam int LANES = 8, ROWS = 8, DATA_W = 16, POS_W = 16;
  localparam int NUM_LAYERS = 8, CACHE_DEPTH = 8, LMEM_BLOCKS = 128;
  localparam int SUM_W = DATA_W + $clog2(LANES * ROWS), LAYER_W = $clog2(NUM_LAYERS);
  localparam int ADDR_W = $clog2(LMEM_BLOCKS * ROWS), CNT_W = $clog2(CACHE_DEPTH + 1);
  localparam int NB = 16;

  localparam bit STANDALONE = 1'b1;

  `include "sb_accel_tb_body.svh"

  sb_accel_top #(
    .LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W), .NUM_LAYERS(NUM_LAYERS),
    .CACHE_DEPTH(CACHE_DEPTH), .LMEM_BLOCKS(LMEM_BLOCKS)
  ) dut (.*);
endmodule
