// tb_sparse_blox: test of the Sparse-Blox extension on its own, with a
// three-port local memory attached by the testbench. Sizes are reduced
// (cache banks of 4 positions, 96-block local memory, 12 blocks per layer).
// The scenario and its checks are described in sb_accel_tb_body.svh.
module tb_sparse_blox;
  localparam int LANES = 8, ROWS = 8, DATA_W = 16, POS_W = 16;
  localparam int NUM_LAYERS = 8, CACHE_DEPTH = 4, LMEM_BLOCKS = 96;
  localparam int SUM_W = DATA_W + $clog2(LANES * ROWS), LAYER_W = $clog2(NUM_LAYERS);
  localparam int ADDR_W = $clog2(LMEM_BLOCKS * ROWS), CNT_W = $clog2(CACHE_DEPTH + 1);
  localparam int NB = 12;

  localparam bit STANDALONE = 1'b1;

  `include "sb_accel_tb_body.svh"

  logic              mem_we, mem_re;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  word_t             mem_wdata, mem_rdata;

  sparse_blox #(
    .LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W), .NUM_LAYERS(NUM_LAYERS),
    .CACHE_DEPTH(CACHE_DEPTH), .LMEM_BLOCKS(LMEM_BLOCKS)
  ) dut (.*);

  sb_local_memory #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .LMEM_BLOCKS(LMEM_BLOCKS)) u_lmem (
    .clk,
    .sb_we(mem_we), .sb_waddr(mem_waddr), .sb_wdata(mem_wdata),
    .sb_re(mem_re), .sb_raddr(mem_raddr), .sb_rdata(mem_rdata),
    .ext_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata
  );
endmodule
