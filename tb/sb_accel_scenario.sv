// sb_accel_scenario: one sb_accel_top in a given block geometry, driven by
// the end-to-end scenario of sb_accel_tb_body.svh. Reports its check and
// failure counts and raises done when finished, so that a testbench can run
// several geometries side by side.
module sb_accel_scenario #(
  parameter int P_LANES       = 8,
  parameter int P_ROWS        = 8,
  parameter int P_CACHE_DEPTH = 8,
  parameter int P_NB          = 16
) (
  output int sc_checks,
  output int sc_failures,
  output bit sc_done
);
  localparam int LANES = P_LANES, ROWS = P_ROWS, DATA_W = 16, POS_W = 16;
  localparam int NUM_LAYERS = 8, CACHE_DEPTH = P_CACHE_DEPTH, LMEM_BLOCKS = 128;
  localparam int SUM_W = DATA_W + $clog2(LANES * ROWS), LAYER_W = $clog2(NUM_LAYERS);
  localparam int ADDR_W = $clog2(LMEM_BLOCKS * ROWS), CNT_W = $clog2(CACHE_DEPTH + 1);
  localparam int NB = P_NB;
  localparam bit STANDALONE = 1'b0;

  `include "sb_accel_tb_body.svh"

  always_comb begin
    sc_checks   = checks;
    sc_failures = failures;
    sc_done     = scenario_done;
  end

  sb_accel_top #(
    .LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W), .NUM_LAYERS(NUM_LAYERS),
    .CACHE_DEPTH(CACHE_DEPTH), .LMEM_BLOCKS(LMEM_BLOCKS)
  ) dut (.*);
endmodule
