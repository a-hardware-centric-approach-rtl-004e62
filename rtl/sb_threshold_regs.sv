// sb_threshold_regs: per-layer threshold set and current-layer pointer.
//
// The thresholds are chosen offline, one per network layer, and loaded before
// inference through a simple write port (cfg_we, cfg_layer, cfg_th). The
// module keeps a layer pointer that restarts at layer 0 on layer_rst (start of
// an inference) and steps on layer_next (a layer has finished); th always
// shows the threshold of the pointed-to layer. Past the last entry the pointer
// stays on the last entry.
//
// Timing: a threshold write or a pointer change is visible on th in the cycle
// after the clock edge that takes it. Reset clears every threshold to 0, which
// prunes only blocks whose activations are all zero (lossless).
//
// Loading a set of per-layer thresholds into the extension follows the
// document; the table depth, the pointer and the reset value are this
// implementation's choices.
module sb_threshold_regs #(
  parameter int unsigned NUM_LAYERS = sb_pkg::SB_NUM_LAYERS,
  parameter int unsigned SUM_W      = sb_pkg::SB_DATA_W + $clog2(sb_pkg::SB_LANES * sb_pkg::SB_ROWS),
  parameter int unsigned LAYER_W    = $clog2(NUM_LAYERS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [LAYER_W-1:0] cfg_layer,
  input  logic [SUM_W-1:0]   cfg_th,
  input  logic               layer_rst,
  input  logic               layer_next,
  output logic [LAYER_W-1:0] cur_layer,
  output logic [SUM_W-1:0]   th
);

  logic [SUM_W-1:0] table_q [NUM_LAYERS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_LAYERS; i++) table_q[i] <= '0;
    end else if (cfg_we && (32'(cfg_layer) < NUM_LAYERS)) begin
      table_q[cfg_layer] <= cfg_th;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_layer <= '0;
    end else if (layer_rst) begin
      cur_layer <= '0;
    end else if (layer_next && (32'(cur_layer) < NUM_LAYERS - 1)) begin
      cur_layer <= cur_layer + 1'b1;
    end
  end

  assign th = table_q[cur_layer];

endmodule
