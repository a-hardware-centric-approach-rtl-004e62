// sb_decision: threshold comparison and prune/keep decision for one block.
//
// When a block sum arrives (sum_valid) it is compared with the threshold of
// the current layer. A block whose sum is at or below the threshold is pruned:
// its position is sent to the sparse-block cache (cache_insert) and its data
// is dropped. A block above the threshold is kept and written to local memory
// as usual. If the cache bank is already full a prunable block is kept
// instead, which is always safe, and is counted as an overflow.
//
// The decision is combinational (same cycle as sum_valid); the three event
// counters are registered and cleared by stat_clr.
//
// The comparison "sum <= th" and the prune/keep outcome follow the document;
// the overflow fallback and the counters are this implementation's choices.
module sb_decision
  import sb_pkg::*;
#(
  parameter int unsigned SUM_W = sb_pkg::SB_DATA_W + $clog2(sb_pkg::SB_LANES * sb_pkg::SB_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               stat_clr,
  input  logic               sum_valid,
  input  logic [SUM_W-1:0]   sum,
  input  logic [SUM_W-1:0]   th,
  input  logic               cache_full,
  output logic               dec_valid,
  output sb_decision_e       decision,
  output logic               cache_insert,
  output logic [31:0]        cnt_blocks,
  output logic [31:0]        cnt_pruned,
  output logic [31:0]        cnt_overflow
);

  logic below;
  assign below = (sum <= th);

  always_comb begin
    if (!below)          decision = SB_KEEP;
    else if (cache_full) decision = SB_OVERFLOW;
    else                 decision = SB_PRUNE;
  end

  assign dec_valid    = sum_valid;
  assign cache_insert = sum_valid && (decision == SB_PRUNE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_blocks   <= '0;
      cnt_pruned   <= '0;
      cnt_overflow <= '0;
    end else if (stat_clr) begin
      cnt_blocks   <= '0;
      cnt_pruned   <= '0;
      cnt_overflow <= '0;
    end else if (sum_valid) begin
      cnt_blocks <= cnt_blocks + 1;
      if (decision == SB_PRUNE)    cnt_pruned   <= cnt_pruned + 1;
      if (decision == SB_OVERFLOW) cnt_overflow <= cnt_overflow + 1;
    end
  end

endmodule
