// sb_sparse_cache: store of pruned block positions, one layer to the next.
//
// A pruned block is represented only by its POS_W-bit block position. The
// store has two banks of DEPTH positions. While a layer is computed, the
// positions of the blocks it prunes are appended to the write bank, and the
// blocks it reads (the previous layer's output) are looked up in the read
// bank. swap, given between layers, turns the write bank into the read bank
// and empties the other one; clear empties both (start of an inference).
//
// Lookup is fully associative: lk_pos is compared with every valid entry of
// the read bank and the result is registered, so lk_done/lk_hit follow one
// cycle after lk_valid. An insert is taken at the clock edge; full is high
// when the write bank has no free entry and inserts are then ignored (the
// caller keeps such blocks instead).
//
// Holding 16-bit positions of sparse blocks between two layers and answering
// hit/miss for a requested block follow the document; the two banks, the
// append order, the associative search and the depth are this
// implementation's choices.
module sb_sparse_cache #(
  parameter int unsigned POS_W = sb_pkg::SB_POS_W,
  parameter int unsigned DEPTH = sb_pkg::SB_CACHE_DEPTH,
  parameter int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             swap,
  // insert into the write bank
  input  logic             ins_valid,
  input  logic [POS_W-1:0] ins_pos,
  output logic             full,
  // lookup in the read bank
  input  logic             lk_valid,
  input  logic [POS_W-1:0] lk_pos,
  output logic             lk_done,
  output logic             lk_hit,
  // occupancy
  output logic [CNT_W-1:0] wr_count,
  output logic [CNT_W-1:0] rd_count
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [POS_W-1:0] bank [2][DEPTH];
  logic             wsel;            // bank being written; ~wsel is read
  logic [CNT_W-1:0] cnt [2];

  assign wr_count = cnt[wsel];
  assign rd_count = cnt[~wsel];
  assign full     = (cnt[wsel] == CNT_W'(DEPTH));

  // associative search of the read bank: one match line per entry
  logic [DEPTH-1:0] match_line;
  logic             match;
  for (genvar i = 0; i < DEPTH; i++) begin : g_match
    assign match_line[i] = (CNT_W'(i) < cnt[~wsel]) && (bank[~wsel][i] == lk_pos);
  end
  assign match = |match_line;

  always_ff @(posedge clk) begin
    if (ins_valid && !full && !clear && !swap)
      bank[wsel][cnt[wsel][IDX_W-1:0]] <= ins_pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel    <= 1'b0;
      cnt[0]  <= '0;
      cnt[1]  <= '0;
      lk_done <= 1'b0;
      lk_hit  <= 1'b0;
    end else begin
      lk_done <= lk_valid;
      lk_hit  <= lk_valid && match;
      if (clear) begin
        cnt[0] <= '0;
        cnt[1] <= '0;
      end else if (swap) begin
        wsel       <= ~wsel;
        cnt[~wsel] <= '0;
      end else if (ins_valid && !full) begin
        cnt[wsel] <= cnt[wsel] + 1'b1;
      end
    end
  end

endmodule
