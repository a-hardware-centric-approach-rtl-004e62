// sb_block_buffer: holds block rows until the block's prune decision is known.
//
// A block is only known to be prunable once its last row has been summed, so
// its rows wait here. Rows enter with the block position (in_pos, taken with
// every row, only the first row's value is used for addressing). One decision
// per block arrives later on dec_valid/dec_keep, in block order. The drain
// side then walks the oldest block one row per cycle: a kept block is written
// to local memory at address pos*ROWS + row, a pruned block is dropped, so it
// costs no local-memory space and no memory write.
//
// A row waits ROWS+1 cycles for its block's decision (ROWS-1 for the rest
// of the block, one for the registered sum, one for the queued decision).
// The row store is a FIFO of DEPTH = 2*ROWS+2 rows, more than the ROWS+1 rows
// in flight, so a new block enters while the previous one drains and a
// stream of blocks runs at one row per cycle without stalls, also for
// one-row blocks. in_ready falls only if decisions come late.
//
// Timing: a row accepted at edge t can be written at edge t+1 at the earliest
// (after its decision). idle is high when no row is stored.
//
// The document places a selection between the PE results and local memory;
// holding the rows in a FIFO until the decision is this implementation's way
// of doing that.
module sb_block_buffer #(
  parameter int unsigned LANES      = sb_pkg::SB_LANES,
  parameter int unsigned ROWS       = sb_pkg::SB_ROWS,
  parameter int unsigned DATA_W     = sb_pkg::SB_DATA_W,
  parameter int unsigned POS_W      = sb_pkg::SB_POS_W,
  parameter int unsigned LMEM_BLOCKS = sb_pkg::SB_LMEM_BLOCKS,
  parameter int unsigned ADDR_W     = $clog2(LMEM_BLOCKS * ROWS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // rows from the PE array
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [LANES-1:0][DATA_W-1:0] in_row,
  input  logic [POS_W-1:0]             in_pos,
  // one decision per block, in order
  input  logic                         dec_valid,
  input  logic                         dec_keep,
  // local-memory write port
  output logic                         mem_we,
  output logic [ADDR_W-1:0]            mem_addr,
  output logic [LANES-1:0][DATA_W-1:0] mem_wdata,
  output logic                         idle,
  output logic [31:0]                  cnt_rows_dropped
);

  localparam int unsigned DEPTH  = 2 * ROWS + 2;
  localparam int unsigned PTR_W  = $clog2(DEPTH);
  // decisions can never outnumber stored rows
  localparam int unsigned DQ_W   = $clog2(DEPTH);
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned BLK_W  = (LMEM_BLOCKS > 1) ? $clog2(LMEM_BLOCKS) : 1;

  typedef struct packed {
    logic [POS_W-1:0]             pos;
    logic [LANES-1:0][DATA_W-1:0] data;
  } row_t;

  row_t             rows_q [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;

  // decisions waiting for their rows to drain, oldest at dq_rd
  logic [DEPTH-1:0] dec_keep_q;
  logic [DQ_W-1:0]  dq_wr, dq_rd;
  logic [DQ_W:0]    dec_cnt;
  logic [ROW_W-1:0] drain_row;

  logic push, pop, dec_pop;
  assign in_ready = (count < (PTR_W+1)'(DEPTH));
  assign push     = in_valid && in_ready;
  assign pop      = (count != '0) && (dec_cnt != '0);
  assign dec_pop  = pop && (drain_row == ROW_W'(ROWS - 1));

  row_t head;
  assign head = rows_q[rd_ptr];

  assign mem_we    = pop && dec_keep_q[dq_rd];
  assign mem_addr  = ADDR_W'(BLK_W'(head.pos)) * ADDR_W'(ROWS) + ADDR_W'(drain_row);
  assign mem_wdata = head.data;
  assign idle      = (count == '0);

  always_ff @(posedge clk) begin
    if (push) rows_q[wr_ptr] <= '{pos: in_pos, data: in_row};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr           <= '0;
      rd_ptr           <= '0;
      count            <= '0;
      dec_keep_q       <= '0;
      dq_wr            <= '0;
      dq_rd            <= '0;
      dec_cnt          <= '0;
      drain_row        <= '0;
      cnt_rows_dropped <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PTR_W'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PTR_W+1)'(push) - (PTR_W+1)'(pop);

      if (pop) drain_row <= dec_pop ? '0 : drain_row + 1'b1;
      if (pop && !dec_keep_q[dq_rd]) cnt_rows_dropped <= cnt_rows_dropped + 1;

      if (dec_valid) begin
        dec_keep_q[dq_wr] <= dec_keep;
        dq_wr             <= (dq_wr == DQ_W'(DEPTH - 1)) ? '0 : dq_wr + 1'b1;
      end
      if (dec_pop) dq_rd <= (dq_rd == DQ_W'(DEPTH - 1)) ? '0 : dq_rd + 1'b1;
      dec_cnt <= dec_cnt + (DQ_W+1)'(dec_valid) - (DQ_W+1)'(dec_pop);
    end
  end

  // A decision is only ever given for a block whose rows are all stored.
  assert property (@(posedge clk) disable iff (!rst_n) dec_valid |-> (dec_cnt < (DQ_W+1)'(count)))
    else $error("sb_block_buffer: decision without stored rows");

endmodule
