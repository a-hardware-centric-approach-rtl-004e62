// sb_read_ctrl: serves block reads of the PE array through the sparse cache.
//
// The PE array asks for an input block by its position. The position is
// looked up in the sparse-block cache. On a hit the block was pruned when it
// was produced: a single response beat with rsp_zero set and all-zero data
// (the '0'-block) is returned, telling the PE array that the whole block is
// zero and its computation can be skipped; local memory is not touched. On a
// miss the ROWS rows of the block are read from local memory, one per cycle,
// and returned unchanged with rsp_zero clear; rsp_last marks the final beat.
//
// Handshake: rd_req_ready is high only when no request is in progress; a
// request is taken at an edge where rd_req_valid and rd_req_ready are high.
// The responses carry no back-pressure. Timing for a request taken at edge t:
// a hit answers in cycle t+1; a miss returns rows in cycles t+2 .. t+ROWS+1.
// The local-memory read port has one cycle of latency.
//
// The hit/miss behaviour follows the document; the response format, the
// single-beat zero response and the timing are this implementation's choices.
module sb_read_ctrl #(
  parameter int unsigned LANES       = sb_pkg::SB_LANES,
  parameter int unsigned ROWS        = sb_pkg::SB_ROWS,
  parameter int unsigned DATA_W      = sb_pkg::SB_DATA_W,
  parameter int unsigned POS_W       = sb_pkg::SB_POS_W,
  parameter int unsigned LMEM_BLOCKS = sb_pkg::SB_LMEM_BLOCKS,
  parameter int unsigned ADDR_W      = $clog2(LMEM_BLOCKS * ROWS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         stat_clr,
  // block read requests from the PE array
  input  logic                         rd_req_valid,
  output logic                         rd_req_ready,
  input  logic [POS_W-1:0]             rd_req_pos,
  // responses to the PE array
  output logic                         rsp_valid,
  output logic                         rsp_zero,
  output logic                         rsp_last,
  output logic [LANES-1:0][DATA_W-1:0] rsp_data,
  // sparse-cache lookup
  output logic                         lk_valid,
  output logic [POS_W-1:0]             lk_pos,
  input  logic                         lk_done,
  input  logic                         lk_hit,
  // local-memory read port
  output logic                         mem_re,
  output logic [ADDR_W-1:0]            mem_raddr,
  input  logic [LANES-1:0][DATA_W-1:0] mem_rdata,
  output logic                         idle,
  output logic [31:0]                  cnt_hits,
  output logic [31:0]                  cnt_misses
);

  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned BLK_W = (LMEM_BLOCKS > 1) ? $clog2(LMEM_BLOCKS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_READ} state_e;
  state_e           state;
  logic [POS_W-1:0] pos_q;
  logic [ROW_W-1:0] row;
  logic             rd_q, last_q;   // a memory read was issued last cycle

  logic hit_now, miss_now, issue_last;
  assign hit_now    = (state == S_LOOKUP) && lk_done && lk_hit;
  assign miss_now   = (state == S_LOOKUP) && lk_done && !lk_hit;
  assign issue_last = (row == ROW_W'(ROWS - 1));

  assign rd_req_ready = (state == S_IDLE);
  assign lk_valid     = rd_req_valid && rd_req_ready;
  assign lk_pos       = rd_req_pos;

  assign mem_re    = miss_now || (state == S_READ);
  assign mem_raddr = ADDR_W'(BLK_W'(pos_q)) * ADDR_W'(ROWS) + ADDR_W'(row);

  assign rsp_valid = hit_now || rd_q;
  assign rsp_zero  = hit_now;
  assign rsp_last  = hit_now || (rd_q && last_q);
  assign rsp_data  = hit_now ? '0 : mem_rdata;
  assign idle      = (state == S_IDLE) && !rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pos_q      <= '0;
      row        <= '0;
      rd_q       <= 1'b0;
      last_q     <= 1'b0;
      cnt_hits   <= '0;
      cnt_misses <= '0;
    end else begin
      rd_q   <= mem_re;
      last_q <= mem_re && issue_last;
      if (stat_clr) begin
        cnt_hits   <= '0;
        cnt_misses <= '0;
      end else begin
        if (hit_now)  cnt_hits   <= cnt_hits + 1;
        if (miss_now) cnt_misses <= cnt_misses + 1;
      end
      case (state)
        S_IDLE: if (lk_valid) begin
          pos_q <= rd_req_pos;
          row   <= '0;
          state <= S_LOOKUP;
        end
        S_LOOKUP: if (lk_done) begin
          if (lk_hit) state <= S_IDLE;
          else if (issue_last) state <= S_IDLE;   // one-row blocks
          else begin
            row   <= row + 1'b1;
            state <= S_READ;
          end
        end
        S_READ: begin
          if (issue_last) state <= S_IDLE;
          else            row   <= row + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
