// sb_local_memory: on-chip activation memory of the host accelerator.
//
// One word holds one block row (LANES activations), so block position p
// occupies words p*ROWS .. p*ROWS+ROWS-1. The memory has three ports:
//   - a write port used by Sparse-Blox for kept blocks,
//   - a read port used by Sparse-Blox to fetch blocks that missed the cache,
//   - a read/write port toward off-chip memory (loading inputs, offloading
//     results).
// Reads return data one cycle after the request (registered output). When
// both write ports hit the same word in one cycle the off-chip write wins.
//
// The document names this memory and leaves it unchanged by the extension;
// its organisation, depth and ports are this implementation's choices.
module sb_local_memory #(
  parameter int unsigned LANES       = sb_pkg::SB_LANES,
  parameter int unsigned ROWS        = sb_pkg::SB_ROWS,
  parameter int unsigned DATA_W      = sb_pkg::SB_DATA_W,
  parameter int unsigned LMEM_BLOCKS = sb_pkg::SB_LMEM_BLOCKS,
  parameter int unsigned ADDR_W      = $clog2(LMEM_BLOCKS * ROWS)
) (
  input  logic                         clk,
  // Sparse-Blox write port
  input  logic                         sb_we,
  input  logic [ADDR_W-1:0]            sb_waddr,
  input  logic [LANES-1:0][DATA_W-1:0] sb_wdata,
  // Sparse-Blox read port
  input  logic                         sb_re,
  input  logic [ADDR_W-1:0]            sb_raddr,
  output logic [LANES-1:0][DATA_W-1:0] sb_rdata,
  // off-chip side port
  input  logic                         ext_en,
  input  logic                         ext_we,
  input  logic [ADDR_W-1:0]            ext_addr,
  input  logic [LANES-1:0][DATA_W-1:0] ext_wdata,
  output logic [LANES-1:0][DATA_W-1:0] ext_rdata
);

  localparam int unsigned WORDS = LMEM_BLOCKS * ROWS;

  logic [LANES-1:0][DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (sb_we && !(ext_en && ext_we && ext_addr == sb_waddr)) mem[sb_waddr] <= sb_wdata;
    if (ext_en && ext_we) mem[ext_addr] <= ext_wdata;
  end

  always_ff @(posedge clk) begin
    if (sb_re) sb_rdata <= mem[sb_raddr];
    if (ext_en && !ext_we) ext_rdata <= mem[ext_addr];
  end

endmodule
