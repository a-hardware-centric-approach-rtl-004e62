// sb_pkg: default sizes shared by the Sparse-Blox blocks.
//
// Sparse-Blox cuts the activation output of a CNN layer into fixed blocks that
// match the PE array (8 rows x 8 lanes by default, the 8x8 systolic-array case),
// sums each block and prunes the blocks whose sum does not exceed a per-layer
// threshold. Pruned blocks are recorded only by their 16-bit block position.
//
// The 8x8 block and the 16-bit position width follow the published design.
// The activation width, the number of threshold entries, the cache and the
// local-memory depths are this implementation's own choices.
package sb_pkg;

  // Block geometry: lanes (columns) delivered per beat and rows per block.
  parameter int unsigned SB_LANES       = 8;
  parameter int unsigned SB_ROWS        = 8;
  // Activation width (signed two's complement values leaving the activation stage).
  parameter int unsigned SB_DATA_W      = 16;
  // Width of a block position as stored in the sparse-block cache.
  parameter int unsigned SB_POS_W       = 16;
  // Number of per-layer thresholds held on chip.
  parameter int unsigned SB_NUM_LAYERS  = 64;
  // Positions held by each of the two cache banks.
  parameter int unsigned SB_CACHE_DEPTH = 8192;
  // Blocks held by the local memory.
  parameter int unsigned SB_LMEM_BLOCKS = 1024;

  // Outcome of a block decision.
  typedef enum logic [1:0] {
    SB_KEEP     = 2'd0,  // sum above threshold: block goes to local memory
    SB_PRUNE    = 2'd1,  // sum at or below threshold: position goes to the cache
    SB_OVERFLOW = 2'd2   // would be pruned, but the cache bank is full: kept
  } sb_decision_e;

endpackage
