// sb_adder_tree: block sum of activation magnitudes.
//
// Each accepted beat carries one row of LANES activations. The magnitudes of
// the row are added by a binary adder tree (ceil(log2(LANES)) levels,
// combinational, any LANES),
// and the row sums are accumulated over ROWS beats. After the last row of a
// block the total is registered and sum_valid pulses for one cycle.
//
// Interface: in_valid qualifies in_row; there is no back-pressure here, the
// parent only asserts in_valid for rows it accepts. clear drops a partly
// summed block. Timing: sum_valid/sum follow one cycle after the clock edge
// that takes the last row of a block; a new block can start on the next beat.
//
// The document says the PE results are summed by an adder tree and that the
// unit watches the magnitude of the activations; adding absolute values (so
// that signed activation functions are handled as well as ReLU) and splitting
// the block into beats of one row are this implementation's choices.
module sb_adder_tree #(
  parameter int unsigned LANES  = sb_pkg::SB_LANES,
  parameter int unsigned ROWS   = sb_pkg::SB_ROWS,
  parameter int unsigned DATA_W = sb_pkg::SB_DATA_W,
  parameter int unsigned SUM_W  = DATA_W + $clog2(LANES * ROWS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         in_valid,
  input  logic [LANES-1:0][DATA_W-1:0] in_row,
  output logic                         busy,      // a block is partly summed
  output logic                         sum_valid,
  output logic [SUM_W-1:0]             sum
);

  localparam int unsigned LEVELS = $clog2(LANES);
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1;

  // Leaves: magnitude of each activation, zero-extended to the sum width.
  logic [LANES-1:0][SUM_W-1:0] leaf;
  always_comb begin
    for (int unsigned i = 0; i < LANES; i++) begin
      logic [DATA_W-1:0] mag;
      // two's complement negation; the most negative value maps to its magnitude
      mag     = in_row[i][DATA_W-1] ? (~in_row[i] + 1'b1) : in_row[i];
      leaf[i] = SUM_W'(mag);
    end
  end

  // Binary tree: level l holds ceil(LANES / 2^l) partial sums; a node without
  // a partner (odd count) is passed up unchanged.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned N = (LANES + (1 << l) - 1) >> l;
    logic [N-1:0][SUM_W-1:0] node;
    if (l == 0) begin : g_leaf
      assign node = leaf;
    end else begin : g_add
      localparam int unsigned NP = (LANES + (1 << (l - 1)) - 1) >> (l - 1);
      for (genvar n = 0; n < N; n++) begin : g_node
        if (2 * n + 1 < NP) begin : g_sum
          assign node[n] = g_lvl[l-1].node[2*n] + g_lvl[l-1].node[2*n+1];
        end else begin : g_pass
          assign node[n] = g_lvl[l-1].node[2*n];
        end
      end
    end
  end

  logic [SUM_W-1:0] row_sum;
  assign row_sum = g_lvl[LEVELS].node[0];

  // Accumulation over the rows of a block.
  logic [SUM_W-1:0] acc;
  logic [ROW_W-1:0] row_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      row_cnt   <= '0;
      sum_valid <= 1'b0;
      sum       <= '0;
    end else begin
      sum_valid <= 1'b0;
      if (clear) begin
        acc     <= '0;
        row_cnt <= '0;
      end else if (in_valid) begin
        if (row_cnt == ROW_W'(ROWS - 1)) begin
          sum       <= acc + row_sum;
          sum_valid <= 1'b1;
          acc       <= '0;
          row_cnt   <= '0;
        end else begin
          acc     <= acc + row_sum;
          row_cnt <= row_cnt + 1'b1;
        end
      end
    end
  end

  assign busy = (row_cnt != '0);

endmodule
