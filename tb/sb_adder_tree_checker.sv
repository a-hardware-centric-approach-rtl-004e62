// sb_adder_tree_checker: stimulus and checks for one sb_adder_tree geometry.
//
// Sends random blocks (random signed values, extreme values, sparse blocks,
// random idle cycles between rows) and compares each block sum with the sum
// of magnitudes computed here. Checks that sum_valid comes exactly one cycle
// after the last row and that clear drops a partly summed block. Counts its
// checks and failures; done rises when it has finished.
module sb_adder_tree_checker #(
  parameter int LANES = 8,
  parameter int ROWS = 8,
  parameter int DATA_W = 16
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int SUM_W = DATA_W + $clog2(LANES * ROWS);

  initial begin checks = 0; failures = 0; end

  logic clear = 0, in_valid = 0;
  logic [LANES-1:0][DATA_W-1:0] in_row = '0;
  logic busy, sum_valid;
  logic [SUM_W-1:0] sum;

  sb_adder_tree #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W)) dut (.*);

  function automatic int mag(logic [DATA_W-1:0] v);
    return v[DATA_W-1] ? (1 << DATA_W) - int'(v) : int'(v);
  endfunction

  task automatic send_block(input int mode, output longint expect_sum);
    expect_sum = 0;
    for (int r = 0; r < ROWS; r++) begin
      for (int l = 0; l < LANES; l++) begin
        case (mode)
          0: in_row[l] = DATA_W'($urandom);
          1: in_row[l] = {1'b1, {(DATA_W-1){1'b0}}};   // most negative
          2: in_row[l] = {1'b0, {(DATA_W-1){1'b1}}};   // most positive
          default: in_row[l] = ($urandom_range(0, 3) == 0) ? DATA_W'($urandom_range(0, 50)) : '0;
        endcase
        expect_sum += mag(in_row[l]);
      end
      in_valid = 1;
      @(posedge clk); #1;
      // sum_valid must rise exactly after the last row
      if (r == ROWS - 1) begin
        checks++;
        if (!sum_valid) begin failures++; $display("sum_valid missing after last row"); end
        checks++;
        if (longint'(sum) != expect_sum) begin
          failures++; $display("sum mismatch mode %0d: got %0d exp %0d", mode, sum, expect_sum);
        end
      end else begin
        checks++;
        if (sum_valid) begin failures++; $display("early sum_valid at row %0d", r); end
      end
      in_valid = 0;
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk); #1;
        checks++;
        if (sum_valid) begin failures++; $display("sum_valid held too long"); end
      end
    end
  endtask

  initial begin
    longint e;
    done = 0;
    @(posedge rst_n);
    #1;
    for (int b = 0; b < 200; b++) send_block(b % 4, e);
    // clear in the middle of a block: the next full block must sum alone
    for (int r = 0; r < 3; r++) begin
      in_row = {LANES{DATA_W'(1000)}}; in_valid = 1; @(posedge clk); #1;
    end
    in_valid = 0; clear = 1; @(posedge clk); #1; clear = 0;
    checks++;
    if (busy) begin failures++; $display("busy after clear"); end
    send_block(0, e);
    done = 1;
  end
endmodule
