// tb_sb_block_buffer: self-checking test of the row buffer in front of local
// memory.
//
// Streams random 8x8 blocks with random positions. Each block's keep/drop
// decision is given one cycle after its last row, as the adder tree and
// decision logic do. Every memory write is checked against the expected row
// and address (pos*ROWS + row) in order; dropped blocks must never be
// written. A back-to-back stream must never see in_ready low (one row per
// cycle), and the buffer must go idle at the end. The dropped-row counter is
// checked as well.
module tb_sb_block_buffer;
  localparam int LANES = 8, ROWS = 8, DATA_W = 16, POS_W = 16, LMEM_BLOCKS = 64;
  localparam int ADDR_W = $clog2(LMEM_BLOCKS * ROWS);
  localparam int NBLK = 300;

  logic clk = 0, rst_n = 0, in_valid = 0, dec_valid = 0, dec_keep = 0;
  logic in_ready, mem_we, idle;
  logic [LANES-1:0][DATA_W-1:0] in_row = '0, mem_wdata;
  logic [POS_W-1:0] in_pos = '0;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] cnt_rows_dropped;
  int checks = 0, failures = 0;

  // expected write stream
  logic [LANES-1:0][DATA_W-1:0] exp_data [$];
  int                           exp_addr [$];
  int stall_cycles = 0, dropped_rows = 0;

  sb_block_buffer #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W),
                    .LMEM_BLOCKS(LMEM_BLOCKS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check writes as they happen
  always @(posedge clk) if (rst_n && mem_we) begin
    checks++;
    if (exp_addr.size() == 0) begin
      failures++; $display("unexpected write to %0d", mem_addr);
    end else begin
      int a;
      logic [LANES-1:0][DATA_W-1:0] d;
      a = exp_addr.pop_front();
      d = exp_data.pop_front();
      if (int'(mem_addr) != a || mem_wdata != d) begin
        failures++; $display("write addr %0d exp %0d, data %h exp %h", mem_addr, a, mem_wdata, d);
      end
    end
  end

  // decision one cycle after the last row of each block
  logic            pend_dec = 0, pend_keep = 0;
  always @(posedge clk) begin
    dec_valid <= pend_dec;
    dec_keep  <= pend_keep;
  end

  task automatic send_block(input int pos, input bit keep, input bit gaps);
    for (int r = 0; r < ROWS; r++) begin
      for (int l = 0; l < LANES; l++) in_row[l] = DATA_W'($urandom);
      in_pos = POS_W'(pos);
      in_valid = 1;
      #1;
      while (!in_ready) begin
        stall_cycles++;
        @(posedge clk); #1;
      end
      if (keep) begin
        exp_addr.push_back(pos * ROWS + r);
        exp_data.push_back(in_row);
      end else dropped_rows++;
      pend_dec  = (r == ROWS - 1);
      pend_keep = keep;
      @(posedge clk); #1;
      pend_dec = 0;
      in_valid = 0;
      if (gaps) repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // back-to-back stream: no stall allowed
    for (int b = 0; b < NBLK; b++) send_block($urandom_range(0, LMEM_BLOCKS - 1), $urandom_range(0, 1), 0);
    checks++;
    if (stall_cycles != 0) begin failures++; $display("%0d stall cycles in a steady stream", stall_cycles); end
    // stream with gaps
    for (int b = 0; b < 100; b++) send_block($urandom_range(0, LMEM_BLOCKS - 1), $urandom_range(0, 1), 1);
    repeat (3 * ROWS) @(posedge clk);
    #1;
    checks++;
    if (!idle || exp_addr.size() != 0) begin
      failures++; $display("not drained: idle %0d, %0d writes missing", idle, exp_addr.size());
    end
    checks++;
    if (cnt_rows_dropped != 32'(dropped_rows)) begin
      failures++; $display("dropped rows %0d expected %0d", cnt_rows_dropped, dropped_rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
