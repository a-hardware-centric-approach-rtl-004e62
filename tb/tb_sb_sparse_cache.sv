// tb_sb_sparse_cache: self-checking test of the sparse-block position store.
//
// With small banks (DEPTH = 16) it fills the write bank with random
// positions, checks full and that inserts past full are ignored, swaps, and
// then looks up random and stored positions in the read bank while a new
// layer's positions are inserted. Each lookup answer is checked against a
// model and must come exactly one cycle after the request. A second swap
// must retire the old read bank; clear must empty both banks.
module tb_sb_sparse_cache;
  localparam int POS_W = 16, DEPTH = 16, CNT_W = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0, clear = 0, swap = 0, ins_valid = 0, lk_valid = 0;
  logic [POS_W-1:0] ins_pos = '0, lk_pos = '0;
  logic full, lk_done, lk_hit;
  logic [CNT_W-1:0] wr_count, rd_count;
  int checks = 0, failures = 0;

  bit rd_set [int];   // model of the read bank
  bit wr_set [int];   // model of the write bank

  sb_sparse_cache #(.POS_W(POS_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic insert(input int pos);
    ins_valid = 1; ins_pos = POS_W'(pos);
    if (!full) wr_set[pos] = 1;
    @(posedge clk); #1;
    ins_valid = 0;
  endtask

  task automatic do_swap();
    swap = 1; @(posedge clk); #1; swap = 0;
    rd_set = wr_set;
    wr_set.delete();
  endtask

  task automatic lookup(input int pos);
    bit exp;
    exp = rd_set.exists(pos);
    lk_valid = 1; lk_pos = POS_W'(pos);
    @(posedge clk); #1;
    lk_valid = 0;
    checks++;
    if (!lk_done || lk_hit != exp) begin
      failures++; $display("lookup %0d: done %0d hit %0d expected %0d", pos, lk_done, lk_hit, exp);
    end
  endtask

  int stored [$];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // layer A: fill to full with distinct positions
    for (int i = 0; i < DEPTH; i++) begin
      int p;
      p = 1000 + 7 * i;
      stored.push_back(p);
      insert(p);
    end
    checks++;
    if (!full || int'(wr_count) != DEPTH) begin failures++; $display("bank not full"); end
    insert(5);   // ignored
    checks++;
    if (int'(wr_count) != DEPTH) begin failures++; $display("insert past full counted"); end
    do_swap();
    checks++;
    if (full || wr_count != 0 || int'(rd_count) != DEPTH) begin
      failures++; $display("swap counts wr %0d rd %0d", wr_count, rd_count);
    end
    // layer B: lookups of layer A positions while inserting new ones
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(0, 1)) lookup(stored[$urandom_range(0, DEPTH - 1)]);
      else                      lookup($urandom_range(0, 2000));
      if (i % 20 == 0) insert(3000 + i);
    end
    lookup(5);   // the ignored insert must not be found
    do_swap();
    // layer C: layer A positions are gone, layer B's are present
    for (int i = 0; i < DEPTH; i++) lookup(stored[i]);
    for (int i = 0; i < 200; i += 20) lookup(3000 + i);
    clear = 1; @(posedge clk); #1; clear = 0;
    rd_set.delete(); wr_set.delete();
    lookup(3000);
    checks++;
    if (wr_count != 0 || rd_count != 0) begin failures++; $display("clear did not empty banks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
