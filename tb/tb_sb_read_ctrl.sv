// tb_sb_read_ctrl: self-checking test of the block read path.
//
// Around the read controller sit a model of the sparse cache (a set of
// pruned positions answering one cycle after a lookup) and a model of local
// memory (one-cycle read). Random block reads are issued; a pruned position
// must be answered by one '0'-block beat one cycle after the request, any
// other by the ROWS rows of the block from memory in cycles t+2..t+ROWS+1,
// with rsp_last on the final beat. Hit and miss counters are checked.
module tb_sb_read_ctrl;
  localparam int LANES = 8, ROWS = 8, DATA_W = 16, POS_W = 16, LMEM_BLOCKS = 32;
  localparam int ADDR_W = $clog2(LMEM_BLOCKS * ROWS);
  typedef logic [LANES-1:0][DATA_W-1:0] word_t;

  logic clk = 0, rst_n = 0, stat_clr = 0;
  logic rd_req_valid = 0, rd_req_ready;
  logic [POS_W-1:0] rd_req_pos = '0;
  logic rsp_valid, rsp_zero, rsp_last;
  word_t rsp_data;
  logic lk_valid, lk_done = 0, lk_hit = 0;
  logic [POS_W-1:0] lk_pos;
  logic mem_re, idle;
  logic [ADDR_W-1:0] mem_raddr;
  word_t mem_rdata = '0;
  logic [31:0] cnt_hits, cnt_misses;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  word_t mem [LMEM_BLOCKS * ROWS];
  bit    sparse [LMEM_BLOCKS];

  sb_read_ctrl #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .POS_W(POS_W),
                 .LMEM_BLOCKS(LMEM_BLOCKS)) dut (.*);

  always #5 clk = ~clk;

  // cache and memory models
  always @(posedge clk) begin
    lk_done <= lk_valid;
    lk_hit  <= lk_valid && sparse[int'(lk_pos) % LMEM_BLOCKS];
    if (mem_re) mem_rdata <= mem[mem_raddr];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_block(input int pos);
    int beats;
    rd_req_valid = 1; rd_req_pos = POS_W'(pos);
    #1;
    checks++;
    if (!rd_req_ready) begin failures++; $display("not ready for a new request"); end
    @(posedge clk); #1;
    rd_req_valid = 0;
    // cycle t+1
    if (sparse[pos]) begin
      n_hit++;
      checks++;
      if (!(rsp_valid && rsp_zero && rsp_last && rsp_data == '0)) begin
        failures++; $display("pos %0d: no '0'-block answer in cycle t+1", pos);
      end
      @(posedge clk); #1;
      checks++;
      if (rsp_valid) begin failures++; $display("extra beat after hit"); end
    end else begin
      n_miss++;
      checks++;
      if (rsp_valid) begin failures++; $display("pos %0d: early response", pos); end
      for (int r = 0; r < ROWS; r++) begin
        @(posedge clk); #1;
        checks++;
        if (!rsp_valid || rsp_zero || rsp_data != mem[pos * ROWS + r] || rsp_last != (r == ROWS - 1)) begin
          failures++; $display("pos %0d row %0d: valid %0d zero %0d last %0d", pos, r, rsp_valid, rsp_zero, rsp_last);
        end
      end
    end
  endtask

  initial begin
    for (int a = 0; a < LMEM_BLOCKS * ROWS; a++)
      for (int l = 0; l < LANES; l++) mem[a][l] = DATA_W'($urandom);
    for (int b = 0; b < LMEM_BLOCKS; b++) sparse[b] = ($urandom_range(0, 2) == 0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      read_block($urandom_range(0, LMEM_BLOCKS - 1));
      repeat ($urandom_range(0, 1)) @(posedge clk);
      #1;
    end
    checks++;
    if (!idle) begin failures++; $display("not idle at end"); end
    checks++;
    if (cnt_hits != 32'(n_hit) || cnt_misses != 32'(n_miss)) begin
      failures++; $display("counters %0d/%0d expected %0d/%0d", cnt_hits, cnt_misses, n_hit, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
