// tb_sb_local_memory: self-checking test of the three-port local memory.
//
// Random writes through the Sparse-Blox write port and the off-chip port,
// random reads through both read ports, all against a model; read data must
// appear one cycle after the request. Simultaneous writes to one word must
// leave the off-chip port's data.
module tb_sb_local_memory;
  localparam int LANES = 8, ROWS = 8, DATA_W = 16, LMEM_BLOCKS = 16;
  localparam int ADDR_W = $clog2(LMEM_BLOCKS * ROWS), WORDS = LMEM_BLOCKS * ROWS;
  typedef logic [LANES-1:0][DATA_W-1:0] word_t;

  logic clk = 0;
  logic sb_we = 0, sb_re = 0, ext_en = 0, ext_we = 0;
  logic [ADDR_W-1:0] sb_waddr = '0, sb_raddr = '0, ext_addr = '0;
  word_t sb_wdata = '0, ext_wdata = '0, sb_rdata, ext_rdata;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  sb_local_memory #(.LANES(LANES), .ROWS(ROWS), .DATA_W(DATA_W), .LMEM_BLOCKS(LMEM_BLOCKS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_sb, exp_ext;
    bit    chk_sb, chk_ext;
    // initialise every word through the off-chip port
    for (int a = 0; a < WORDS; a++) begin
      model[a] = {LANES{DATA_W'(a)}};
      ext_en = 1; ext_we = 1; ext_addr = ADDR_W'(a); ext_wdata = model[a];
      @(posedge clk); #1;
    end
    ext_en = 0; ext_we = 0;
    for (int i = 0; i < 3000; i++) begin
      // reads see the contents before this cycle's writes
      sb_re = $urandom_range(0, 1); sb_raddr = ADDR_W'($urandom_range(0, WORDS - 1));
      ext_en = $urandom_range(0, 1); ext_we = $urandom_range(0, 1);
      ext_addr = ADDR_W'($urandom_range(0, WORDS - 1));
      sb_we = $urandom_range(0, 1);
      sb_waddr = (i % 10 == 0) ? ext_addr : ADDR_W'($urandom_range(0, WORDS - 1));
      for (int l = 0; l < LANES; l++) begin
        sb_wdata[l] = DATA_W'($urandom); ext_wdata[l] = DATA_W'($urandom);
      end
      chk_sb  = sb_re;  exp_sb  = model[sb_raddr];
      chk_ext = ext_en && !ext_we; exp_ext = model[ext_addr];
      if (sb_we) model[sb_waddr] = sb_wdata;
      if (ext_en && ext_we) model[ext_addr] = ext_wdata;
      @(posedge clk); #1;
      if (chk_sb) begin
        checks++;
        if (sb_rdata != exp_sb) begin failures++; $display("sb read mismatch at %0d", i); end
      end
      if (chk_ext) begin
        checks++;
        if (ext_rdata != exp_ext) begin failures++; $display("ext read mismatch at %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
