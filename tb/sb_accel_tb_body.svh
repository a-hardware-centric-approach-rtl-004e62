// sb_accel_tb_body.svh: end-to-end scenario shared by the reduced-size and
// the default-size testbench of sb_accel_top.
//
// The including module defines STANDALONE (1: print the result line and end
// the simulation; 0: only raise scenario_done), the DUT sizes (LANES, ROWS, DATA_W, POS_W,
// NUM_LAYERS, CACHE_DEPTH, LMEM_BLOCKS, SUM_W, LAYER_W, ADDR_W, CNT_W), the
// scenario size NB (blocks per layer) and instantiates sb_accel_top as dut
// on the signals declared here.
//
// Scenario, playing the PE array and the off-chip side:
//   - every local-memory word is set to a sentinel, the input blocks of
//     layer 0 are loaded through the off-chip port, thresholds are loaded;
//   - for each of NLAYERS layers, a reader fetches every block the previous
//     layer produced (in random order) while a writer streams NB new output
//     blocks; the writer's blocks are all-zero, boundary (a single value of
//     magnitude th or th+1), sparse or dense, and the last one is all-zero
//     with a cache entry kept free for it. A reference model decides
//     prune/keep (sum of magnitudes <= threshold) and tracks the cache fill;
//   - layer_done is raised together with the last row of the layer (once
//     all reads are done), so the layer change has to wait for that block's
//     sum, decision and drain (a stall); the layer pointer must step;
//   - after each layer, every block of the layer is read back through the
//     off-chip port: kept blocks hold their data, pruned blocks were never
//     written (sentinel); all event counters are compared with the model;
//   - a last layer writes CACHE_DEPTH+ROWS all-zero blocks so the cache bank
//     overflows and the excess blocks must be kept.
// Read hits must answer in one cycle with a '0'-block, misses must return
// the stored rows in cycles t+2..t+ROWS+1, and the writer must never be
// stalled outside a layer change. Each mechanism must occur at least once.

  typedef logic [LANES-1:0][DATA_W-1:0] word_t;
  localparam int WORDS   = LMEM_BLOCKS * ROWS;
  localparam int NLAYERS = 3;
  localparam int OVF_NB  = CACHE_DEPTH + ROWS;
  localparam logic [DATA_W-1:0] SENTINEL = DATA_W'(16'h5a5a);

  logic clk = 0, rst_n = 0;
  logic cfg_th_we = 0;
  logic [LAYER_W-1:0] cfg_th_layer = '0;
  logic [SUM_W-1:0]   cfg_th_value = '0;
  logic net_start = 0, layer_done = 0, layer_stall;
  logic [LAYER_W-1:0] cur_layer;
  logic wr_valid = 0, wr_ready;
  word_t wr_row = '0;
  logic [POS_W-1:0] wr_pos = '0;
  logic rd_req_valid = 0, rd_req_ready;
  logic [POS_W-1:0] rd_req_pos = '0;
  logic rsp_valid, rsp_zero, rsp_last;
  word_t rsp_data;
  logic ext_en = 0, ext_we = 0;
  logic [ADDR_W-1:0] ext_addr = '0;
  word_t ext_wdata = '0, ext_rdata;
  logic idle;
  logic [CNT_W-1:0] cache_wr_count, cache_rd_count;
  logic [31:0] cnt_blocks, cnt_pruned, cnt_overflow, cnt_rows_dropped, cnt_rd_hits, cnt_rd_misses;

  int checks = 0, failures = 0;
  bit scenario_done = 0;
  // reference model
  word_t exp_mem [WORDS];
  bit    prev_sparse [int];
  bit    cur_sparse  [int];
  int    m_blocks = 0, m_pruned = 0, m_overflow = 0, m_dropped = 0, m_hits = 0, m_misses = 0;
  int    m_cache_fill = 0;
  logic [SUM_W-1:0] th_of [NUM_LAYERS];
  // mechanism counters
  int ev_keep = 0, ev_prune = 0, ev_overflow = 0, ev_hit = 0, ev_miss = 0;
  int ev_stall = 0, ev_swap = 0, ev_neg = 0, ev_boundary = 0;
  int wr_blocked = 0;
  bit reader_done = 0;

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  task automatic ext_write(input int addr, input word_t d);
    ext_en = 1; ext_we = 1; ext_addr = ADDR_W'(addr); ext_wdata = d;
    @(posedge clk); #1;
    ext_en = 0; ext_we = 0;
  endtask

  task automatic ext_read(input int addr, output word_t d);
    ext_en = 1; ext_we = 0; ext_addr = ADDR_W'(addr);
    @(posedge clk); #1;
    ext_en = 0;
    d = ext_rdata;
  endtask

  function automatic int mag(logic [DATA_W-1:0] v);
    return v[DATA_W-1] ? (1 << DATA_W) - int'(v) : int'(v);
  endfunction

  // build one output block of the given kind
  task automatic make_block(input int kind, input int th, output word_t rows [ROWS]);
    for (int r = 0; r < ROWS; r++) rows[r] = '0;
    case (kind)
      0: ;                                            // all zero
      1: begin                                        // single value, magnitude == th
        rows[$urandom_range(0, ROWS - 1)][$urandom_range(0, LANES - 1)] =
          ($urandom_range(0, 1) == 1) ? DATA_W'(th) : DATA_W'(-th);
        ev_boundary++;
      end
      2: begin                                        // single value, magnitude th+1
        rows[$urandom_range(0, ROWS - 1)][$urandom_range(0, LANES - 1)] = DATA_W'(th + 1);
        ev_boundary++;
      end
      3: for (int k = 0; k < 3; k++)                  // sparse, small values
           rows[$urandom_range(0, ROWS - 1)][$urandom_range(0, LANES - 1)] =
             DATA_W'($urandom_range(0, 40) - 20);
      default: for (int r = 0; r < ROWS; r++)         // dense
                 for (int l = 0; l < LANES; l++) rows[r][l] = DATA_W'($urandom_range(0, 600) - 300);
    endcase
  endtask

  // stream NB blocks of layer `layer` to positions base..base+n-1 (modulo wrap)
  task automatic writer(input int layer, input int base, input int n, input int wrap, input bit all_zero);
    word_t rows [ROWS];
    int th, sum;
    th = int'(th_of[layer]);
    for (int b = 0; b < n; b++) begin
      int pos, kind;
      pos = base + (b % wrap);
      // a normal layer ends with an all-zero block and keeps one free cache
      // entry for it, so the layer change must wait for its insert
      if (all_zero || b == n - 1)              kind = 0;
      else if (m_cache_fill >= CACHE_DEPTH - 1) kind = ($urandom_range(0, 1) == 1) ? 2 : 4;
      else                                     kind = $urandom_range(0, 4);
      make_block(kind, th, rows);
      sum = 0;
      for (int r = 0; r < ROWS; r++)
        for (int l = 0; l < LANES; l++) begin
          sum += mag(rows[r][l]);
          if (rows[r][l][DATA_W-1]) ev_neg++;
        end
      for (int r = 0; r < ROWS; r++) begin
        if (b == n - 1 && r == ROWS - 1 && !reader_done) begin
          wr_valid = 0;
          wait (reader_done);
        end
        wr_valid = 1; wr_row = rows[r]; wr_pos = POS_W'(pos);
        while (!wr_ready) begin
          wr_blocked++;
          @(posedge clk); #1;
        end
        // the layer ends with its last row
        layer_done = (b == n - 1 && r == ROWS - 1);
        @(posedge clk); #1;
        layer_done = 0;
      end
      wr_valid = 0;
      // model
      m_blocks++;
      if (sum <= th && m_cache_fill < CACHE_DEPTH) begin
        m_pruned++; m_cache_fill++; m_dropped += ROWS; ev_prune++;
        cur_sparse[pos] = 1;
      end else begin
        if (sum <= th) begin m_overflow++; ev_overflow++; end
        else ev_keep++;
        for (int r = 0; r < ROWS; r++) exp_mem[pos * ROWS + r] = rows[r];
        if (cur_sparse.exists(pos)) cur_sparse.delete(pos);
      end
    end
  endtask

  // read every block of the previous layer in random order
  task automatic reader(input int base, input int n);
    int order [];
    order = new[n];
    foreach (order[i]) order[i] = base + i;
    order.shuffle();
    reader_done = 0;
    foreach (order[i]) begin
      int pos;
      bit exp_hit;
      pos = order[i];
      exp_hit = prev_sparse.exists(pos);
      rd_req_valid = 1; rd_req_pos = POS_W'(pos);
      while (!rd_req_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      rd_req_valid = 0;
      if (exp_hit) begin
        m_hits++; ev_hit++;
        check(rsp_valid && rsp_zero && rsp_last && rsp_data == '0,
              $sformatf("pos %0d: expected '0'-block in the cycle after the request", pos));
      end else begin
        m_misses++; ev_miss++;
        check(!rsp_valid, $sformatf("pos %0d: response too early", pos));
        for (int r = 0; r < ROWS; r++) begin
          @(posedge clk); #1;
          check(rsp_valid && !rsp_zero && rsp_data == exp_mem[pos * ROWS + r] && rsp_last == (r == ROWS - 1),
                $sformatf("pos %0d row %0d: wrong miss response", pos, r));
        end
      end
      @(posedge clk); #1;
    end
    reader_done = 1;
  endtask

  task automatic check_counters(input string where);
    check(cnt_blocks == 32'(m_blocks) && cnt_pruned == 32'(m_pruned) && cnt_overflow == 32'(m_overflow),
          $sformatf("%s: blocks/pruned/overflow %0d/%0d/%0d, expected %0d/%0d/%0d", where,
                    cnt_blocks, cnt_pruned, cnt_overflow, m_blocks, m_pruned, m_overflow));
    check(cnt_rows_dropped == 32'(m_dropped),
          $sformatf("%s: dropped rows %0d expected %0d", where, cnt_rows_dropped, m_dropped));
    check(cnt_rd_hits == 32'(m_hits) && cnt_rd_misses == 32'(m_misses),
          $sformatf("%s: hits/misses %0d/%0d expected %0d/%0d", where, cnt_rd_hits, cnt_rd_misses,
                    m_hits, m_misses));
  endtask

  task automatic check_region(input int base, input int n);
    word_t d;
    for (int p = base; p < base + n; p++)
      for (int r = 0; r < ROWS; r++) begin
        ext_read(p * ROWS + r, d);
        check(d == exp_mem[p * ROWS + r], $sformatf("local memory block %0d row %0d", p, r));
      end
  endtask

  task automatic finish_layer(input int layer);
    int waited;
    waited = 0;
    while (layer_stall) begin
      check(!wr_ready && !rd_req_ready, "ready during a layer change");
      waited++;
      @(posedge clk); #1;
    end
    if (waited > 0) ev_stall++;
    ev_swap++;
    check(int'(cur_layer) == layer + 1, $sformatf("layer pointer %0d after layer %0d", cur_layer, layer));
    check(int'(cache_rd_count) == m_cache_fill, $sformatf("cache holds %0d positions, expected %0d",
                                                          cache_rd_count, m_cache_fill));
    check(cache_wr_count == 0, "write bank not empty after swap");
    prev_sparse = cur_sparse;
    cur_sparse.delete();
    m_cache_fill = 0;
  endtask

  initial begin
    repeat (40 * (OVF_NB + (NLAYERS + 2) * NB) * ROWS + 4 * WORDS + 10000) @(posedge clk);
    if (!scenario_done) begin
      failures++;
      $display("watchdog expired");
      if (STANDALONE) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      scenario_done = 1;
    end
  end

  initial begin
    word_t d;
    int in_base;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // local memory: sentinel everywhere, then the layer-0 input blocks
    for (int a = 0; a < WORDS; a++) begin
      exp_mem[a] = {LANES{SENTINEL}};
      ext_write(a, exp_mem[a]);
    end
    in_base = 0;
    for (int a = 0; a < NB * ROWS; a++) begin
      for (int l = 0; l < LANES; l++) d[l] = DATA_W'($urandom);
      exp_mem[a] = d;
      ext_write(a, d);
    end
    // thresholds: one per layer
    for (int i = 0; i < NUM_LAYERS; i++) begin
      th_of[i] = SUM_W'(60 + 40 * i);
      cfg_th_we = 1; cfg_th_layer = LAYER_W'(i); cfg_th_value = th_of[i];
      @(posedge clk); #1;
    end
    cfg_th_we = 0;
    net_start = 1; @(posedge clk); #1; net_start = 0;
    check(cur_layer == 0 && cache_rd_count == 0 && idle, "state after net_start");

    for (int layer = 0; layer < NLAYERS; layer++) begin
      int rd_base, wr_base;
      rd_base = layer * NB;
      wr_base = (layer + 1) * NB;
      fork
        reader(rd_base, NB);
        writer(layer, wr_base, NB, NB, 1'b0);
      join
      finish_layer(layer);
      check_region(wr_base, NB);
      check_counters($sformatf("layer %0d", layer));
    end
    check(wr_blocked == 0, $sformatf("writer blocked %0d cycles outside layer changes", wr_blocked));

    // overflow layer: more all-zero blocks than a cache bank holds, over
    // ROWS positions, so the excess blocks are kept and written
    begin
      int ovf_base, ovf_before;
      ovf_base   = (NLAYERS + 1) * NB;
      ovf_before = m_overflow;
      fork
        reader(NLAYERS * NB, NB);
        writer(NLAYERS, ovf_base, OVF_NB, ROWS, 1'b1);
      join
      finish_layer(NLAYERS);
      check_region(ovf_base, ROWS);
      check_counters("overflow layer");
      check(m_overflow - ovf_before == ROWS,
            $sformatf("%0d overflow blocks, expected %0d", m_overflow - ovf_before, ROWS));
    end

    // every mechanism must have happened
    check(ev_keep > 0,     "no kept block");
    check(ev_prune > 0,    "no pruned block");
    check(ev_overflow > 0, "no cache overflow");
    check(ev_hit > 0,      "no read hit ('0'-block)");
    check(ev_miss > 0,     "no read miss");
    check(ev_stall > 0,    "no layer-change stall");
    check(ev_swap > 0,     "no cache bank swap");
    check(ev_neg > 0,      "no negative activation");
    check(ev_boundary > 0, "no block at the threshold boundary");
    $display("%0dx%0d blocks, mechanisms: keep=%0d prune=%0d overflow=%0d hit=%0d miss=%0d stall=%0d swap=%0d boundary=%0d",
             ROWS, LANES, ev_keep, ev_prune, ev_overflow, ev_hit, ev_miss, ev_stall, ev_swap, ev_boundary);
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    scenario_done = 1;
  end
