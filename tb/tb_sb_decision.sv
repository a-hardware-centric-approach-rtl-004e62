// tb_sb_decision: self-checking test of the threshold comparison.
//
// Applies random block sums against random thresholds (with many sums equal
// to or one off the threshold) and a random cache-full flag, checks the
// prune/keep/overflow outcome and the cache insert strobe against the rule
// "prune when sum <= threshold, unless the cache is full", and checks the
// three event counters.
module tb_sb_decision;
  import sb_pkg::*;
  localparam int SUM_W = 22;

  logic clk = 0, rst_n = 0, stat_clr = 0, sum_valid = 0, cache_full = 0;
  logic [SUM_W-1:0] sum = '0, th = '0;
  logic dec_valid, cache_insert;
  sb_decision_e decision;
  logic [31:0] cnt_blocks, cnt_pruned, cnt_overflow;
  int checks = 0, failures = 0;
  int n_blocks = 0, n_pruned = 0, n_over = 0;

  sb_decision #(.SUM_W(SUM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sb_decision_e exp_d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      th = SUM_W'($urandom_range(0, 5000));
      case ($urandom_range(0, 3))
        0: sum = th;
        1: sum = th + 1;
        2: sum = (th > 0) ? th - 1 : 0;
        default: sum = SUM_W'($urandom_range(0, 10000));
      endcase
      cache_full = ($urandom_range(0, 4) == 0);
      sum_valid  = ($urandom_range(0, 3) != 0);
      #1;
      if (sum > th)        exp_d = SB_KEEP;
      else if (cache_full) exp_d = SB_OVERFLOW;
      else                 exp_d = SB_PRUNE;
      checks++;
      if (sum_valid && (decision != exp_d || !dec_valid)) begin
        failures++; $display("sum %0d th %0d full %0d: got %s", sum, th, cache_full, decision.name());
      end
      checks++;
      if (cache_insert != (sum_valid && exp_d == SB_PRUNE)) begin
        failures++; $display("cache_insert wrong for sum %0d th %0d", sum, th);
      end
      if (sum_valid) begin
        n_blocks++;
        if (exp_d == SB_PRUNE) n_pruned++;
        if (exp_d == SB_OVERFLOW) n_over++;
      end
      @(posedge clk); #1;
    end
    sum_valid = 0;
    checks++;
    if (cnt_blocks != 32'(n_blocks) || cnt_pruned != 32'(n_pruned) || cnt_overflow != 32'(n_over)) begin
      failures++;
      $display("counters %0d/%0d/%0d expected %0d/%0d/%0d", cnt_blocks, cnt_pruned, cnt_overflow,
               n_blocks, n_pruned, n_over);
    end
    stat_clr = 1; @(posedge clk); #1; stat_clr = 0;
    checks++;
    if (cnt_blocks != 0 || cnt_pruned != 0 || cnt_overflow != 0) begin
      failures++; $display("counters not cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
