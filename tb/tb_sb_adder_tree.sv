// tb_sb_adder_tree: self-checking test of the block-sum adder tree in the
// block geometries the design is evaluated with: 8x8 (systolic array),
// 16x16, 1x16 (vector processor, one row of 16 lanes) and 3x7 (three rows of
// seven lanes, an odd lane count). Each geometry is driven and checked by an
// sb_adder_tree_checker; the results are summed here.
module tb_sb_adder_tree;
  logic clk = 0, rst_n = 0;
  int c [4], f [4];
  bit d [4];
  int checks, failures;

  always #5 clk = ~clk;

  sb_adder_tree_checker #(.LANES(8),  .ROWS(8))  u_8x8   (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  sb_adder_tree_checker #(.LANES(16), .ROWS(16)) u_16x16 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  sb_adder_tree_checker #(.LANES(16), .ROWS(1))  u_1x16  (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  sb_adder_tree_checker #(.LANES(7),  .ROWS(3))  u_3x7   (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
