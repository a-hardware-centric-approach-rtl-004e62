// tb_sb_accel_geometries: the end-to-end scenario in the other block
// geometries that the design is evaluated with, side by side:
//   - 1x16 blocks (a vector processor with 16 lanes),
//   - 16x16 blocks (a 16x16 systolic array),
//   - 4x4 blocks (a 4x4 PE array),
//   - 3x7 blocks (a 3x7 PE array, odd lane count).
// Cache banks are kept small (8 or 16 positions) so that each scenario's
// last layer overflows its bank quickly; a full-depth bank is exercised by
// tb_sb_accel_full. The 8x8 geometry is covered by tb_sb_accel_top and
// tb_sb_accel_full.
module tb_sb_accel_geometries;
  int c [4], f [4];
  bit d [4];
  int checks, failures;

  sb_accel_scenario #(.P_LANES(16), .P_ROWS(1),  .P_CACHE_DEPTH(16),   .P_NB(16)) u_1x16  (.sc_checks(c[0]), .sc_failures(f[0]), .sc_done(d[0]));
  sb_accel_scenario #(.P_LANES(16), .P_ROWS(16), .P_CACHE_DEPTH(8),    .P_NB(16)) u_16x16 (.sc_checks(c[1]), .sc_failures(f[1]), .sc_done(d[1]));
  sb_accel_scenario #(.P_LANES(4),  .P_ROWS(4),  .P_CACHE_DEPTH(16),   .P_NB(16)) u_4x4   (.sc_checks(c[2]), .sc_failures(f[2]), .sc_done(d[2]));
  sb_accel_scenario #(.P_LANES(7),  .P_ROWS(3),  .P_CACHE_DEPTH(16),   .P_NB(16)) u_3x7   (.sc_checks(c[3]), .sc_failures(f[3]), .sc_done(d[3]));

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog in time units of the scenarios' 10-unit clock
  initial begin
    #(10 * 400000);
    checks = 0; failures = 1;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
