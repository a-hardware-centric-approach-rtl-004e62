// tb_sb_threshold_regs: self-checking test of the per-layer threshold table.
//
// Loads a random threshold into every layer, then walks the layer pointer
// with layer_next and checks that th follows the table one cycle after each
// step, that the pointer saturates at the last layer, that layer_rst returns
// to layer 0 and that a rewrite of the current layer shows on the next cycle.
module tb_sb_threshold_regs;
  localparam int NUM_LAYERS = 64, SUM_W = 22, LAYER_W = 6;

  logic clk = 0, rst_n = 0, cfg_we = 0, layer_rst = 0, layer_next = 0;
  logic [LAYER_W-1:0] cfg_layer = '0, cur_layer;
  logic [SUM_W-1:0]   cfg_th = '0, th;
  logic [SUM_W-1:0]   model [NUM_LAYERS];
  int checks = 0, failures = 0;

  sb_threshold_regs #(.NUM_LAYERS(NUM_LAYERS), .SUM_W(SUM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input int layer);
    checks++;
    if (int'(cur_layer) != layer || th != model[layer]) begin
      failures++;
      $display("layer %0d th %0d, expected layer %0d th %0d", cur_layer, th, layer, model[layer]);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // reset value is zero
    checks++;
    if (th != '0) begin failures++; $display("threshold not zero after reset"); end
    for (int i = 0; i < NUM_LAYERS; i++) begin
      model[i] = SUM_W'($urandom);
      cfg_we = 1; cfg_layer = LAYER_W'(i); cfg_th = model[i];
      @(posedge clk); #1;
    end
    cfg_we = 0;
    expect_state(0);
    for (int i = 1; i < NUM_LAYERS + 3; i++) begin
      layer_next = 1; @(posedge clk); #1; layer_next = 0;
      expect_state(i < NUM_LAYERS ? i : NUM_LAYERS - 1);
      @(posedge clk); #1;
    end
    layer_rst = 1; @(posedge clk); #1; layer_rst = 0;
    expect_state(0);
    layer_next = 1; @(posedge clk); #1; layer_next = 0;
    expect_state(1);
    model[1] = 22'h2a5a5;
    cfg_we = 1; cfg_layer = 1; cfg_th = model[1]; @(posedge clk); #1; cfg_we = 0;
    expect_state(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
