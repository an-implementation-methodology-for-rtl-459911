// tb_layer_ctrl: self-checking test of the run controller.
// Runs several layers with different configurations and output counts, taking
// output beats at random times. Checks that the configuration is latched at
// start and held while busy even when the inputs change, that out_last marks
// exactly the last beat, that done pulses once one cycle after it, that a
// start while busy and a start with zero beats are ignored, and the cycle count.
module tb_layer_ctrl;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, cfg_pool_en, cfg_pool_k3, out_fire, busy, done, pool_en, pool_k3, out_last;
  layer_mode_e cfg_mode, mode;
  logic [31:0] cfg_out_beats, cycles;

  layer_ctrl dut (.*);

  int dones = 0;
  always @(posedge clk) if (rst_n && done) dones++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int beats, layer_mode_e m, bit pe, bit k3);
    int t_start, lasts, d0;
    cfg_mode = m; cfg_pool_en = pe; cfg_pool_k3 = k3; cfg_out_beats = 32'(beats);
    start = 1; @(negedge clk); start = 0;
    t_start = 0; lasts = 0; d0 = dones;
    check(busy, "busy after start");
    // scramble the configuration inputs: the run must not see it
    cfg_mode = layer_mode_e'(~m); cfg_pool_en = ~pe; cfg_pool_k3 = ~k3;
    start = 1;  // ignored while busy
    for (int b = 0; b < beats; b++) begin
      while ($urandom % 2 == 0) begin @(negedge clk); t_start++; end
      check(mode == m && pool_en == pe && pool_k3 == k3, "configuration held");
      check(out_last == (b == beats - 1), "out_last position");
      out_fire = 1; @(negedge clk); t_start++; out_fire = 0;
    end
    start = 0;
    check(!busy, "idle after last beat");
    check(done && dones == d0, "done right after the last beat");
    check(cycles == 32'(t_start), "cycle count");
    @(negedge clk);
    check(!done && dones == d0 + 1, "done is a single pulse");
  endtask

  initial begin
    start = 0; out_fire = 0; cfg_mode = MODE_CNV; cfg_pool_en = 0; cfg_pool_k3 = 0; cfg_out_beats = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // zero-length run is refused
    start = 1; @(negedge clk); start = 0;
    check(!busy, "zero-beat start ignored");
    run(1, MODE_FC, 0, 0);
    run(7, MODE_CNV, 1, 0);
    run(12, MODE_CNV, 1, 1);
    run(5, MODE_FC, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
