// tb_bnn_full: end-to-end test of the accelerator at its default size.
// The top is instantiated without parameter overrides: a 416x416 map with 16
// binary channels, 16 kernels of 3x3 with padding 1, 64-lane words, 16 PEs,
// and a 1024x1024 FC layer. One CNV layer run with 2x2 pooling (416x416 ->
// 208x208x16, the first binarized YOLO layer's shape) and one FC run of two
// vectors; every output beat is compared with the reference model of
// bnn_top_tb_body.svh. Takes about 1.6 million clock cycles.
module tb_bnn_full;
  // must match the defaults of bnn_accel_top
  localparam int unsigned DIM = 416, IN_CH = 16, OUT_CH = 16, K = 3, PAD = 1, SIMD = 64, PE = 16;
  localparam int unsigned FC_IN = 1024, FC_OUT = 1024;
  localparam int unsigned N_FC_VEC = 2;
  localparam bit STALLS = 0, RUNS_SMALL = 0;
  localparam int unsigned POOL_K = 2;
  localparam bit STANDALONE = 1;
  localparam bit FP16_OUT = 1;

  `include "bnn_top_tb_body.svh"

  bnn_accel_top dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
