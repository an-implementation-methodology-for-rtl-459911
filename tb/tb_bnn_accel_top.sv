// tb_bnn_accel_top: end-to-end test of the accelerator at reduced size.
// An 8x8 map with 5 channels, 4 output channels on 2 PEs (two neuron folds),
// 4-lane words, and a 20-input, 4-neuron FC layer. Runs a CNV layer without
// pooling (cycle count checked), with 2x2 pooling, an FC layer, with 3x3
// pooling and an FC layer again, the later runs with random input gaps and
// output stalls; see bnn_top_tb_body.svh for what is compared and counted.
module tb_bnn_accel_top;
  localparam int unsigned DIM = 8, IN_CH = 5, OUT_CH = 4, K = 3, PAD = 1, SIMD = 4, PE = 2;
  localparam int unsigned FC_IN = 20, FC_OUT = 4;
  localparam int unsigned N_FC_VEC = 6;
  localparam bit STALLS = 1, RUNS_SMALL = 1;
  localparam int unsigned POOL_K = 2;
  localparam bit STANDALONE = 1;
  localparam bit FP16_OUT = 1;

  `include "bnn_top_tb_body.svh"

  bnn_accel_top #(.DIM(DIM), .IN_CH(IN_CH), .OUT_CH(OUT_CH), .K(K), .PAD(PAD), .SIMD(SIMD),
                  .PE(PE), .FC_IN(FC_IN), .FC_OUT(FC_OUT)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
