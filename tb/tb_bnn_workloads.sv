// tb_bnn_workloads: the accelerator at hidden-layer shapes of the three
// networks it was evaluated with, each built as its own instance and run end
// to end (one CNV run with pooling and one FC run, random stalls, every output
// beat checked against a reference model; see bnn_layer_env):
//   - pruned YOLOv3-tiny, third convolution: 104x104 map (416 after two 2x2
//     poolings), 19 -> 25 channels, 3x3 kernels, 2x2 pooling; 5 PEs;
//   - BinaryConnect / CIFAR-10, fourth convolution: 16x16 map (32 after one
//     pooling), 256 -> 256 channels, 2x2 pooling; first FC layer 8192 -> 1024
//     (512 channels of 4x4 after the last pooling);
//   - binarized AlexNet, last convolution: 13x13 map, 384 -> 256 channels,
//     3x3 pooling of stride 2 (13x13 -> 6x6);
//   - the larger-board configuration of the YOLO network: results returned as
//     packed bits (FP16_OUT = 0, raw FC scores as 16-bit integers) and deeper
//     stream buffers (16 words), at the fourth convolution: 52x52 map (416
//     after three poolings), 25 -> 51 channels, 2x2 pooling; 17 PEs.
// Channel counts, kernels and pooling windows are those of the evaluated
// networks; the map sizes and the FC input length follow from their input
// sizes and pooling steps. The FC parts of the YOLO and AlexNet instances are
// kept small. The four run in parallel; the result line sums their checks.
module tb_bnn_workloads;
  logic fin_yolo, fin_cifar, fin_alex, fin_zcu;
  int   c_yolo, c_cifar, c_alex, c_zcu, f_yolo, f_cifar, f_alex, f_zcu;
  int   checks = 0, failures = 0;

  bnn_layer_env #(.DIM(104), .IN_CH(19), .OUT_CH(25), .SIMD(64), .PE(5),
                  .FC_IN(64), .FC_OUT(10), .POOL_K(2))
    u_yolo (.fin(fin_yolo), .n_checks(c_yolo), .n_failures(f_yolo));

  bnn_layer_env #(.DIM(16), .IN_CH(256), .OUT_CH(256), .SIMD(64), .PE(16),
                  .FC_IN(8192), .FC_OUT(1024), .POOL_K(2))
    u_cifar (.fin(fin_cifar), .n_checks(c_cifar), .n_failures(f_cifar));

  bnn_layer_env #(.DIM(13), .IN_CH(384), .OUT_CH(256), .SIMD(64), .PE(16),
                  .FC_IN(128), .FC_OUT(32), .POOL_K(3))
    u_alex (.fin(fin_alex), .n_checks(c_alex), .n_failures(f_alex));

  bnn_layer_env #(.DIM(52), .IN_CH(25), .OUT_CH(51), .SIMD(64), .PE(17),
                  .FC_IN(100), .FC_OUT(34), .POOL_K(2),
                  .IN_DEPTH(16), .OUT_DEPTH(16), .FP16_OUT(1'b0))
    u_zcu (.fin(fin_zcu), .n_checks(c_zcu), .n_failures(f_zcu));

  initial begin
    wait (fin_yolo && fin_cifar && fin_alex && fin_zcu);
    checks   = c_yolo + c_cifar + c_alex + c_zcu;
    failures = f_yolo + f_cifar + f_alex + f_zcu;
    $display("YOLO layer: %0d checks, %0d failures", c_yolo, f_yolo);
    $display("CIFAR-10 layers: %0d checks, %0d failures", c_cifar, f_cifar);
    $display("AlexNet layer: %0d checks, %0d failures", c_alex, f_alex);
    $display("YOLO layer, packed-bit build: %0d checks, %0d failures", c_zcu, f_zcu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog, in nanoseconds of the 10 ns clocks of the environments
  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
