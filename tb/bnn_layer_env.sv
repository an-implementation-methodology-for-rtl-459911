// bnn_layer_env: one self-contained end-to-end run of bnn_accel_top at a given
// layer shape, for testbenches that run several shapes side by side.
//
// It has its own clock and reset, builds the top with the shape given by its
// parameters and uses the shared body (bnn_top_tb_body.svh): random weights,
// batch-norm parameters and inputs, one CNV run with POOL_K x POOL_K pooling and
// one FC run, every output beat compared with the body's reference model, with
// random input gaps and output stalls. When both runs are over, fin goes high
// and n_checks / n_failures hold the totals; the instantiating testbench prints
// the result line.
module bnn_layer_env #(
  parameter int unsigned DIM      = 8,
  parameter int unsigned IN_CH    = 5,
  parameter int unsigned OUT_CH   = 4,
  parameter int unsigned K        = 3,
  parameter int unsigned PAD      = 1,
  parameter int unsigned SIMD     = 4,
  parameter int unsigned PE       = 2,
  parameter int unsigned FC_IN    = 20,
  parameter int unsigned FC_OUT   = 4,
  parameter int unsigned POOL_K   = 2,
  parameter int unsigned N_FC_VEC = 1,
  parameter int unsigned IN_DEPTH = 2,
  parameter int unsigned OUT_DEPTH = 2,
  parameter bit          FP16_OUT = 1'b1
) (
  output logic fin,
  output int   n_checks,
  output int   n_failures
);
  localparam bit STALLS = 1, RUNS_SMALL = 0, STANDALONE = 0;

  `include "bnn_top_tb_body.svh"

  bnn_accel_top #(.DIM(DIM), .IN_CH(IN_CH), .OUT_CH(OUT_CH), .K(K), .PAD(PAD), .SIMD(SIMD),
                  .PE(PE), .FC_IN(FC_IN), .FC_OUT(FC_OUT), .IN_DEPTH(IN_DEPTH),
                  .OUT_DEPTH(OUT_DEPTH), .FP16_OUT(FP16_OUT)) dut (.*);

  assign fin        = body_done;
  assign n_checks   = checks;
  assign n_failures = failures;
endmodule
