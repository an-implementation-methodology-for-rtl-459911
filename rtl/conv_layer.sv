// conv_layer: the CNV-level module of a binarized hidden layer.
//
// A sliding_window unit turns the channel-last pixel stream into receptive-field
// words and an mvau (PE array of XNOR/pop-count lanes) multiplies each of them
// with the OUT_CH binary kernels. The output is, for every output pixel in raster
// order, NF = OUT_CH/PE beats of PE signed dot products (beat n carries channels
// n*PE .. n*PE+PE-1). Loading a window (sliding window), computing it (PE array)
// and storing the result (output register) overlap as the load / compute / store
// pipeline of the document. Kernel size 3 and "same" padding follow the YOLO
// layers of the document (416x416 in, 416x416x16 out); PE = OUT_CH is this
// design's choice.
//
// Weights: kernel word (ky, kx, cf) of output channel o = nf*PE + p lives in
// PE p's memory at address nf*SF + (ky*K + kx)*CF + cf, bit l = input channel
// cf*SIMD + l (1 = +1).
//
// Timing: one SIMD word per cycle; an output pixel takes K*K*CF*NF cycles.
module conv_layer #(
  parameter int unsigned DIM    = 416,
  parameter int unsigned IN_CH  = 16,
  parameter int unsigned OUT_CH = 16,
  parameter int unsigned K      = 3,
  parameter int unsigned PAD    = 1,
  parameter int unsigned SIMD   = 64,
  parameter int unsigned PE     = 16,
  parameter int unsigned ACC_W  = bnn_pkg::ACC_W,
  localparam int unsigned CF    = (IN_CH + SIMD - 1) / SIMD,
  localparam int unsigned SF    = K * K * CF,
  localparam int unsigned NF    = OUT_CH / PE
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [IN_CH-1:0]            in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [PE-1:0][ACC_W-1:0]    out_data,
  output logic [bnn_pkg::clogb(NF)-1:0]     out_nf,
  input  logic                        wr_en,
  input  logic [bnn_pkg::clogb(PE)-1:0]     wr_pe,
  input  logic [bnn_pkg::clogb(NF*SF)-1:0]  wr_addr,
  input  logic [SIMD-1:0]             wr_data
);
  logic            sw_valid, sw_ready, sw_last;
  logic [SIMD-1:0] sw_data, sw_mask;

  sliding_window #(.DIM(DIM), .CH(IN_CH), .K(K), .PAD(PAD), .SIMD(SIMD)) u_swu (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(sw_valid), .out_ready(sw_ready),
    .out_data(sw_data), .out_mask(sw_mask), .out_last(sw_last)
  );

  mvau #(.SIMD(SIMD), .PE(PE), .SF(SF), .NF(NF), .ACC_W(ACC_W)) u_mvau (
    .clk, .rst_n,
    .in_valid(sw_valid), .in_ready(sw_ready), .in_data(sw_data), .in_mask(sw_mask),
    .out_valid, .out_ready, .out_data, .out_nf,
    .wr_en, .wr_pe, .wr_addr, .wr_data
  );

  // the window length of the sliding window and the vector length of the PE
  // array agree: every SF-th word is the last of a window
  logic [bnn_pkg::clogb(SF)-1:0] wcnt;
  always_ff @(posedge clk) begin
    if (!rst_n) wcnt <= '0;
    else if (sw_valid && sw_ready) wcnt <= sw_last ? '0 : wcnt + 1'b1;
  end
  assert property (@(posedge clk) disable iff (!rst_n)
    sw_valid && sw_ready |-> sw_last == (int'(wcnt) == int'(SF) - 1));
endmodule
