// bnn_accel_top: programmable-logic part of a binarized neural-network
// accelerator for a small FPGA board.
//
// The processing system (ARM cores) runs the full-precision input and output
// layers; the binarized hidden layers run here, one layer per run. Data come in
// and go out as streams that a DMA engine moves to and from DRAM:
//
//   s_axis -> input buffer -+-> CNV: sliding window -> PE array -> [max pool]
//                           |        -> shift-based BN -> sign ----------+
//                           +-> FC : PE array -> threshold --------------+
//                                                                         |
//   m_axis <- output buffer <- fp16 formatting <- (selected core) <-------+
//
// The layer_ctrl block holds the configuration of a run (cfg_mode selects the
// CNV or FC core, cfg_pool_en switches max pooling in or out, cfg_pool_k3
// selects a 3x3 instead of a 2x2 pooling window), opens the input stream while
// the run is busy, marks the last output beat with m_axis_tlast and pulses done.
// cfg_fc_raw, held for the run beside it, makes an FC run return each neuron's
// signed dot product instead of its thresholded bit: the scores of a final
// classifier layer, for a softmax in software.
// Weights, batch-norm parameters and FC thresholds are written beforehand
// through the prm_* port (prm_sel: 0 CNV weights, 1 SBN parameters, 2 FC
// weights, 3 FC thresholds; see conv_layer, sbn_unit and fc_layer for the
// address layouts).
//
// Stream formats: in CNV mode each s_axis beat is one input pixel, IN_CH
// channel bits in the low bits (1 = +1); in FC mode each beat is SIMD bits of
// the input vector (the stream is max(IN_CH, SIMD) bits wide). Each m_axis
// beat carries PE results as fp16 +-1.0 (FP16_OUT = 1) or as packed bits
// (FP16_OUT = 0); raw FC scores come as fp16 numbers (FP16_OUT = 1) or 16-bit
// saturated integers (FP16_OUT = 0), one per 16-bit lane. A CNV output pixel
// takes OUT_CH/PE beats, an FC output vector FC_OUT/PE beats.
//
// The overall structure (DMA streams, input and output buffers, CNV, pooling,
// batch-norm, activation and FC cores, fp16 return) follows the document; the
// defaults are its YOLO layer (416x416, 16 channels, 3x3 kernels) and its
// 64-bit XNOR lanes. The FC size is the 1024-neuron hidden FC layer of its
// CIFAR-10 network. Register interface, routing and handshakes are this
// design's own.
module bnn_accel_top #(
  parameter int unsigned DIM       = 416,
  parameter int unsigned IN_CH     = 16,
  parameter int unsigned OUT_CH    = 16,
  parameter int unsigned K         = 3,
  parameter int unsigned PAD       = 1,
  parameter int unsigned SIMD      = 64,
  parameter int unsigned PE        = 16,
  parameter int unsigned FC_IN     = 1024,
  parameter int unsigned FC_OUT    = 1024,
  parameter int unsigned IN_DEPTH  = 2,
  parameter int unsigned OUT_DEPTH = 2,
  parameter bit          FP16_OUT  = 1'b1,
  // input stream width: one pixel or one SIMD word, whichever is wider
  localparam int unsigned IN_W     = (IN_CH > SIMD) ? IN_CH : SIMD
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // run control
  input  logic                 start,
  input  logic                 cfg_mode,       // 0 CNV, 1 FC
  input  logic                 cfg_pool_en,
  input  logic                 cfg_pool_k3,
  input  logic                 cfg_fc_raw,     // FC: raw scores instead of bits
  input  logic [31:0]          cfg_out_beats,
  output logic                 busy,
  output logic                 done,
  output logic [31:0]          cycles,
  // parameter write port
  input  logic                 prm_en,
  input  logic [1:0]           prm_sel,
  input  logic [7:0]           prm_pe,
  input  logic [23:0]          prm_addr,
  input  logic [127:0]         prm_data,
  // input stream from the DMA
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic [IN_W-1:0]      s_axis_tdata,
  // output stream to the DMA
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic [PE*16-1:0]     m_axis_tdata,
  output logic                 m_axis_tlast
);
  import bnn_pkg::*;

  localparam int unsigned CF    = (IN_CH + SIMD - 1) / SIMD;
  localparam int unsigned C_SF  = K * K * CF;
  localparam int unsigned C_NF  = OUT_CH / PE;
  localparam int unsigned ODIM  = DIM + 2 * PAD - K + 1;
  localparam int unsigned F_SF  = (FC_IN + SIMD - 1) / SIMD;
  localparam int unsigned F_NF  = FC_OUT / PE;

  // ---------------- controller ----------------
  layer_mode_e mode;
  logic        pool_en, pool_k3, out_last, out_fire;

  layer_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .cfg_mode(layer_mode_e'(cfg_mode)), .cfg_pool_en, .cfg_pool_k3, .cfg_out_beats,
    .out_fire, .busy, .done, .mode, .pool_en, .pool_k3, .out_last, .cycles
  );

  // ---------------- parameter writes ----------------
  logic cw_en, sbn_en, fw_en, thr_en;
  always_comb begin
    cw_en  = prm_en && (param_sel_e'(prm_sel) == PSEL_CNV_W);
    sbn_en = prm_en && (param_sel_e'(prm_sel) == PSEL_SBN);
    fw_en  = prm_en && (param_sel_e'(prm_sel) == PSEL_FC_W);
    thr_en = prm_en && (param_sel_e'(prm_sel) == PSEL_FC_THR);
  end

  // ---------------- input buffer ----------------
  logic            ib_valid, ib_ready;
  logic [IN_W-1:0] ib_data;
  logic            ib_s_ready;

  assign s_axis_tready = busy && ib_s_ready;

  axis_fifo #(.W(IN_W), .DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst_n,
    .s_valid(s_axis_tvalid && busy), .s_ready(ib_s_ready), .s_data(s_axis_tdata),
    .m_valid(ib_valid), .m_ready(ib_ready), .m_data(ib_data), .level()
  );

  // ---------------- CNV core ----------------
  logic                      cv_in_ready, cv_valid, cv_ready;
  logic [PE-1:0][ACC_W-1:0]  cv_data;

  conv_layer #(.DIM(DIM), .IN_CH(IN_CH), .OUT_CH(OUT_CH), .K(K), .PAD(PAD),
               .SIMD(SIMD), .PE(PE)) u_conv (
    .clk, .rst_n,
    .in_valid(ib_valid && mode == MODE_CNV), .in_ready(cv_in_ready),
    .in_data(ib_data[IN_CH-1:0]),
    .out_valid(cv_valid), .out_ready(cv_ready), .out_data(cv_data), .out_nf(),
    .wr_en(cw_en), .wr_pe(clogb(PE)'(prm_pe)), .wr_addr(clogb(C_NF*C_SF)'(prm_addr)),
    .wr_data(prm_data[SIMD-1:0])
  );

  // pooling, switched in or bypassed
  logic                      mp_in_ready, mp_valid, mp_ready;
  logic [PE-1:0][ACC_W-1:0]  mp_data;

  maxpool #(.DIM(ODIM), .LANES(PE), .NF(C_NF)) u_pool (
    .clk, .rst_n, .k3(pool_k3),
    .in_valid(cv_valid && pool_en), .in_ready(mp_in_ready), .in_data(cv_data),
    .out_valid(mp_valid), .out_ready(mp_ready), .out_data(mp_data)
  );

  logic                      bn_in_valid, bn_in_ready;
  logic [PE-1:0][ACC_W-1:0]  bn_in_data;
  assign bn_in_valid = pool_en ? mp_valid : cv_valid;
  assign bn_in_data  = pool_en ? mp_data  : cv_data;
  assign cv_ready    = pool_en ? mp_in_ready : bn_in_ready;
  assign mp_ready    = pool_en && bn_in_ready;

  logic                         bn_valid, bn_ready;
  logic [PE-1:0][SBN_W-1:0]     bn_data;

  sbn_unit #(.LANES(PE), .NF(C_NF)) u_sbn (
    .clk, .rst_n,
    .in_valid(bn_in_valid), .in_ready(bn_in_ready), .in_data(bn_in_data),
    .out_valid(bn_valid), .out_ready(bn_ready), .out_data(bn_data),
    .wr_en(sbn_en), .wr_addr(clogb(PE*C_NF)'(prm_addr)),
    .wr_data(sbn_param_t'(prm_data[$bits(sbn_param_t)-1:0]))
  );

  logic          ac_valid, ac_ready;
  logic [PE-1:0] ac_bits;

  sign_act #(.LANES(PE)) u_act (
    .clk, .rst_n,
    .in_valid(bn_valid), .in_ready(bn_ready), .in_data(bn_data),
    .out_valid(ac_valid), .out_ready(ac_ready), .out_bits(ac_bits)
  );

  // ---------------- FC core ----------------
  logic          fc_in_ready, fc_valid, fc_ready;
  logic [PE-1:0] fc_bits;
  logic [PE-1:0][ACC_W-1:0] fc_dot;

  fc_layer #(.IN_N(FC_IN), .OUT_N(FC_OUT), .SIMD(SIMD), .PE(PE)) u_fc (
    .clk, .rst_n,
    .in_valid(ib_valid && mode == MODE_FC), .in_ready(fc_in_ready), .in_data(ib_data[SIMD-1:0]),
    .out_valid(fc_valid), .out_ready(fc_ready), .out_bits(fc_bits), .out_dot(fc_dot),
    .wr_en(fw_en), .wr_pe(clogb(PE)'(prm_pe)), .wr_addr(clogb(F_NF*F_SF)'(prm_addr)),
    .wr_data(prm_data[SIMD-1:0]),
    .thr_wr_en(thr_en), .thr_wr_addr(clogb(FC_OUT)'(prm_addr)),
    .thr_wr_data(prm_data[ACC_W-1:0])
  );

  assign ib_ready = (mode == MODE_CNV) ? cv_in_ready : fc_in_ready;

  // ---------------- result formatting and output buffer ----------------
  logic          res_valid, res_ready;
  logic [PE-1:0] res_bits;
  logic [PE*16-1:0] res_word;

  assign res_valid = (mode == MODE_CNV) ? ac_valid : fc_valid;
  assign res_bits  = (mode == MODE_CNV) ? ac_bits  : fc_bits;
  assign ac_ready  = (mode == MODE_CNV) && res_ready;
  assign fc_ready  = (mode == MODE_FC)  && res_ready;

  logic [PE*16-1:0] bin_word, score_word;

  bin_to_fp16 #(.LANES(PE), .FP16_OUT(FP16_OUT)) u_fmt (
    .in_bits(res_bits), .out_data(bin_word)
  );

  // raw scores of a final FC layer, selected by cfg_fc_raw for the run
  score_fmt #(.LANES(PE), .ACC_W(ACC_W), .FP16_OUT(FP16_OUT)) u_score (
    .in_data(fc_dot), .out_data(score_word)
  );

  logic fc_raw;
  always_ff @(posedge clk) begin
    if (!rst_n)             fc_raw <= 1'b0;
    else if (start && !busy) fc_raw <= cfg_fc_raw;
  end

  assign res_word = (mode == MODE_FC && fc_raw) ? score_word : bin_word;

  axis_fifo #(.W(PE*16), .DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .s_valid(res_valid), .s_ready(res_ready), .s_data(res_word),
    .m_valid(m_axis_tvalid), .m_ready(m_axis_tready), .m_data(m_axis_tdata), .level()
  );

  assign out_fire     = m_axis_tvalid && m_axis_tready;
  assign m_axis_tlast = m_axis_tvalid && out_last;
endmodule
