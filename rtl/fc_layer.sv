// fc_layer: FC-level matrix-vector-threshold unit.
//
// A binary input vector of IN_N bits arrives as SF = ceil(IN_N/SIMD) words; an
// mvau (PE rows of XNOR/pop-count lanes, SIMD lanes each) forms the +-1 dot
// product a of every one of the OUT_N neurons, and the activated output is the
// bit (a > tau) with a per-neuron threshold tau derived off-line from the
// batch-norm parameters. This is the matrix-vector-threshold structure the
// document adopts for its FC layers; the memory layouts and handshakes are this
// design's.
//
// Weights: neuron o = nf*PE + p, word sf sits in PE p's memory at nf*SF + sf,
// bit l = input element sf*SIMD + l. Thresholds: address o, ACC_W signed.
// Output: NF = OUT_N/PE beats of PE bits per vector, beat n = neurons n*PE...
// out_dot carries the same neurons' signed dot products with each beat, for a
// final classifier layer whose scores go to a softmax instead of a threshold.
// Timing: SF*NF cycles per vector plus three cycles of latency.
module fc_layer #(
  parameter int unsigned IN_N  = 1024,
  parameter int unsigned OUT_N = 1024,
  parameter int unsigned SIMD  = 64,
  parameter int unsigned PE    = 16,
  parameter int unsigned ACC_W = bnn_pkg::ACC_W,
  localparam int unsigned SF   = (IN_N + SIMD - 1) / SIMD,
  localparam int unsigned NF   = OUT_N / PE
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [SIMD-1:0]              in_data,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [PE-1:0]                out_bits,
  output logic [PE-1:0][ACC_W-1:0]     out_dot,    // the same neurons' dot products
  input  logic                         wr_en,      // weight write
  input  logic [bnn_pkg::clogb(PE)-1:0]      wr_pe,
  input  logic [bnn_pkg::clogb(NF*SF)-1:0]   wr_addr,
  input  logic [SIMD-1:0]              wr_data,
  input  logic                         thr_wr_en,  // threshold write
  input  logic [bnn_pkg::clogb(OUT_N)-1:0]   thr_wr_addr,
  input  logic [ACC_W-1:0]             thr_wr_data
);
  // lane mask of the input words: the last word may be partial
  logic [bnn_pkg::clogb(SF)-1:0] sf_q;
  logic [SIMD-1:0]         in_mask;
  always_comb
    for (int unsigned l = 0; l < SIMD; l++)
      in_mask[l] = (int'(sf_q) * int'(SIMD) + int'(l) < int'(IN_N));
  always_ff @(posedge clk) begin
    if (!rst_n) sf_q <= '0;
    else if (in_valid && in_ready) sf_q <= (int'(sf_q) == int'(SF) - 1) ? '0 : sf_q + 1'b1;
  end

  logic                        mv_valid, mv_ready;
  logic [PE-1:0][ACC_W-1:0]    mv_data;
  logic [bnn_pkg::clogb(NF)-1:0]     mv_nf;

  mvau #(.SIMD(SIMD), .PE(PE), .SF(SF), .NF(NF), .ACC_W(ACC_W)) u_mvau (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_mask,
    .out_valid(mv_valid), .out_ready(mv_ready), .out_data(mv_data), .out_nf(mv_nf),
    .wr_en, .wr_pe, .wr_addr, .wr_data
  );

  logic [ACC_W-1:0] thr [OUT_N];
  always_ff @(posedge clk)
    if (thr_wr_en) thr[thr_wr_addr] <= thr_wr_data;

  assign mv_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_dot   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (mv_valid && mv_ready) begin
        out_valid <= 1'b1;
        out_dot   <= mv_data;
        for (int unsigned p = 0; p < PE; p++)
          out_bits[p] <= $signed(mv_data[p]) > $signed(thr[int'(mv_nf) * PE + p]);
      end
    end
  end
endmodule
