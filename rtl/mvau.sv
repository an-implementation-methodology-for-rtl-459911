// mvau: matrix-vector unit built from PE XNOR/pop-count lanes.
//
// Computes y = W * x for a binary matrix W (OUT_N rows) and a binary vector x
// that arrives as SF words of SIMD bits. PE rows are worked on at once (one
// xnor_popcount per PE); the OUT_N rows are covered in NF = OUT_N/PE passes
// ("neuron folds"). The vector is kept in an input buffer during the first pass
// and replayed from it for the remaining passes, so the producer sends it once.
// Each result is the signed +-1 dot product 2*agree - n, where n is the number
// of valid lanes (set bits of the mask words).
//
// Weight memory: one memory per PE, NF*SF words of SIMD bits, word address
// nf*SF + sf; written through the wr_* port, read synchronously.
//
// Timing: one SIMD word per cycle enters the pipeline (issue stage reads the
// weights, compute stage accumulates), so a vector takes SF*NF cycles and a
// result group appears two cycles after its last word was issued. All stages
// stall together while the output register holds a result nobody has taken.
// The PE/SIMD organisation and the XNOR/pop-count lanes follow the document;
// the buffering, the fold order and the handshakes are this design's choices.
module mvau #(
  parameter int unsigned SIMD  = 64,
  parameter int unsigned PE    = 16,
  parameter int unsigned SF    = 9,
  parameter int unsigned NF    = 1,
  parameter int unsigned ACC_W = bnn_pkg::ACC_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // input vector words
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [SIMD-1:0]              in_data,
  input  logic [SIMD-1:0]              in_mask,
  // one group of PE results per beat
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [PE-1:0][ACC_W-1:0]     out_data,   // signed dot products
  output logic [bnn_pkg::clogb(NF)-1:0]      out_nf,     // which neuron fold
  // weight write port
  input  logic                         wr_en,
  input  logic [bnn_pkg::clogb(PE)-1:0]      wr_pe,
  input  logic [bnn_pkg::clogb(NF*SF)-1:0]   wr_addr,
  input  logic [SIMD-1:0]              wr_data
);
  localparam int unsigned WDEPTH = NF * SF;
  localparam int unsigned SF_W   = bnn_pkg::clogb(SF);
  localparam int unsigned NF_W   = bnn_pkg::clogb(NF);
  localparam int unsigned AD_W   = bnn_pkg::clogb(WDEPTH);

  logic adv;
  assign adv = !out_valid || out_ready;

  // ---------------- issue stage ----------------
  logic [SF_W-1:0] sf_q;
  logic [NF_W-1:0] nf_q;
  logic [2*SIMD-1:0] ibuf [SF];        // {mask, data} of each vector word
  logic            issue;
  logic [SIMD-1:0] src_data, src_mask;
  logic [AD_W-1:0] rd_addr;

  assign in_ready = adv && (nf_q == '0);
  assign issue    = adv && ((nf_q == '0) ? in_valid : 1'b1);
  assign rd_addr  = AD_W'(nf_q) * AD_W'(SF) + AD_W'(sf_q);

  always_comb begin
    if (nf_q == '0) begin
      src_data = in_data;
      src_mask = in_mask;
    end else begin
      {src_mask, src_data} = ibuf[sf_q];
    end
  end

  logic            s1_valid, s1_last;
  logic [SIMD-1:0] s1_x, s1_m;
  logic [NF_W-1:0] s1_nf;
  logic [PE-1:0][SIMD-1:0] s1_w;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sf_q     <= '0;
      nf_q     <= '0;
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_nf    <= '0;
      s1_x     <= '0;
      s1_m     <= '0;
    end else if (adv) begin
      s1_valid <= issue;
      if (issue) begin
        s1_x    <= src_data;
        s1_m    <= src_mask;
        s1_nf   <= nf_q;
        s1_last <= (sf_q == SF_W'(SF - 1));
        if (nf_q == '0) ibuf[sf_q] <= {in_mask, in_data};
        if (sf_q == SF_W'(SF - 1)) begin
          sf_q <= '0;
          nf_q <= (nf_q == NF_W'(NF - 1)) ? '0 : nf_q + 1'b1;
        end else begin
          sf_q <= sf_q + 1'b1;
        end
      end
    end
  end

  // one weight memory per PE, synchronous read in the issue stage
  for (genvar p = 0; p < PE; p++) begin : g_wmem
    logic [SIMD-1:0] wmem [WDEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_pe == (bnn_pkg::clogb(PE))'(p)) wmem[wr_addr] <= wr_data;
      if (adv && issue) s1_w[p] <= wmem[rd_addr];
    end
  end

  // ---------------- compute stage ----------------
  logic [PE-1:0][ACC_W-1:0] cnt;      // this word's agreeing lanes per PE
  logic [PE-1:0][ACC_W-1:0] acc_q;    // running count per PE
  logic [ACC_W-1:0]         nvalid;   // valid lanes of this word
  logic [ACC_W-1:0]         nacc_q;   // running valid-lane count

  for (genvar p = 0; p < PE; p++) begin : g_pe
    xnor_popcount #(.SIMD(SIMD), .CNT_W(ACC_W)) u_pc (
      .w(s1_w[p]), .x(s1_x), .mask(s1_m), .count(cnt[p])
    );
  end

  always_comb begin
    nvalid = '0;
    for (int unsigned i = 0; i < SIMD; i++) nvalid = nvalid + ACC_W'(s1_m[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q     <= '0;
      nacc_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_nf    <= '0;
    end else if (adv) begin
      out_valid <= 1'b0;
      if (s1_valid) begin
        if (s1_last) begin
          for (int unsigned p = 0; p < PE; p++)
            out_data[p] <= ((acc_q[p] + cnt[p]) << 1) - (nacc_q + nvalid);
          out_nf    <= s1_nf;
          out_valid <= 1'b1;
          acc_q     <= '0;
          nacc_q    <= '0;
        end else begin
          for (int unsigned p = 0; p < PE; p++) acc_q[p] <= acc_q[p] + cnt[p];
          nacc_q <= nacc_q + nvalid;
        end
      end
    end
  end

  // a result stays on the output until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
