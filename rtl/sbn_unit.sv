// sbn_unit: shift-based batch normalisation of integer convolution results.
//
// For output channel j with stored parameters (mu, phi, neg, beta):
//     y = sal(x - mu, phi) * (neg ? -1 : +1) + beta
// where sal shifts left by phi bits, or right by -phi bits when phi is negative.
// phi = round(log2|gamma/sigma|) and the sign of gamma/sigma are worked out
// off-line, so the per-element multiply of ordinary batch norm becomes a shift.
// y is a signed fixed-point number with SBN_FRAC fractional bits (bnn_pkg),
// which lets right shifts and a fractional beta keep their precision.
// This formula is the document's; the fixed-point format, the parameter memory
// layout and the stream handshake are this design's.
//
// Stream: beats of LANES values; the channel of lane l in beat n (counted modulo
// NF) is n*LANES + l. Parameters are written through the wr_* port, address =
// channel. Timing: one beat per cycle, result one cycle later.
module sbn_unit #(
  parameter int unsigned LANES = 16,
  parameter int unsigned NF    = 1,
  parameter int unsigned ACC_W = bnn_pkg::ACC_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  output logic                                  in_ready,
  input  logic [LANES-1:0][ACC_W-1:0]           in_data,
  output logic                                  out_valid,
  input  logic                                  out_ready,
  output logic [LANES-1:0][bnn_pkg::SBN_W-1:0]  out_data,
  input  logic                                  wr_en,
  input  logic [bnn_pkg::clogb(LANES*NF)-1:0]         wr_addr,
  input  bnn_pkg::sbn_param_t                   wr_data
);
  import bnn_pkg::*;

  sbn_param_t prm [LANES * NF];
  logic [bnn_pkg::clogb(NF)-1:0] nf_q;

  always_ff @(posedge clk)
    if (wr_en) prm[wr_addr] <= wr_data;

  assign in_ready = !out_valid || out_ready;

  logic [LANES-1:0][SBN_W-1:0] y;
  always_comb begin
    for (int unsigned l = 0; l < LANES; l++) begin
      sbn_param_t        p;
      logic signed [SBN_W-1:0] cen, sh;
      p   = prm[int'(nf_q) * LANES + l];
      cen = (SBN_W'($signed(in_data[l])) - SBN_W'(p.mu)) <<< SBN_FRAC;
      if (p.phi >= 0) sh = cen <<< p.phi;
      else            sh = cen >>> (-p.phi);
      y[l] = (p.neg ? -sh : sh) + p.beta;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      nf_q      <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_data  <= y;
        nf_q      <= (int'(nf_q) == int'(NF) - 1) ? '0 : nf_q + 1'b1;
      end
    end
  end
endmodule
