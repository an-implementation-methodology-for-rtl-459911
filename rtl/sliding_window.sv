// sliding_window: input buffer of the CNV level ("column expansion").
//
// Pixels of a DIM x DIM feature map arrive in raster order, one pixel per beat,
// with all CH binary channels of the pixel in one word (channel-last, the
// "interleaved" order of the document, so no whole feature map has to be stored).
// The unit keeps K+1 image rows in a line buffer and emits, for every output
// position, the K*K*CH bits of its receptive field as K*K*CF words of SIMD bits
// (CF = ceil(CH/SIMD)), in the order ky, kx, channel word. This is one column of
// the k^2c x N matrix of the column-expansion figure, streamed.
//
// Stride is 1; PAD rows/columns of padding surround the map. Padding positions
// and the unused top lanes of a partial channel word are marked invalid in
// out_mask, so the PE array leaves them out of the dot product (the same result
// as zero padding of a +-1 network). Stride 1, the padding treatment, K+1 line
// buffer rows and the handshakes are this design's choices.
//
// Timing: one output word per cycle while the rows a window needs are present.
// With K+1 rows buffered, the next input row is taken while the current output
// row is being produced. out_last marks the last word of each window.
module sliding_window #(
  parameter int unsigned DIM  = 416,
  parameter int unsigned CH   = 16,
  parameter int unsigned K    = 3,
  parameter int unsigned PAD  = 1,
  parameter int unsigned SIMD = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [CH-1:0]   in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [SIMD-1:0] out_data,
  output logic [SIMD-1:0] out_mask,
  output logic            out_last
);
  localparam int unsigned CF   = (CH + SIMD - 1) / SIMD;
  localparam int unsigned ODIM = DIM + 2 * PAD - K + 1;
  localparam int unsigned NROW = K + 1;
  localparam int unsigned CW   = $clog2(DIM + 2 * PAD + 2);

  logic [CF*SIMD-1:0] lb [NROW * DIM];

  logic [CW-1:0] wr_r, wr_c;                  // next input pixel
  logic [CW-1:0] o_r, o_c;                    // current output position
  logic [bnn_pkg::clogb(K)-1:0]  ky, kx;
  logic [bnn_pkg::clogb(CF)-1:0] cf;

  int signed iy, ix, need_rows, max_row;
  logic      pad_pos;
  logic [CF*SIMD-1:0] pix;

  always_comb begin
    // rows an output row needs and rows the buffer can take
    need_rows = int'(o_r) - int'(PAD) + int'(K);
    if (need_rows > int'(DIM)) need_rows = int'(DIM);
    max_row   = int'(o_r) - int'(PAD) + int'(NROW);
    in_ready  = (int'(wr_r) < int'(DIM)) && (int'(wr_r) < max_row) && (int'(o_r) < int'(ODIM));
    out_valid = (int'(o_r) < int'(ODIM)) && (int'(wr_r) >= need_rows);

    iy      = int'(o_r) - int'(PAD) + int'(ky);
    ix      = int'(o_c) - int'(PAD) + int'(kx);
    pad_pos = (iy < 0) || (iy >= int'(DIM)) || (ix < 0) || (ix >= int'(DIM));
    pix     = pad_pos ? '0 : lb[(iy % int'(NROW)) * int'(DIM) + ix];
    out_data = pix[cf*SIMD +: SIMD];
    out_mask = '0;
    for (int unsigned l = 0; l < SIMD; l++)
      out_mask[l] = !pad_pos && (int'(cf) * int'(SIMD) + int'(l) < int'(CH));
    out_last = (int'(ky) == int'(K) - 1) && (int'(kx) == int'(K) - 1) && (int'(cf) == int'(CF) - 1);
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      lb[(int'(wr_r) % int'(NROW)) * int'(DIM) + int'(wr_c)] <= (CF*SIMD)'(in_data);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_r <= '0; wr_c <= '0;
      o_r  <= '0; o_c  <= '0;
      ky   <= '0; kx   <= '0; cf <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (wr_c == CW'(DIM - 1)) begin
          wr_c <= '0;
          wr_r <= wr_r + 1'b1;
        end else begin
          wr_c <= wr_c + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (int'(cf) != int'(CF) - 1) cf <= cf + 1'b1;
        else begin
          cf <= '0;
          if (int'(kx) != int'(K) - 1) kx <= kx + 1'b1;
          else begin
            kx <= '0;
            if (int'(ky) != int'(K) - 1) ky <= ky + 1'b1;
            else begin
              ky <= '0;
              if (o_c != CW'(ODIM - 1)) o_c <= o_c + 1'b1;
              else begin
                o_c <= '0;
                if (o_r != CW'(ODIM - 1)) o_r <= o_r + 1'b1;
                else begin
                  // frame complete: get ready for the next one
                  o_r  <= '0;
                  wr_r <= '0;
                  wr_c <= '0;
                end
              end
            end
          end
        end
      end
    end
  end
endmodule
