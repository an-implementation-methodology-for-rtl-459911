// maxpool: pooling-level module, max pooling of stride 2 on a streamed map.
//
// The input is a DIM x DIM map in raster order, each pixel split into NF beats
// of LANES signed values (the output format of conv_layer). Max pooling is done
// on the integer convolution results, ahead of batch norm and activation, as the
// document orders it for binarized layers.
//
// 2x2 mode (k3 = 0): the first row of a window pair is stored in a row buffer
// (pool_buffer_odd); while the second row streams in, each column's vertical
// maximum is formed and the horizontal maximum of two columns is taken with a
// register per channel group (pool_reg); the result goes to the output register.
// 3x3 mode (k3 = 1): windows overlap by one row and one column. As in the
// document, the 3x3 window is covered by 2x2 maxima: the row buffer keeps the
// running vertical maximum of a window's rows, the row shared by two windows
// both closes the old window and opens the new one, and the same is done across
// columns with pool_reg. Output size is DIM/2 (2x2) or (DIM-3)/2+1 (3x3, no
// padding). The document shows only the buffers; keeping the second row in the
// stream instead of a second buffer, and the 3x3 bookkeeping, are this design's.
//
// Timing: at most one output beat per input beat, one cycle after it; the unit
// accepts a beat whenever its output register is free or being read.
module maxpool #(
  parameter int unsigned DIM   = 416,
  parameter int unsigned LANES = 16,
  parameter int unsigned NF    = 1,
  parameter int unsigned ACC_W = bnn_pkg::ACC_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          k3,          // 0: 2x2 window, 1: 3x3 window
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [LANES-1:0][ACC_W-1:0]   in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [LANES-1:0][ACC_W-1:0]   out_data
);
  localparam int unsigned OD2 = DIM / 2;
  localparam int unsigned OD3 = (DIM - 3) / 2 + 1;
  localparam int unsigned CW  = bnn_pkg::clogb(DIM);
  localparam int unsigned GW  = bnn_pkg::clogb(NF);

  typedef logic [LANES-1:0][ACC_W-1:0] vec_t;

  function automatic vec_t vmax(vec_t a, vec_t b);
    vec_t m;
    for (int unsigned l = 0; l < LANES; l++)
      m[l] = ($signed(a[l]) > $signed(b[l])) ? a[l] : b[l];
    return m;
  endfunction

  vec_t pool_buffer_odd [DIM * NF];   // running vertical maxima of the open window rows
  vec_t pool_reg        [NF];         // running horizontal maxima per channel group

  logic [CW-1:0] r, c;
  logic [GW-1:0] g;
  logic          take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  // row and column roles
  int unsigned ri, ci, od;
  logic row_start, row_close, col_start, col_close;
  vec_t buf_rd, vert, horiz;

  always_comb begin
    ri = int'(r);
    ci = int'(c);
    od = k3 ? OD3 : OD2;
    if (!k3) begin
      row_start = (ri % 2 == 0);
      row_close = (ri % 2 == 1) && (ri / 2 < od);
      col_start = (ci % 2 == 0);
      col_close = (ci % 2 == 1) && (ci / 2 < od);
    end else begin
      row_start = (ri % 2 == 0);
      row_close = (ri % 2 == 0) && (ri >= 2) && (ri / 2 - 1 < od);
      col_start = (ci % 2 == 0);
      col_close = (ci % 2 == 0) && (ci >= 2) && (ci / 2 - 1 < od);
    end
    buf_rd = pool_buffer_odd[ci * NF + int'(g)];
    vert   = vmax(buf_rd, in_data);
    horiz  = vmax(pool_reg[g], vert);
  end

  always_ff @(posedge clk) begin
    if (take) begin
      // row buffer: open a new window with this row, or fold it in
      if (row_start) pool_buffer_odd[ci * NF + int'(g)] <= in_data;
      else           pool_buffer_odd[ci * NF + int'(g)] <= vert;
      // pool_reg only sees rows that close a window
      if (row_close) begin
        if (col_start) pool_reg[g] <= vert;
        else           pool_reg[g] <= horiz;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= '0; c <= '0; g <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (row_close && col_close) begin
          out_valid <= 1'b1;
          out_data  <= horiz;
        end
        if (int'(g) != int'(NF) - 1) g <= g + 1'b1;
        else begin
          g <= '0;
          if (int'(c) != int'(DIM) - 1) c <= c + 1'b1;
          else begin
            c <= '0;
            r <= (int'(r) == int'(DIM) - 1) ? '0 : r + 1'b1;
          end
        end
      end
    end
  end
endmodule
