// bin_to_fp16: formats binary layer results for the processing system.
//
// With FP16_OUT = 1 every result bit is returned as an IEEE half-precision
// number, +1.0 (16'h3C00) for bit 1 and -1.0 (16'hBC00) for bit 0, in lane l's
// 16-bit field. This is the document's low-end-board configuration, where
// returning the binarised data as 16-bit floating point moved logic from LUTs
// into DSP slices. With FP16_OUT = 0 (the larger board, which returns 1-bit
// data) the bits are passed packed in the low LANES bits and the rest is zero.
// Combinational.
module bin_to_fp16 #(
  parameter int unsigned LANES    = 16,
  parameter bit          FP16_OUT = 1'b1
) (
  input  logic [LANES-1:0]      in_bits,
  output logic [LANES*16-1:0]   out_data
);
  always_comb begin
    out_data = '0;
    if (FP16_OUT) begin
      for (int unsigned l = 0; l < LANES; l++)
        out_data[l*16 +: 16] = in_bits[l] ? bnn_pkg::FP16_POS_ONE : bnn_pkg::FP16_NEG_ONE;
    end else begin
      out_data[LANES-1:0] = in_bits;
    end
  end
endmodule
