// xnor_popcount: one binary multiply-accumulate lane group (a PE's datapath).
//
// Multiplying two +1/-1 values coded as bits is an XNOR; summing the products
// reduces to counting the agreeing bits. The SIMD-bit weight word and feature-map
// word are XNORed, bits outside `mask` are cleared, and the set bits are counted.
// The 64-bit inputs and the 32-bit count follow the PE figure of the document;
// the lane mask (for vectors that are not a multiple of SIMD long) is this design's
// addition. Purely combinational.
module xnor_popcount #(
  parameter int unsigned SIMD  = 64,
  parameter int unsigned CNT_W = 32
) (
  input  logic [SIMD-1:0]  w,
  input  logic [SIMD-1:0]  x,
  input  logic [SIMD-1:0]  mask,
  output logic [CNT_W-1:0] count
);
  logic [SIMD-1:0] agree;

  always_comb begin
    agree = ~(w ^ x) & mask;
    count = '0;
    for (int unsigned i = 0; i < SIMD; i++)
      count = count + CNT_W'(agree[i]);
  end
endmodule
