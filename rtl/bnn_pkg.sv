// bnn_pkg: types and constants shared by the binarized-network accelerator.
//
// Binary values are coded as one bit per element: 1 stands for +1 and 0 for -1.
// A dot product of two n-element binary vectors is therefore 2*p - n, where p is
// the number of positions in which the two bits agree (XNOR followed by pop-count).
// The accumulator width of 32 bits is the pop-count output width of the PE figure;
// everything else here (fixed-point format of the batch-norm unit, layer modes,
// the fp16 codes) is this design's own choice.
package bnn_pkg;

  // Bits needed to index n entries (at least one).
  function automatic int unsigned clogb(int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  // Width of the signed dot-product / accumulator values.
  localparam int unsigned ACC_W = 32;

  // Fixed-point format of the shift-based batch-norm output: signed, with
  // SBN_FRAC fractional bits.
  localparam int unsigned SBN_W    = 48;
  localparam int unsigned SBN_FRAC = 8;
  // Width of the signed shift amount phi = round(log2|gamma/sigma|).
  localparam int unsigned PHI_W    = 6;

  // IEEE 754 half-precision codes of +1.0 and -1.0.
  localparam logic [15:0] FP16_POS_ONE = 16'h3C00;
  localparam logic [15:0] FP16_NEG_ONE = 16'hBC00;

  // Which module core a layer run goes through.
  typedef enum logic [0:0] {
    MODE_CNV = 1'b0,   // sliding window -> PE array -> (pool) -> SBN -> sign
    MODE_FC  = 1'b1    // matrix-vector-threshold unit
  } layer_mode_e;

  // Per-output-channel parameters of the shift-based batch normalisation.
  typedef struct packed {
    logic signed [ACC_W-1:0] mu;     // mean, in dot-product units
    logic signed [PHI_W-1:0] phi;    // shift: >0 left, <0 right
    logic                    neg;    // sign of gamma/sigma is negative
    logic signed [SBN_W-1:0] beta;   // offset, SBN_FRAC fractional bits
  } sbn_param_t;

  // Select codes of the parameter write port of the top level.
  typedef enum logic [1:0] {
    PSEL_CNV_W  = 2'd0,   // convolution weights
    PSEL_SBN    = 2'd1,   // batch-norm parameters
    PSEL_FC_W   = 2'd2,   // fully-connected weights
    PSEL_FC_THR = 2'd3    // fully-connected thresholds
  } param_sel_e;

endpackage
