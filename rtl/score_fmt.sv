// score_fmt: formats the raw dot products of the FC core for the processor.
//
// The last fully-connected layer of a classifier is not binarized: its
// integer scores go to a softmax in software. This unit turns each lane's
// signed ACC_W-bit score into a 16-bit word. With FP16_OUT = 1 the word is an
// IEEE 754 half-precision number: the leading one of |x| sets the exponent,
// the next 10 bits the fraction, and the bits below are rounded to nearest,
// ties to even; a magnitude that rounds to 2^16 or more becomes +-infinity.
// Scores of magnitude up to 2048 (any FC layer of up to 2048 inputs) are
// exact. With FP16_OUT = 0 the word is the score as a 16-bit two's-complement
// integer, saturated to -32768 .. 32767.
// Returning results as 16-bit floats follows the document; that the final FC
// layer's scores leave this way, the rounding and the saturation are this
// design's choices.
//
// Timing: combinational, no clock.
module score_fmt #(
  parameter int unsigned LANES    = 16,
  parameter int unsigned ACC_W    = bnn_pkg::ACC_W,
  parameter bit          FP16_OUT = 1'b1
) (
  input  logic [LANES-1:0][ACC_W-1:0] in_data,    // signed scores
  output logic [LANES*16-1:0]         out_data
);
  localparam int unsigned PW = bnn_pkg::clogb(ACC_W);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic             neg;
    logic [ACC_W-1:0] mag;
    logic [PW-1:0]    msb;       // position of the leading one of mag
    logic [ACC_W-1:0] norm;      // mag shifted so the leading one is at ACC_W-1
    logic [11:0]      sig;       // leading one, 10 fraction bits, one carry bit
    logic             rnd, sticky, up;
    logic [5:0]       expo;      // unbiased exponent after rounding
    logic [15:0]      fp, sat;

    always_comb begin
      neg = in_data[l][ACC_W-1];
      mag = neg ? (~in_data[l] + 1'b1) : in_data[l];
      msb = '0;
      for (int unsigned b = 0; b < ACC_W; b++)
        if (mag[b]) msb = PW'(b);
      norm   = mag << (PW'(ACC_W - 1) - msb);
      // norm[ACC_W-1] is the leading one, norm[ACC_W-2 -: 10] the fraction
      rnd    = (ACC_W > 11) ? norm[ACC_W-12] : 1'b0;
      sticky = 1'b0;
      for (int b = 0; b < int'(ACC_W) - 12; b++)
        sticky |= norm[b];
      up   = rnd && (sticky || norm[ACC_W-11]);
      sig  = {1'b0, norm[ACC_W-1 -: 11]} + 12'(up);
      expo = 6'(msb) + 6'(sig[11]);
      if (mag == '0)
        fp = 16'h0000;
      else if (expo > 6'd15)
        fp = {neg, 5'h1F, 10'h000};
      else
        fp = {neg, 5'(expo + 6'd15), sig[11] ? sig[10:1] : sig[9:0]};
    end

    always_comb begin
      if ($signed(in_data[l]) > $signed(ACC_W'(32767)))       sat = 16'h7FFF;
      else if ($signed(in_data[l]) < -$signed(ACC_W'(32768))) sat = 16'h8000;
      else                                                    sat = in_data[l][15:0];
    end

    assign out_data[l*16 +: 16] = FP16_OUT ? fp : sat;
  end
endmodule
