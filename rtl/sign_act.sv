// sign_act: binary activation of batch-normalised values.
//
// Each lane becomes +1 (bit 1) when its value is >= 0 and -1 (bit 0) otherwise,
// i.e. Sign(SBN(x)) with the threshold of the document's sign function folded
// into the batch-norm offset. One registered stream stage: one beat per cycle,
// result one cycle later. The handshake is this design's.
module sign_act #(
  parameter int unsigned LANES = 16,
  parameter int unsigned W     = bnn_pkg::SBN_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [LANES-1:0][W-1:0]    in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [LANES-1:0]           out_bits
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        for (int unsigned l = 0; l < LANES; l++)
          out_bits[l] <= ($signed(in_data[l]) >= 0);
      end
    end
  end
endmodule
