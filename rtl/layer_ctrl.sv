// layer_ctrl: run controller of the programmable-logic accelerator.
//
// The processing system starts one layer at a time: it sets the configuration
// (which module core, pooling on/off, pooling window 2x2 or 3x3) and the number
// of output beats the layer produces, and pulses `start`. The controller holds
// that configuration for the whole run, opens the input stream, counts output
// beats, marks the last one (for the stream's TLAST towards the DMA), pulses
// `done` after it and counts the cycles the run took. The document names a
// controller in the accelerator without describing it; this behaviour is this
// design's.
//
// Timing: busy rises the cycle after start; done is a one-cycle pulse the cycle
// after the last output beat was taken. A start while busy is ignored.
module layer_ctrl (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  bnn_pkg::layer_mode_e  cfg_mode,
  input  logic                  cfg_pool_en,
  input  logic                  cfg_pool_k3,
  input  logic [31:0]           cfg_out_beats,
  input  logic                  out_fire,      // an output beat is taken
  output logic                  busy,
  output logic                  done,
  output bnn_pkg::layer_mode_e  mode,
  output logic                  pool_en,
  output logic                  pool_k3,
  output logic                  out_last,      // the current output beat is the last
  output logic [31:0]           cycles
);
  logic [31:0] remaining;

  assign out_last = busy && (remaining == 32'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      mode      <= bnn_pkg::MODE_CNV;
      pool_en   <= 1'b0;
      pool_k3   <= 1'b0;
      remaining <= '0;
      cycles    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && cfg_out_beats != 0) begin
          busy      <= 1'b1;
          mode      <= cfg_mode;
          pool_en   <= cfg_pool_en;
          pool_k3   <= cfg_pool_k3;
          remaining <= cfg_out_beats;
          cycles    <= '0;
        end
      end else begin
        cycles <= cycles + 1'b1;
        if (out_fire) begin
          remaining <= remaining - 1'b1;
          if (remaining == 32'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_fire |-> busy);
endmodule
