// axis_fifo: stream buffer between the DMA and the module cores.
//
// A first-in first-out queue of DEPTH words of W bits with AXI4-Stream style
// valid/ready handshakes on both sides (a word moves when valid and ready are
// both high). Used as the input buffer and the output buffer of the accelerator;
// the document only names these buffers and says their depth was raised on the
// larger board, so the circular-buffer structure is this design's. The default
// depth of 2 is the default stream depth of the high-level-synthesis tool the
// document's design was built with.
//
// Timing: a word written in one cycle can be read in the next; full throughput
// of one word per cycle in and out at the same time.
module axis_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [W-1:0] s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [W-1:0] m_data,
  output logic [bnn_pkg::clogb(DEPTH+1)-1:0] level   // words held
);
  localparam int unsigned AW = bnn_pkg::clogb(DEPTH);
  localparam int unsigned LW = bnn_pkg::clogb(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          push, pop;

  assign s_ready = (int'(level) < int'(DEPTH));
  assign m_valid = (level != '0);
  assign m_data  = mem[rd_ptr];
  assign push    = s_valid && s_ready;
  assign pop     = m_valid && m_ready;

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= s_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= (int'(wr_ptr) == int'(DEPTH) - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (int'(rd_ptr) == int'(DEPTH) - 1) ? '0 : rd_ptr + 1'b1;
      level <= level + LW'(push) - LW'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) int'(level) <= int'(DEPTH));
endmodule
