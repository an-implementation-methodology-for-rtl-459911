// tb_axis_fifo: self-checking test of the stream buffer.
// A depth-4 buffer is written and read with independent random valid/ready
// patterns; the read words are compared with a queue model, the level output
// with the model's occupancy, and the buffer must refuse a fifth word. A
// depth-2 instance checks full throughput (one word per cycle in and out).
module tb_axis_fifo;
  localparam int unsigned W = 16, N = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid, s_ready, m_valid, m_ready;
  logic [W-1:0] s_data, m_data;
  logic [2:0] level;
  axis_fifo #(.W(W), .DEPTH(4)) dut (.*);

  logic s2_valid, s2_ready, m2_valid;
  logic [W-1:0] s2_data, m2_data;
  logic [1:0] level2;
  axis_fifo #(.W(W), .DEPTH(2)) dut2 (.clk, .rst_n, .s_valid(s2_valid), .s_ready(s2_ready),
    .s_data(s2_data), .m_valid(m2_valid), .m_ready(1'b1), .m_data(m2_data), .level(level2));

  logic [W-1:0] q [$];
  int rx = 0, rx2 = 0, sent2 = 0, full_seen = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (int'(level) != q.size()) begin
        failures++;
        $display("level %0d, model %0d", level, q.size());
      end
      if (q.size() == 4) begin
        full_seen++;
        checks++;
        if (s_ready) begin failures++; $display("ready while full"); end
      end
      if (m_valid && m_ready) begin
        checks++;
        if (m_data != q[0]) begin failures++; $display("read %h, expected %h", m_data, q[0]); end
        void'(q.pop_front());
        rx++;
      end
      if (s_valid && s_ready) q.push_back(s_data);
      if (m2_valid) begin
        checks++;
        if (m2_data != W'(rx2)) failures++;
        rx2++;
      end
    end
  end

  initial begin
    s_valid = 0; m_ready = 0; s_data = '0; s2_valid = 0; s2_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int i = 0; i < N; i++) begin
        while ($urandom % 3 == 0) @(negedge clk);
        s_valid = 1; s_data = W'($urandom);
        while (!s_ready) @(negedge clk);
        @(negedge clk);
        s_valid = 0;
      end
      while (rx < N) begin
        // slow reader first (fills the buffer), then a fast one
        m_ready = (rx < N / 2) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
        @(negedge clk);
      end
      begin
        // back-to-back stream through the depth-2 buffer
        s2_valid = 1;
        for (int i = 0; i < 100; i++) begin
          s2_data = W'(i);
          @(negedge clk);
          checks++;
          if (!s2_ready) begin failures++; $display("depth-2 buffer stalled a full-rate stream"); end
        end
        s2_valid = 0;
      end
    join
    m_ready = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (full_seen == 0 || rx2 != 100) begin
      failures++;
      $display("full %0d times, %0d words through the depth-2 buffer", full_seen, rx2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
