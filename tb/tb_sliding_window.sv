// tb_sliding_window: self-checking test of the CNV input buffer.
// A 5x5 map of 10-channel pixels (3 words of 4 lanes per pixel, the last one
// partial) goes through a 3x3 window with one pixel of padding, twice, with
// random gaps on the input and random stalls on the output. Every output word,
// its lane mask and its last-of-window flag are compared with the expected
// receptive-field order (ky, kx, channel word) worked out in the testbench.
// A first frame without stalls also checks the rate: one word per cycle.
module tb_sliding_window;
  localparam int unsigned DIM = 5, CH = 10, K = 3, PAD = 1, SIMD = 4;
  localparam int unsigned CF = (CH + SIMD - 1) / SIMD;
  localparam int unsigned ODIM = DIM + 2 * PAD - K + 1;
  localparam int unsigned NWORD = ODIM * ODIM * K * K * CF;
  localparam int unsigned NFRAME = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic [CH-1:0] in_data;
  logic [SIMD-1:0] out_data, out_mask;

  sliding_window #(.DIM(DIM), .CH(CH), .K(K), .PAD(PAD), .SIMD(SIMD)) dut (.*);

  logic [CH-1:0] img [NFRAME][DIM][DIM];
  bit stall_out = 0, gaps = 0;
  int rx = 0, frame_rx = 0, cyc = 0, t_first, t_last;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void expect_word(int f, int n, output logic [SIMD-1:0] d,
                                      output logic [SIMD-1:0] m, output bit last);
    int pix, kk, j, oy, ox, ky, kx, iy, ix;
    pix = n / (K * K * CF);  kk = n % (K * K * CF);
    oy = pix / ODIM; ox = pix % ODIM;
    ky = kk / (K * CF); kx = (kk / CF) % K; j = kk % CF;
    iy = oy - PAD + ky; ix = ox - PAD + kx;
    d = '0; m = '0;
    for (int l = 0; l < SIMD; l++) begin
      int ch = j * SIMD + l;
      if (iy >= 0 && iy < DIM && ix >= 0 && ix < DIM && ch < CH) begin
        m[l] = 1'b1;
        d[l] = img[f][iy][ix][ch];
      end
    end
    last = (kk == K * K * CF - 1);
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [SIMD-1:0] d, m; bit last;
      expect_word(frame_rx, rx, d, m, last);
      checks++;
      if (out_mask !== m || (out_data & m) !== d || out_last !== last) begin
        failures++;
        $display("frame %0d word %0d: got d=%h m=%h l=%b exp d=%h m=%h l=%b",
                 frame_rx, rx, out_data, out_mask, out_last, d, m, last);
      end
      if (rx == 0) t_first = cyc;
      t_last = cyc;
      if (rx == NWORD - 1) begin rx = 0; frame_rx++; end else rx++;
    end
  end
  always_comb out_ready = !stall_out;

  initial begin
    in_valid = 0; in_data = '0;
    for (int f = 0; f < NFRAME; f++)
      for (int y = 0; y < DIM; y++) for (int x = 0; x < DIM; x++) img[f][y][x] = CH'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < NFRAME; f++)
        for (int y = 0; y < DIM; y++) for (int x = 0; x < DIM; x++) begin
          if (gaps) while ($urandom % 4 == 0) @(negedge clk);
          in_valid = 1; in_data = img[f][y][x];
          while (!in_ready) @(negedge clk);
          @(negedge clk);
          in_valid = 0;
        end
      begin
        wait (frame_rx == 1);
        // rate of the first frame: one output word per cycle once started
        checks++;
        if (t_last - t_first > NWORD - 1 + 2 * DIM) begin
          failures++;
          $display("rate: %0d cycles for %0d words", t_last - t_first + 1, NWORD);
        end
        gaps = 1;
        while (frame_rx < NFRAME) begin @(posedge clk); #2; stall_out = ($urandom % 3 == 0); end
        stall_out = 0;
      end
    join
    checks++;
    if (frame_rx != NFRAME) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
