// tb_conv_layer: self-checking test of the CNV-level module.
// A 6x6 map with 5 binary channels is convolved with 4 random 3x3 binary
// kernels (padding 1, PE 2, so two neuron folds, and 4-lane words so a pixel
// takes two partly filled words). Every output value is compared with a direct
// +-1 convolution computed in the testbench. The first frame runs without
// stalls and checks the cycle count ODIM^2 * K^2 * CF * NF; the second frame
// adds random input gaps and output stalls.
module tb_conv_layer;
  localparam int unsigned DIM = 6, IN_CH = 5, OUT_CH = 4, K = 3, PAD = 1, SIMD = 4, PE = 2;
  localparam int unsigned CF = (IN_CH + SIMD - 1) / SIMD, SF = K * K * CF, NF = OUT_CH / PE;
  localparam int unsigned ODIM = DIM + 2 * PAD - K + 1;
  localparam int unsigned NFRAME = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, wr_en;
  logic [IN_CH-1:0] in_data;
  logic [PE-1:0][31:0] out_data;
  logic [0:0] out_nf, wr_pe;
  logic [bnn_pkg::clogb(NF*SF)-1:0] wr_addr;
  logic [SIMD-1:0] wr_data;

  conv_layer #(.DIM(DIM), .IN_CH(IN_CH), .OUT_CH(OUT_CH), .K(K), .PAD(PAD),
               .SIMD(SIMD), .PE(PE)) dut (.*);

  logic [IN_CH-1:0] img [NFRAME][DIM][DIM];
  logic [IN_CH-1:0] ker [OUT_CH][K][K];

  function automatic int ref_conv(int f, int o, int y, int x);
    int s = 0;
    for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) begin
      int iy = y - PAD + ky, ix = x - PAD + kx;
      if (iy >= 0 && iy < DIM && ix >= 0 && ix < DIM)
        for (int c = 0; c < IN_CH; c++)
          s += (img[f][iy][ix][c] == ker[o][ky][kx][c]) ? 1 : -1;
    end
    return s;
  endfunction

  bit stall_out = 0, gaps = 0;
  int rx = 0, frame_rx = 0, cyc = 0, t_start, t_last;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb out_ready = !stall_out;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int pix, nf;
      pix = rx / NF; nf = rx % NF;
      for (int p = 0; p < PE; p++) begin
        int e;
        e = ref_conv(frame_rx, nf * PE + p, pix / ODIM, pix % ODIM);
        checks++;
        if ($signed(out_data[p]) != e) begin
          failures++;
          $display("frame %0d pixel %0d ch %0d: got %0d exp %0d", frame_rx, pix, nf * PE + p,
                   $signed(out_data[p]), e);
        end
      end
      t_last = cyc;
      if (rx == ODIM * ODIM * NF - 1) begin rx = 0; frame_rx++; end else rx++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; wr_en = 0;
    for (int f = 0; f < NFRAME; f++)
      for (int y = 0; y < DIM; y++) for (int x = 0; x < DIM; x++) img[f][y][x] = IN_CH'($urandom);
    for (int o = 0; o < OUT_CH; o++)
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) ker[o][ky][kx] = IN_CH'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < OUT_CH; o++)
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        for (int cf = 0; cf < CF; cf++) begin
          logic [CF*SIMD-1:0] wide;
          wide = (CF*SIMD)'(ker[o][ky][kx]);
          wr_en = 1; wr_pe = 1'(o % PE);
          wr_addr = ($bits(wr_addr))'((o / PE) * SF + (ky * K + kx) * CF + cf);
          wr_data = wide[cf*SIMD +: SIMD];
          @(negedge clk);
        end
    wr_en = 0;
    t_start = cyc;
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
        checks++;
        if (t_last - t_start > ODIM * ODIM * SF * NF + 2 * DIM + 4) begin
          failures++;
          $display("rate: %0d cycles, expected about %0d", t_last - t_start, ODIM * ODIM * SF * NF);
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
