// tb_maxpool: self-checking test of the pooling-level module.
// 7x7 maps of signed values, two lanes and two channel groups per pixel, are
// pooled with the 2x2 and with the 3x3 window (stride 2), in the order 2x2,
// 3x3, 2x2, 3x3 with random input gaps and output stalls from the second map
// on. Each output beat is compared with the maximum over its window computed
// directly in the testbench; the number of outputs per map is checked too.
module tb_maxpool;
  localparam int unsigned DIM = 7, LANES = 2, NF = 2, W = 32;
  localparam int unsigned NMAP = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic k3, in_valid, in_ready, out_valid, out_ready;
  logic [LANES-1:0][W-1:0] in_data, out_data;

  maxpool #(.DIM(DIM), .LANES(LANES), .NF(NF), .ACC_W(W)) dut (.*);

  int img [NMAP][DIM][DIM][NF][LANES];
  bit stall_out = 0, gaps = 0;
  int rx = 0, map_rx = 0;
  always_comb out_ready = !stall_out;

  function automatic int od_of(int m);
    return (m % 2 == 1) ? (DIM - 3) / 2 + 1 : DIM / 2;
  endfunction

  function automatic int ref_pool(int m, int oy, int ox, int g, int l);
    int kk, best;
    kk = (m % 2 == 1) ? 3 : 2;
    best = -(1 << 30);
    for (int y = 2 * oy; y < 2 * oy + kk; y++)
      for (int x = 2 * ox; x < 2 * ox + kk; x++)
        if (img[m][y][x][g][l] > best) best = img[m][y][x][g][l];
    return best;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int od, pix, g, e;
      od = od_of(map_rx);
      pix = rx / NF; g = rx % NF;
      for (int l = 0; l < LANES; l++) begin
        e = ref_pool(map_rx, pix / od, pix % od, g, l);
        checks++;
        if ($signed(out_data[l]) != e) begin
          failures++;
          $display("map %0d out %0d group %0d lane %0d: got %0d exp %0d", map_rx, pix, g, l,
                   $signed(out_data[l]), e);
        end
      end
      if (rx == od * od * NF - 1) begin rx = 0; map_rx++; end else rx++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; k3 = 0;
    for (int m = 0; m < NMAP; m++)
      for (int y = 0; y < DIM; y++) for (int x = 0; x < DIM; x++)
        for (int g = 0; g < NF; g++) for (int l = 0; l < LANES; l++)
          img[m][y][x][g][l] = int'($urandom % 201) - 100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int m = 0; m < NMAP; m++) begin
        // the window size changes only between maps
        wait (map_rx == m);
        @(negedge clk);
        k3 = (m % 2 == 1);
        for (int y = 0; y < DIM; y++) for (int x = 0; x < DIM; x++)
          for (int g = 0; g < NF; g++) begin
            if (gaps) while ($urandom % 4 == 0) @(negedge clk);
            in_valid = 1;
            for (int l = 0; l < LANES; l++) in_data[l] = W'(img[m][y][x][g][l]);
            while (!in_ready) @(negedge clk);
            @(negedge clk);
            in_valid = 0;
          end
        repeat (3) @(negedge clk);
      end
      begin
        wait (map_rx == 1);
        gaps = 1;
        while (map_rx < NMAP) begin @(posedge clk); #2; stall_out = ($urandom % 3 == 0); end
        stall_out = 0;
      end
    join
    checks++;
    if (map_rx != NMAP || rx != 0) begin
      failures++;
      $display("output count: %0d maps and %0d beats", map_rx, rx);
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
