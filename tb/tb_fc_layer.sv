// tb_fc_layer: self-checking test of the FC-level matrix-vector-threshold unit.
// A 20-input, 6-neuron layer (8 lanes, so the third input word is partial; PE 2,
// so three neuron folds) gets random binary weights and random thresholds near
// zero. Random vectors are streamed in; each output bit is compared with
// (dot product > threshold) computed in the testbench, and each out_dot lane
// with the dot product itself. Vectors 0-9 run without
// stalls and check the rate of SF*NF cycles per vector; the rest run with
// input gaps and output stalls.
module tb_fc_layer;
  localparam int unsigned IN_N = 20, OUT_N = 6, SIMD = 8, PE = 2;
  localparam int unsigned SF = (IN_N + SIMD - 1) / SIMD, NF = OUT_N / PE, NVEC = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, wr_en, thr_wr_en;
  logic [SIMD-1:0] in_data, wr_data;
  logic [PE-1:0] out_bits;
  logic [PE-1:0][31:0] out_dot;
  logic [0:0] wr_pe;
  logic [bnn_pkg::clogb(NF*SF)-1:0] wr_addr;
  logic [bnn_pkg::clogb(OUT_N)-1:0] thr_wr_addr;
  logic [31:0] thr_wr_data;

  fc_layer #(.IN_N(IN_N), .OUT_N(OUT_N), .SIMD(SIMD), .PE(PE)) dut (.*);

  logic [IN_N-1:0] Wt [OUT_N];
  logic [IN_N-1:0] X  [NVEC];
  int thr [OUT_N];
  int rx = 0, cyc = 0, t0, t_last;
  bit stall_out = 0, gaps = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb out_ready = !stall_out;

  function automatic int dot(int v, int o);
    int d = 0;
    for (int i = 0; i < IN_N; i++) d += (Wt[o][i] == X[v][i]) ? 1 : -1;
    return d;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int v, nf;
      v = rx / NF; nf = rx % NF;
      for (int p = 0; p < PE; p++) begin
        checks++;
        if (out_bits[p] != (dot(v, nf * PE + p) > thr[nf * PE + p])) begin
          failures++;
          $display("vec %0d neuron %0d: got %b, dot %0d thr %0d", v, nf * PE + p, out_bits[p],
                   dot(v, nf * PE + p), thr[nf * PE + p]);
        end
        checks++;
        if ($signed(out_dot[p]) != dot(v, nf * PE + p)) begin
          failures++;
          $display("vec %0d neuron %0d: dot %0d, expected %0d", v, nf * PE + p, $signed(out_dot[p]),
                   dot(v, nf * PE + p));
        end
      end
      t_last = cyc;
      rx++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; wr_en = 0; thr_wr_en = 0;
    for (int o = 0; o < OUT_N; o++) begin
      Wt[o] = IN_N'({$urandom, $urandom});
      thr[o] = int'($urandom % 9) - 4;
    end
    for (int v = 0; v < NVEC; v++) X[v] = IN_N'({$urandom, $urandom});
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < OUT_N; o++) begin
      logic [SF*SIMD-1:0] wide;
      wide = (SF*SIMD)'(Wt[o]);
      for (int s = 0; s < SF; s++) begin
        wr_en = 1; wr_pe = 1'(o % PE); wr_addr = ($bits(wr_addr))'((o / PE) * SF + s);
        wr_data = wide[s*SIMD +: SIMD];
        @(negedge clk);
      end
      wr_en = 0;
      thr_wr_en = 1; thr_wr_addr = ($bits(thr_wr_addr))'(o); thr_wr_data = 32'(thr[o]);
      @(negedge clk);
      thr_wr_en = 0;
    end
    t0 = cyc;
    fork
      for (int v = 0; v < NVEC; v++) begin
        logic [SF*SIMD-1:0] wide;
        wide = (SF*SIMD)'(X[v]);
        for (int s = 0; s < SF; s++) begin
          if (gaps) while ($urandom % 3 == 0) @(negedge clk);
          in_valid = 1; in_data = wide[s*SIMD +: SIMD];
          // the unused lanes of the last word must not matter
          if (s == SF - 1) in_data = in_data | ~SIMD'((1 << (IN_N - s * SIMD)) - 1) & SIMD'($urandom);
          while (!in_ready) @(negedge clk);
          @(negedge clk);
          in_valid = 0;
        end
      end
      begin
        wait (rx == 10 * NF);
        checks++;
        if (t_last - t0 > 10 * SF * NF + 4) begin
          failures++;
          $display("rate: %0d cycles for 10 vectors, expected about %0d", t_last - t0, 10 * SF * NF);
        end
        gaps = 1;
        while (rx < NVEC * NF) begin @(posedge clk); #2; stall_out = ($urandom % 3 == 0); end
        stall_out = 0;
      end
    join
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
