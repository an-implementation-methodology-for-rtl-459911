// tb_mvau: self-checking test of the PE-array matrix-vector unit.
// Small configuration (SIMD 8, PE 2, SF 3, NF 2): random binary weights are
// written, random vectors with random lane masks are streamed in, and every
// result group is compared with a +-1 dot product worked out in the testbench.
// Phase 1 runs without back-pressure and checks the rate of SF*NF cycles per
// vector; phase 2 adds random stalls on both sides.
module tb_mvau;
  localparam int unsigned SIMD = 8, PE = 2, SF = 3, NF = 2, ACC_W = 32;
  localparam int unsigned NVEC = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, wr_en;
  logic [SIMD-1:0] in_data, in_mask, wr_data;
  logic [PE-1:0][ACC_W-1:0] out_data;
  logic [0:0] out_nf;
  logic [0:0] wr_pe;
  logic [2:0] wr_addr;

  mvau #(.SIMD(SIMD), .PE(PE), .SF(SF), .NF(NF), .ACC_W(ACC_W)) dut (.*);

  logic [SIMD-1:0] W [PE*NF][SF];        // row o = nf*PE + p
  logic [SIMD-1:0] X [NVEC][SF];
  logic [SIMD-1:0] M [NVEC][SF];

  function automatic int dot(int v, int o);
    int d = 0;
    for (int s = 0; s < SF; s++)
      for (int l = 0; l < SIMD; l++)
        if (M[v][s][l]) d += (W[o][s][l] == X[v][s][l]) ? 1 : -1;
    return d;
  endfunction

  int rx_vec, rx_nf, first_out, last_out, cyc = 0;
  bit stall_in, stall_out;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // result checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int p = 0; p < PE; p++) begin
        checks++;
        if ($signed(out_data[p]) != dot(rx_vec, rx_nf * PE + p)) begin
          failures++;
          $display("vec %0d nf %0d pe %0d got %0d exp %0d", rx_vec, rx_nf, p,
                   $signed(out_data[p]), dot(rx_vec, rx_nf * PE + p));
        end
      end
      checks++;
      if (int'(out_nf) != rx_nf) failures++;
      if (rx_vec == 0 && rx_nf == 0) first_out = cyc;
      last_out = cyc;
      if (rx_nf == NF - 1) begin rx_nf = 0; rx_vec++; end else rx_nf++;
    end
  end
  always_comb out_ready = !stall_out;

  // inputs change on the falling edge; a word moves on the rising edge when
  // in_valid and in_ready were both high
  task automatic send_word(logic [SIMD-1:0] d, logic [SIMD-1:0] m, bit gaps);
    if (gaps) while ($urandom % 3 == 0) @(negedge clk);
    in_valid = 1; in_data = d; in_mask = m;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic send_vectors(int from, int to, bit gaps);
    for (int v = from; v < to; v++)
      for (int s = 0; s < SF; s++) send_word(X[v][s], M[v][s], gaps);
  endtask

  initial begin
    in_valid = 0; wr_en = 0; stall_in = 0; stall_out = 0;
    rx_vec = 0; rx_nf = 0;
    for (int o = 0; o < PE * NF; o++) for (int s = 0; s < SF; s++) W[o][s] = SIMD'($urandom);
    for (int v = 0; v < NVEC; v++) for (int s = 0; s < SF; s++) begin
      X[v][s] = SIMD'($urandom);
      M[v][s] = (v % 4 == 0) ? '1 : SIMD'($urandom);
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // load weights: row o = nf*PE + p -> PE p, address nf*SF + s
    for (int o = 0; o < PE * NF; o++)
      for (int s = 0; s < SF; s++) begin
        wr_en = 1; wr_pe = 1'(o % PE); wr_addr = 3'((o / PE) * SF + s); wr_data = W[o][s];
        @(negedge clk);
      end
    wr_en = 0;
    // phase 1: full speed, rate check
    begin : full_speed
      int t0;
      t0 = cyc;
      send_vectors(0, NVEC / 2, 0);
      in_valid = 0;
      wait (rx_vec == NVEC / 2);
      checks++;
      if (last_out - t0 > (NVEC / 2) * SF * NF + 4) begin
        failures++;
        $display("rate: %0d cycles for %0d vectors, expected about %0d", last_out - t0, NVEC / 2, (NVEC / 2) * SF * NF);
      end
    end
    // phase 2: random stalls on both sides
    fork
      send_vectors(NVEC / 2, NVEC, 1);
      begin
        while (rx_vec < NVEC) begin @(posedge clk); #2; stall_out = ($urandom % 2 == 0); end
        stall_out = 0;
      end
    join
    checks++;
    if (rx_vec != NVEC) failures++;
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
