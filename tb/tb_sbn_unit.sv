// tb_sbn_unit: self-checking test of the shift-based batch normalisation.
// Random per-channel parameters (mean, shift from -10 to +6, sign, offset) are
// written for 4 channels (2 lanes, 2 groups); random dot products are streamed
// through with output stalls. Each result is compared with
// (x - mu) * 2^phi * (+-1) + beta evaluated in 64-bit arithmetic with a
// floor division for negative shifts, in the unit's 8 fractional bits.
// Also checks the one-cycle latency.
module tb_sbn_unit;
  import bnn_pkg::*;
  localparam int unsigned LANES = 2, NF = 2, NBEAT = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, wr_en;
  logic [LANES-1:0][ACC_W-1:0] in_data;
  logic [LANES-1:0][SBN_W-1:0] out_data;
  logic [1:0] wr_addr;
  sbn_param_t wr_data;

  sbn_unit #(.LANES(LANES), .NF(NF)) dut (.*);

  int   mu [LANES*NF], phi [LANES*NF];
  bit   neg [LANES*NF];
  longint beta [LANES*NF];
  int   xs [NBEAT][LANES];
  int   rx = 0, cyc = 0, t_in0 = -1, t_out0 = -1;
  bit   stall_out = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb out_ready = !stall_out;

  function automatic longint ref_sbn(int x, int ch);
    longint v, d;
    v = longint'(x - mu[ch]) * 256;
    if (phi[ch] >= 0) v = v * (longint'(1) << phi[ch]);
    else begin
      d = longint'(1) << (-phi[ch]);
      v = (v >= 0) ? v / d : -((-v + d - 1) / d);   // floor division
    end
    if (neg[ch]) v = -v;
    return v + beta[ch];
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && t_in0 < 0) t_in0 = cyc;
    if (rst_n && out_valid && out_ready) begin
      if (t_out0 < 0) t_out0 = cyc;
      for (int l = 0; l < LANES; l++) begin
        longint e;
        e = ref_sbn(xs[rx][l], (rx % NF) * LANES + l);
        checks++;
        if (longint'($signed(out_data[l])) != e) begin
          failures++;
          $display("beat %0d lane %0d: got %0d exp %0d", rx, l, $signed(out_data[l]), e);
        end
      end
      rx++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; wr_en = 0; wr_addr = '0; wr_data = '0;
    for (int c = 0; c < LANES * NF; c++) begin
      mu[c] = int'($urandom % 201) - 100;
      phi[c] = int'($urandom % 17) - 10;
      neg[c] = 1'($urandom);
      beta[c] = longint'($urandom % 131072) - 65536;
    end
    for (int b = 0; b < NBEAT; b++) for (int l = 0; l < LANES; l++) xs[b][l] = int'($urandom % 601) - 300;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < LANES * NF; c++) begin
      wr_en = 1; wr_addr = 2'(c);
      wr_data.mu = ACC_W'(mu[c]); wr_data.phi = PHI_W'(phi[c]);
      wr_data.neg = neg[c]; wr_data.beta = SBN_W'(beta[c]);
      @(negedge clk);
    end
    wr_en = 0;
    fork
      for (int b = 0; b < NBEAT; b++) begin
        in_valid = 1;
        for (int l = 0; l < LANES; l++) in_data[l] = ACC_W'(xs[b][l]);
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        in_valid = 0;
      end
      begin
        wait (rx > 20);
        while (rx < NBEAT) begin @(posedge clk); #2; stall_out = ($urandom % 3 == 0); end
        stall_out = 0;
      end
    join
    wait (rx == NBEAT);
    checks++;
    if (t_out0 - t_in0 != 1) begin
      failures++;
      $display("latency %0d, expected 1", t_out0 - t_in0);
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
