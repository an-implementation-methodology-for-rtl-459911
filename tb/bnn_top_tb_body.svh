// Shared body of the end-to-end testbenches of bnn_accel_top.
//
// The including module defines the localparams DIM, IN_CH, OUT_CH, K, PAD,
// SIMD, PE, FC_IN, FC_OUT, FP16_OUT (equal to the parameters of the instance
// it makes),
// N_FC_VEC (vectors per FC run), STALLS (1 = random input gaps and output
// stalls), RUNS_SMALL (1 = every kind of run, 0 = only a pooled CNV run, an
// FC run and an FC run with raw scores), POOL_K (pooling window of that pooled run when RUNS_SMALL
// is 0: 2 or 3) and STANDALONE (1 = print the result line and finish, 0 =
// only raise body_done, for an environment that several runs share), declares
// nothing else, includes this file and then instantiates the top as `dut`
// with .* connections.
//
// It writes random kernels, batch-norm parameters, FC weights and thresholds
// through the parameter port, streams a random input map (CNV runs) or random
// vectors (FC run), and compares every output beat with a reference model
// computed here from the same data: direct +-1 convolution with padding, max
// pooling, shift-based batch norm in 64-bit arithmetic, sign, fp16 or packed-bit
// coding; and
// for FC the dot product against the threshold, or the dot product itself as
// fp16 in a raw-score run. It counts how often each
// mechanism of the design was exercised and fails a mechanism that never was.

import bnn_pkg::*;

`include "fp16_ref.svh"

localparam int unsigned CF   = (IN_CH + SIMD - 1) / SIMD;
localparam int unsigned C_SF = K * K * CF;
localparam int unsigned C_NF = OUT_CH / PE;
localparam int unsigned ODIM = DIM + 2 * PAD - K + 1;
localparam int unsigned F_SF = (FC_IN + SIMD - 1) / SIMD;
localparam int unsigned F_NF = FC_OUT / PE;

logic clk = 0, rst_n = 0;
always #5 clk = ~clk;
int checks = 0, failures = 0;
bit body_done = 0;

logic               start, cfg_mode, cfg_pool_en, cfg_pool_k3, cfg_fc_raw, busy, done;
logic [31:0]        cfg_out_beats, cycles;
logic               prm_en;
logic [1:0]         prm_sel;
logic [7:0]         prm_pe;
logic [23:0]        prm_addr;
logic [127:0]       prm_data;
logic               s_axis_tvalid, s_axis_tready, m_axis_tvalid, m_axis_tready, m_axis_tlast;
localparam int unsigned IN_W = (IN_CH > SIMD) ? IN_CH : SIMD;
logic [IN_W-1:0]    s_axis_tdata;
logic [PE*16-1:0]   m_axis_tdata;

// ---------------- test data ----------------
logic [IN_CH-1:0] img [DIM][DIM];
logic [IN_CH-1:0] ker [OUT_CH][K][K];
int               s_mu [OUT_CH], s_phi [OUT_CH];
bit               s_neg [OUT_CH];
longint           s_beta [OUT_CH];
logic [FC_IN-1:0] fw [FC_OUT];
int               fthr [FC_OUT];
logic [FC_IN-1:0] fx [N_FC_VEC];
int               conv_res [OUT_CH][ODIM][ODIM];

logic [PE*16-1:0] expq [$];

function automatic longint ref_sbn(int x, int ch);
  longint v, d;
  v = longint'(x - s_mu[ch]) * 256;
  if (s_phi[ch] >= 0) v = v * (longint'(1) << s_phi[ch]);
  else begin
    d = longint'(1) << (-s_phi[ch]);
    v = (v >= 0) ? v / d : -((-v + d - 1) / d);
  end
  if (s_neg[ch]) v = -v;
  return v + s_beta[ch];
endfunction

// random channel word, every bit drawn separately (IN_CH may exceed 64)
function automatic logic [IN_CH-1:0] rnd_ch();
  logic [IN_CH-1:0] r;
  for (int i = 0; i < IN_CH; i++) r[i] = 1'($urandom);
  return r;
endfunction

function automatic logic [15:0] code(bit b);
  return b ? 16'h3C00 : 16'hBC00;
endfunction

task automatic compute_conv();
  for (int o = 0; o < OUT_CH; o++)
    for (int y = 0; y < ODIM; y++)
      for (int x = 0; x < ODIM; x++) begin
        int s;
        s = 0;
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) begin
            int iy, ix;
            iy = y - PAD + ky; ix = x - PAD + kx;
            if (iy >= 0 && iy < DIM && ix >= 0 && ix < DIM)
              s += IN_CH - 2 * $countones(img[iy][ix] ^ ker[o][ky][kx]);
          end
        conv_res[o][y][x] = s;
      end
endtask

// expected beats of a CNV run: pool 0 none, 2 = 2x2, 3 = 3x3
task automatic expect_cnv(int pool);
  int od;
  od = (pool == 0) ? ODIM : (pool == 2) ? ODIM / 2 : (ODIM - 3) / 2 + 1;
  for (int y = 0; y < od; y++)
    for (int x = 0; x < od; x++)
      for (int nf = 0; nf < C_NF; nf++) begin
        logic [PE*16-1:0] w;
        w = '0;
        for (int p = 0; p < PE; p++) begin
          int o, v;
          o = nf * PE + p;
          if (pool == 0) v = conv_res[o][y][x];
          else begin
            v = -(1 << 30);
            for (int dy = 0; dy < pool; dy++)
              for (int dx = 0; dx < pool; dx++)
                if (conv_res[o][2 * y + dy][2 * x + dx] > v) v = conv_res[o][2 * y + dy][2 * x + dx];
          end
          w = put_bit(w, p, ref_sbn(v, o) >= 0);
        end
        expq.push_back(w);
      end
endtask

task automatic expect_fc(bit raw);
  for (int v = 0; v < N_FC_VEC; v++)
    for (int nf = 0; nf < F_NF; nf++) begin
      logic [PE*16-1:0] w;
      w = '0;
      for (int p = 0; p < PE; p++) begin
        int o, d;
        o = nf * PE + p;
        d = FC_IN - 2 * $countones(fw[o] ^ fx[v]);
        w = raw ? put_score(w, p, longint'(d)) : put_bit(w, p, d > fthr[o]);
      end
      expq.push_back(w);
    end
endtask

// ---------------- mechanism counters ----------------
int n_in_stall = 0, n_out_stall = 0, n_tlast = 0, n_done = 0, n_mode_switch = 0;
int n_pool_bypass = 0, n_pool2 = 0, n_pool3 = 0, n_fc = 0, n_fold_replay = 0;
int n_fc_raw = 0;
int n_bits_pos = 0, n_bits_neg = 0, n_neg_shift = 0, n_pos_shift = 0, n_pad_win = 0;
bit stall_out = 0, gaps = 0;

// one lane of an expected output beat: fp16 +-1.0 per 16-bit lane, or the
// packed bit when FP16_OUT is 0; raw scores as fp16 or saturated integers
function automatic logic [PE*16-1:0] put_bit(logic [PE*16-1:0] w, int p, bit b);
  if (FP16_OUT) w[p*16 +: 16] = code(b);
  else w[p] = b;
  if (b) n_bits_pos++; else n_bits_neg++;
  return w;
endfunction

function automatic logic [PE*16-1:0] put_score(logic [PE*16-1:0] w, int p, longint d);
  w[p*16 +: 16] = FP16_OUT ? ref_fp16(d) : ref_sat16(d);
  return w;
endfunction
int rx = 0;
logic last_mode = 0;

always_comb m_axis_tready = !stall_out;

always @(posedge clk) begin
  if (rst_n) begin
    if (s_axis_tvalid && !s_axis_tready) n_in_stall++;
    if (m_axis_tvalid && !m_axis_tready) n_out_stall++;
    if (done) n_done++;
    if (m_axis_tvalid && m_axis_tready) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output beat %h", m_axis_tdata);
      end else begin
        if (m_axis_tdata != expq[0]) begin
          failures++;
          if (failures < 10) $display("beat %0d: got %h exp %h", rx, m_axis_tdata, expq[0]);
        end
        checks++;
        if (m_axis_tlast != (expq.size() == 1)) begin
          failures++;
          $display("beat %0d: tlast %b with %0d beats left", rx, m_axis_tlast, expq.size());
        end
        if (m_axis_tlast) n_tlast++;
        void'(expq.pop_front());
      end
      rx++;
    end
  end
end

task automatic prm_write(int sel, int pe, int addr, logic [127:0] data);
  prm_en = 1; prm_sel = 2'(sel); prm_pe = 8'(pe); prm_addr = 24'(addr); prm_data = data;
  @(negedge clk);
  prm_en = 0;
endtask

task automatic load_params();
  for (int o = 0; o < OUT_CH; o++)
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        for (int cf = 0; cf < CF; cf++) begin
          logic [CF*SIMD-1:0] wide;
          wide = (CF*SIMD)'(ker[o][ky][kx]);
          prm_write(0, o % PE, (o / PE) * C_SF + (ky * K + kx) * CF + cf, 128'(wide[cf*SIMD +: SIMD]));
        end
  for (int o = 0; o < OUT_CH; o++) begin
    sbn_param_t sp;
    sp.mu = ACC_W'(s_mu[o]); sp.phi = PHI_W'(s_phi[o]); sp.neg = s_neg[o]; sp.beta = SBN_W'(s_beta[o]);
    if (s_phi[o] < 0) n_neg_shift++; else n_pos_shift++;
    prm_write(1, 0, o, 128'(sp));
  end
  for (int o = 0; o < FC_OUT; o++) begin
    logic [F_SF*SIMD-1:0] wide;
    wide = (F_SF*SIMD)'(fw[o]);
    for (int s = 0; s < F_SF; s++)
      prm_write(2, o % PE, (o / PE) * F_SF + s, 128'(wide[s*SIMD +: SIMD]));
    prm_write(3, 0, o, 128'(unsigned'(fthr[o])));
  end
endtask

task automatic drive_word(logic [IN_W-1:0] d);
  if (gaps) while ($urandom % 4 == 0) @(negedge clk);
  s_axis_tvalid = 1; s_axis_tdata = d;
  // inputs change on the falling edge; the word moves on the next rising edge
  // once s_axis_tready is high
  while (!s_axis_tready) @(negedge clk);
  @(negedge clk);
  s_axis_tvalid = 0;
endtask

// one layer run; pool: -2 FC with raw scores, -1 FC, 0 CNV without pooling,
// 2 / 3 pooled CNV
task automatic run_layer(int pool);
  int beats, od, c0;
  logic mode;
  mode = (pool < 0);
  if (pool < 0) begin
    expect_fc(pool == -2); beats = N_FC_VEC * F_NF;
    if (pool == -2) n_fc_raw++; else n_fc++;
    if (F_NF > 1) n_fold_replay++;
  end else begin
    expect_cnv(pool);
    od = (pool == 0) ? ODIM : (pool == 2) ? ODIM / 2 : (ODIM - 3) / 2 + 1;
    beats = od * od * C_NF;
    if (pool == 0) n_pool_bypass++; else if (pool == 2) n_pool2++; else n_pool3++;
    if (C_NF > 1) n_fold_replay++;
    if (PAD > 0) n_pad_win++;
  end
  if (mode != last_mode) n_mode_switch++;
  last_mode = mode;
  c0 = n_done;
  cfg_mode = mode; cfg_pool_en = (pool > 0); cfg_pool_k3 = (pool == 3); cfg_fc_raw = (pool == -2);
  cfg_out_beats = 32'(beats);
  @(negedge clk);
  start = 1; @(negedge clk); start = 0;
  fork
    begin
      if (pool < 0) begin
        for (int v = 0; v < N_FC_VEC; v++) begin
          logic [F_SF*SIMD-1:0] wide;
          wide = (F_SF*SIMD)'(fx[v]);
          for (int s = 0; s < F_SF; s++) drive_word(IN_W'(wide[s*SIMD +: SIMD]));
        end
      end else begin
        for (int y = 0; y < DIM; y++)
          for (int x = 0; x < DIM; x++) drive_word(IN_W'(img[y][x]));
      end
    end
    begin
      while (n_done == c0) begin
        @(posedge clk); #2;
        stall_out = STALLS && gaps && ($urandom % 3 == 0);
      end
      stall_out = 0;
    end
  join
  checks++;
  if (expq.size() != 0) begin
    failures++;
    $display("%0d expected beats never came", expq.size());
  end
endtask

task automatic require(int n, string what);
  checks++;
  if (n == 0) begin
    failures++;
    $display("mechanism never exercised: %s", what);
  end else $display("  %-34s %0d", what, n);
endtask

initial begin
  start = 0; cfg_mode = 0; cfg_pool_en = 0; cfg_pool_k3 = 0; cfg_fc_raw = 0; cfg_out_beats = 0;
  prm_en = 0; prm_sel = 0; prm_pe = 0; prm_addr = 0; prm_data = 0;
  s_axis_tvalid = 0; s_axis_tdata = 0;
  for (int y = 0; y < DIM; y++) for (int x = 0; x < DIM; x++) img[y][x] = rnd_ch();
  for (int o = 0; o < OUT_CH; o++) begin
    for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) ker[o][ky][kx] = rnd_ch();
    // mean near zero, shift of either sign, offset small enough that both
    // activation values occur
    s_mu[o]   = int'($urandom % 9) - 4;
    s_phi[o]  = (o % 2 == 0) ? -int'($urandom % 4) - 1 : int'($urandom % 3);
    s_neg[o]  = 1'($urandom);
    s_beta[o] = longint'($urandom % 2049) - 1024;
  end
  for (int o = 0; o < FC_OUT; o++) begin
    for (int i = 0; i < FC_IN; i++) fw[o][i] = 1'($urandom);
    fthr[o] = int'($urandom % 9) - 4;
  end
  for (int v = 0; v < N_FC_VEC; v++) for (int i = 0; i < FC_IN; i++) fx[v][i] = 1'($urandom);
  compute_conv();
  repeat (3) @(negedge clk);
  rst_n = 1;
  @(negedge clk);
  load_params();
  if (RUNS_SMALL) begin
    // first run without stalls: check the cycle count of the CNV core
    run_layer(0);
    checks++;
    if (int'(cycles) < int'(ODIM * ODIM * C_SF * C_NF) ||
        int'(cycles) > int'(ODIM * ODIM * C_SF * C_NF + 2 * DIM + 20)) begin
      failures++;
      $display("CNV run took %0d cycles, expected about %0d", cycles, ODIM * ODIM * C_SF * C_NF);
    end else $display("  CNV run: %0d cycles for %0d window words", cycles, ODIM * ODIM * C_SF * C_NF);
    gaps = STALLS;
    run_layer(2);
    run_layer(-1);
    run_layer(3);
    run_layer(-1);
    run_layer(-2);
  end else begin
    gaps = STALLS;
    run_layer(POOL_K);
    $display("  CNV run with %0dx%0d pooling: %0d cycles (%0d window words)", POOL_K, POOL_K,
             cycles, ODIM * ODIM * C_SF * C_NF);
    run_layer(-1);
    $display("  FC run: %0d cycles (%0d words)", cycles, N_FC_VEC * F_SF * F_NF);
    run_layer(-2);
  end
  $display("mechanisms exercised:");
  if (RUNS_SMALL) begin
    require(n_pool_bypass, "CNV run with pooling bypassed");
    require(n_pool3, "3x3 max pooling");
    require(n_in_stall, "input stream back-pressure");
    require(n_out_stall, "output stream stall");
  end
  if (RUNS_SMALL || POOL_K == 2) require(n_pool2, "2x2 max pooling");
  else require(n_pool3, "3x3 max pooling");
  require(n_fc, "FC matrix-vector-threshold run");
  require(n_fc_raw, "FC run returning raw scores");
  require(n_mode_switch, "CNV/FC mode switch");
  require(n_fold_replay, "neuron folds (input vector replay)");
  require(n_pad_win, "padded windows");
  require(n_neg_shift, "SBN right shift");
  require(n_pos_shift, "SBN left shift");
  require(n_bits_pos, "+1 activations");
  require(n_bits_neg, "-1 activations");
  require(n_tlast, "TLAST on last beat");
  require(n_done, "done pulses");
  if (STANDALONE) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  body_done = 1;
end
