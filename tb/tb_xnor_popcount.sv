// tb_xnor_popcount: self-checking test of the XNOR/pop-count lane group.
// Drives random 64-bit weight, feature-map and mask words plus corner cases
// (all agree, none agree, empty mask) and compares the count with a bit-by-bit
// reference.
module tb_xnor_popcount;
  localparam int unsigned SIMD = 64;
  logic [SIMD-1:0] w, x, mask;
  logic [31:0]     count;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  xnor_popcount #(.SIMD(SIMD), .CNT_W(32)) dut (.w, .x, .mask, .count);

  function automatic int ref_count(logic [SIMD-1:0] a, logic [SIMD-1:0] b, logic [SIMD-1:0] m);
    int n = 0;
    for (int i = 0; i < SIMD; i++) if (m[i] && (a[i] == b[i])) n++;
    return n;
  endfunction

  task automatic check_one(logic [SIMD-1:0] a, logic [SIMD-1:0] b, logic [SIMD-1:0] m);
    w = a; x = b; mask = m;
    @(posedge clk);
    checks++;
    if (int'(count) != ref_count(a, b, m)) begin
      failures++;
      $display("mismatch w=%h x=%h m=%h got %0d exp %0d", a, b, m, count, ref_count(a, b, m));
    end
  endtask

  initial begin
    check_one('1, '1, '1);                 // 64 agree
    check_one('0, '1, '1);                 // none agree
    check_one('1, '1, '0);                 // empty mask
    check_one(64'h0F0F, 64'h00FF, '1);
    for (int t = 0; t < 2000; t++)
      check_one({$urandom, $urandom}, {$urandom, $urandom},
                (t % 3 == 0) ? '1 : {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
