// tb_bin_to_fp16: self-checking test of the result formatter.
// Random 16-lane bit vectors go through both configurations: fp16 output
// (each lane must be exactly half-precision +1.0 = 16'h3C00 or -1.0 = 16'hBC00)
// and packed-bit output (bits in the low lanes, the rest zero).
module tb_bin_to_fp16;
  localparam int unsigned LANES = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [LANES-1:0]    bits;
  logic [LANES*16-1:0] fp, packed_out;

  bin_to_fp16 #(.LANES(LANES), .FP16_OUT(1'b1)) dut_fp  (.in_bits(bits), .out_data(fp));
  bin_to_fp16 #(.LANES(LANES), .FP16_OUT(1'b0)) dut_bit (.in_bits(bits), .out_data(packed_out));

  // half precision: sign, 5-bit exponent biased by 15, 10-bit fraction;
  // 1.0 has exponent 15 and fraction 0
  function automatic logic [15:0] half_of(bit b);
    return {~b, 5'd15, 10'd0};
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      bits = (t == 0) ? '0 : (t == 1) ? '1 : LANES'($urandom);
      @(posedge clk);
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (fp[l*16 +: 16] != half_of(bits[l])) begin
          failures++;
          $display("lane %0d bit %b gave %h", l, bits[l], fp[l*16 +: 16]);
        end
      end
      checks++;
      if (packed_out != (LANES*16)'(bits)) begin failures++; $display("packed output %h", packed_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
