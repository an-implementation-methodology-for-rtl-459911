// tb_score_fmt: checks score_fmt in both output forms (fp16 and saturated
// 16-bit integer) against the integer reference conversions of fp16_ref.svh.
// Values are drawn from several ranges: small scores (exact in fp16), values
// around the rounding points of larger magnitudes, ties, the overflow limit
// of fp16 and of 16 bits, and the extremes of the 32-bit range.
module tb_score_fmt;
  localparam int unsigned LANES = 4;
  int checks = 0, failures = 0;

  `include "fp16_ref.svh"

  logic [LANES-1:0][31:0] in_data;
  logic [LANES*16-1:0]    out_fp, out_int;

  score_fmt #(.LANES(LANES), .FP16_OUT(1'b1)) dut_fp  (.in_data, .out_data(out_fp));
  score_fmt #(.LANES(LANES), .FP16_OUT(1'b0)) dut_int (.in_data, .out_data(out_int));

  function automatic int pick();
    int k, e;
    k = int'($urandom % 8);
    case (k)
      0: return int'($urandom % 4097) - 2048;                     // exact range
      1: begin                                                    // near a tie
           e = 11 + int'($urandom % 5);
           return ((int'($urandom % 1024) + 1024) << (e - 10)) + (1 << (e - 11)) + int'($urandom % 3) - 1;
         end
      2: return int'($urandom % 131072) - 65536;                  // fp16 range edge
      3: return 65504 + int'($urandom % 64) - 32;                 // largest fp16
      4: return -65504 - int'($urandom % 64) + 32;
      5: return 32767 + int'($urandom % 5) - 2;                   // 16-bit limits
      6: return ($urandom % 2) ? int'(32'h7FFF_FFFF) : int'(32'h8000_0000);
      default: return int'($urandom);
    endcase
  endfunction

  initial begin
    in_data = '0;
    for (int n = 0; n < 3000; n++) begin
      for (int l = 0; l < LANES; l++) in_data[l] = 32'(pick());
      #1;
      for (int l = 0; l < LANES; l++) begin
        logic [15:0] ef, ei;
        ef = ref_fp16(longint'($signed(in_data[l])));
        ei = ref_sat16(longint'($signed(in_data[l])));
        checks += 2;
        if (out_fp[l*16 +: 16] !== ef) begin
          failures++;
          if (failures < 10) $display("fp16 of %0d: got %h exp %h", $signed(in_data[l]), out_fp[l*16 +: 16], ef);
        end
        if (out_int[l*16 +: 16] !== ei) begin
          failures++;
          if (failures < 10) $display("int16 of %0d: got %h exp %h", $signed(in_data[l]), out_int[l*16 +: 16], ei);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
