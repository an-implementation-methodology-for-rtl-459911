// tb_sign_act: self-checking test of the binary activation.
// Streams random signed values, including exactly zero and the extremes,
// through 8 lanes with output stalls and checks each bit against (value >= 0).
module tb_sign_act;
  localparam int unsigned LANES = 8, W = 48, NBEAT = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [LANES-1:0][W-1:0] in_data;
  logic [LANES-1:0] out_bits;

  sign_act #(.LANES(LANES), .W(W)) dut (.*);

  logic [LANES-1:0][W-1:0] vals [NBEAT];
  int rx = 0;
  bit stall_out = 0;
  always_comb out_ready = !stall_out;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out_bits[l] != !vals[rx][l][W-1]) begin
          failures++;
          $display("beat %0d lane %0d: value %0d gave %b", rx, l, $signed(vals[rx][l]), out_bits[l]);
        end
      end
      rx++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    for (int b = 0; b < NBEAT; b++)
      for (int l = 0; l < LANES; l++)
        case ($urandom % 6)
          0: vals[b][l] = '0;
          1: vals[b][l] = {1'b1, {(W-1){1'b0}}};
          2: vals[b][l] = {1'b0, {(W-1){1'b1}}};
          3: vals[b][l] = '1;
          default: vals[b][l] = {$urandom, $urandom};
        endcase
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int b = 0; b < NBEAT; b++) begin
        in_valid = 1; in_data = vals[b];
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        in_valid = 0;
      end
      while (rx < NBEAT) begin @(posedge clk); #2; stall_out = ($urandom % 3 == 0); end
    join
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
