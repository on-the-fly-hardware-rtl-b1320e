// Self-checking testbench of binarization: all threshold/pixel pairs; a
// pixel is white only when it is strictly greater than the threshold.
module tb_binarization;
  logic [7:0] thr, in_data;
  logic in_valid, out_valid, out_bit;
  int checks = 0, failures = 0;

  binarization #(.LUM_W(8)) dut (.*);

  initial begin
    for (int t = 0; t < 256; t++)
      for (int p = 0; p < 256; p++) begin
        thr = 8'(t); in_data = 8'(p); in_valid = (p % 3) != 0;
        #1;
        checks++;
        if (out_bit != (p > t) || out_valid != in_valid) begin
          failures++;
          if (failures < 10) $display("FAIL T=%0d P=%0d got %0b", t, p, out_bit);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
