// End-to-end testbench of image_processing_module on small frames (32 x 40
// sensor words, three frames, one word per cycle so that the labeling core
// falls behind and back-pressures its FIFO). See ipm_bench for the checks.
// The watchdog ends the run with a failure if a frame never completes.
module tb_image_processing_module;
  ipm_bench #(.IN_ROWS(32), .IN_COLS(40), .FRAMES(3), .GAP_X4(4), .WAIT_PCT(85), .REQUIRE_ALL(1)) bench ();

  initial begin
    repeat (400000) @(posedge bench.clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
