// Full-size testbench of image_processing_module: the module at its default
// parameters (2048-column line buffers, FIFO and table sizes) processes one
// 2048 x 2048 frame, the reset size of the register bank, binned to
// 1024 x 1024. Words arrive at the SpaceWire rate of 8 Mword/s with a
// 50 MHz clock (4 words every 25 cycles), and processing must end within
// about one binned row of labeling after the last word, i.e. on the fly.
// All checks of ipm_bench apply.
module tb_full_frame;
  ipm_bench #(.IN_ROWS(2048), .IN_COLS(2048), .FRAMES(1), .GAP_X4(25), .CHECK_TAIL(1), .WAIT_PCT(20), .REQUIRE_ALL(0)) bench ();

  initial begin
    repeat (60_000_000) @(posedge bench.clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
