// Self-checking testbench of histogram: frames of random pixels with gaps;
// every bin read back is compared with a count kept here, and the threshold
// with the first luminance whose cumulative count reaches the background
// count. A second frame checks that start clears all bins, and a frame whose
// background count exceeds the pixel count must return 255.
module tb_histogram;
  localparam int N = 300;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_last = 0;
  logic [20:0] cfg_bg_count = '0;
  logic [7:0] in_data = '0, thr_value, rd_addr = '0;
  logic busy, thr_valid;
  logic [20:0] rd_data;
  int checks = 0, failures = 0, cyc = 0, thr_seen = 0;
  int ref_hist [256];
  int got_thr;

  histogram #(.LUM_W(8), .HCNT_W(21)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (thr_valid) begin thr_seen++; got_thr = thr_value; end

  task automatic frame(input int bg, input int maxv);
    int exp_thr = 255, cum = 0, seen_before;
    foreach (ref_hist[i]) ref_hist[i] = 0;
    cfg_bg_count = 21'(bg);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < N; i++) begin
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_last = (i == N-1);
      in_data = (i % 7 == 0) ? in_data : 8'($urandom_range(0, maxv));  // repeats too
      ref_hist[in_data]++;
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    for (int v = 0; v < 256; v++) begin
      cum += ref_hist[v];
      if (cum >= bg) begin exp_thr = v; break; end
    end
    seen_before = thr_seen;
    repeat (300) @(negedge clk);
    checks++;
    if (thr_seen != seen_before + 1 || got_thr != exp_thr) begin
      failures++; $display("FAIL threshold %0d expected %0d", got_thr, exp_thr);
    end
    for (int v = 0; v < 256; v++) begin
      rd_addr = 8'(v); #1;
      checks++;
      if (rd_data != 21'(ref_hist[v])) begin failures++; $display("FAIL bin %0d: %0d vs %0d", v, rd_data, ref_hist[v]); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(N / 2, 255);
    frame(10, 40);
    frame(N + 1, 255);
    frame(1, 3);
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
