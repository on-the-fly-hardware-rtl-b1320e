// Self-checking testbench of lpf: random frames and kernels, zero-padded 3x3
// convolution divided by 9, saturated to 12 bits and truncated to 8 bits,
// computed here. Each output must arrive 6 cycles after the window holding
// its neighbourhood is loaded (7 cycles after its last neighbour is driven),
// the flush after the last pixel must hold in_ready low, and out_last must
// mark the last pixel.
module tb_lpf;
  import ip_pkg::*;
  localparam int ROWS = 5, COLS = 7;

  logic clk = 0, rst_n = 0, start = 0;
  kernel_t kernel;
  logic in_valid = 0, in_ready;
  logic [11:0] in_data = '0;
  logic out_valid, out_last;
  logic [7:0] out_data;
  int checks = 0, failures = 0, cyc = 0, flush_cycles = 0;

  lpf #(.PIX_W(12), .OUT_W(8), .MAX_COLS(8), .DIM_W(12)) dut (
    .clk, .rst_n, .start, .cfg_rows(12'(ROWS)), .cfg_cols(12'(COLS)), .kernel,
    .in_valid, .in_ready, .in_data, .out_valid, .out_last, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int img [ROWS][COLS];
  int exp_val[$], exp_cyc[$], exp_last[$];

  function automatic int ref_pix(int r, int c);
    longint acc = 0;
    int q;
    for (int i = -1; i <= 1; i++)
      for (int j = -1; j <= 1; j++)
        if (r+i >= 0 && r+i < ROWS && c+j >= 0 && c+j < COLS)
          acc += img[r+i][c+j] * kernel[3*(i+1) + (j+1)];
    q = int'(acc / 9);
    if (q > 4095) q = 4095;
    return q >> 4;
  endfunction

  always @(negedge clk) begin
    if (dut.flushing) begin
      flush_cycles++;
      checks++;
      if (in_ready) begin failures++; $display("in_ready high during flush"); end
    end
    if (out_valid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        automatic int v = exp_val.pop_front();
        automatic int c = exp_cyc.pop_front();
        automatic int l = exp_last.pop_front();
        if (out_data != 8'(v) || cyc != c || out_last != l[0]) begin
          failures++;
          $display("FAIL got %0d @%0d last=%0b, expected %0d @%0d last=%0d", out_data, cyc, out_last, v, c, l);
        end
      end
    end
  end

  task automatic run_frame(input int mode);
    int k = 0, last_cyc;
    for (int i = 0; i < 9; i++)
      kernel[i] = (mode == 0) ? 8'd1 : (mode == 1) ? 8'($urandom_range(0, 15)) : 8'd255;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r][c] = (mode == 2) ? 4095 : int'($urandom_range(0, 4095));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (k < ROWS*COLS) begin
      in_valid = (mode != 1) || ($urandom_range(0, 3) != 0);
      in_data  = 12'(img[k / COLS][k % COLS]);
      if (in_valid) begin
        if (!in_ready) begin failures++; $display("not ready"); end
        if (k >= COLS + 1) begin
          exp_val.push_back(ref_pix((k-COLS-1) / COLS, (k-COLS-1) % COLS));
          exp_cyc.push_back(cyc + 7);
          exp_last.push_back(0);
        end
        last_cyc = cyc;
        k++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    for (int j = 0; j < COLS + 1; j++) begin
      automatic int m = ROWS*COLS - COLS - 1 + j;
      exp_val.push_back(ref_pix(m / COLS, m % COLS));
      exp_cyc.push_back(last_cyc + 8 + j);
      exp_last.push_back(m == ROWS*COLS - 1);
    end
    repeat (COLS + 12) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    run_frame(1);
    run_frame(2);
    checks++;
    if (exp_val.size() != 0) begin failures++; $display("missing %0d outputs", exp_val.size()); end
    checks++;
    if (flush_cycles != 4 * (COLS + 1)) begin failures++; $display("flush cycles %0d", flush_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
