// Self-checking testbench of binning: random 12-bit frames, with and without
// gaps in the input stream, compared against a 2x2 mean computed here; the
// output of every square must appear exactly 2 cycles after its last pixel.
module tb_binning;
  localparam int unsigned PIX_W = 12;
  localparam int COLS = 12, ROWS = 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic in_valid = 0;
  logic [PIX_W-1:0] in_data = '0;
  logic out_valid;
  logic [PIX_W-1:0] out_data;
  int checks = 0, failures = 0, cyc = 0;

  binning #(.PIX_W(PIX_W), .MAX_COLS(16), .DIM_W(12)) dut (
    .clk, .rst_n, .start, .cfg_cols(12'(COLS)), .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_val[$], exp_cyc[$];
  logic [PIX_W-1:0] img [ROWS][COLS];

  // monitor: outputs are compared half a cycle after the edge that set them
  always @(negedge clk) if (out_valid) begin
    checks++;
    if (exp_val.size() == 0) begin
      failures++; $display("unexpected output %0d", out_data);
    end else begin
      automatic int v = exp_val.pop_front();
      automatic int c = exp_cyc.pop_front();
      if (out_data !== PIX_W'(v) || cyc != c) begin
        failures++;
        $display("FAIL got %0d @%0d expected %0d @%0d", out_data, cyc, v, c);
      end
    end
  end

  task automatic run_frame(input bit gaps, input bit extreme);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        img[r][c] = extreme ? ((r + c) % 2 ? '1 : PIX_W'($urandom_range(4090, 4095)))
                            : PIX_W'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        while (gaps && $urandom_range(0, 2) == 0) begin
          in_valid = 0; @(negedge clk);
        end
        in_valid = 1; in_data = img[r][c];
        if (r % 2 == 1 && c % 2 == 1) begin
          exp_val.push_back((int'(img[r-1][c-1]) + img[r-1][c] + img[r][c-1] + img[r][c]) / 4);
          exp_cyc.push_back(cyc + 2);
        end
        @(negedge clk);
      end
    in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(0, 0);
    run_frame(1, 0);
    run_frame(0, 1);
    checks++;
    if (exp_val.size() != 0) begin failures++; $display("missing %0d outputs", exp_val.size()); end
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
