// Self-checking testbench of serializer: a stream of random 16-bit labels,
// with random input gaps and output stalls, must come out as 32-bit words
// holding two labels each (first label in the low half); a flush after an
// odd number of labels must send the last label alone with a zero top half.
module tb_serializer;
  logic clk = 0, rst_n = 0, start = 0, flush = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, empty;
  logic [15:0] in_data = '0;
  logic [31:0] out_data;
  int checks = 0, failures = 0, stalls = 0;
  logic [31:0] exp_words[$];

  serializer #(.IN_W(16), .RATIO(2)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_words.size() == 0 || out_data != exp_words[0]) begin
        failures++; $display("FAIL word %h", out_data);
      end
      if (exp_words.size()) void'(exp_words.pop_front());
    end
  end

  task automatic stream(input int n);
    logic [15:0] lo = '0;
    for (int i = 0; i < n; i++) begin
      automatic logic [15:0] v = 16'($urandom);
      in_valid = 1; in_data = v;
      if (i % 2 == 0) lo = v; else exp_words.push_back({v, lo});
      do begin
        out_ready = $urandom_range(0, 2) != 0;
        @(posedge clk);
      end while (!in_ready);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    if (n % 2) exp_words.push_back({16'd0, lo});
    out_ready = 1;
    flush = 1; @(negedge clk); flush = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    stream(40);
    stream(23);
    checks++;
    if (exp_words.size() != 0 || !empty) begin failures++; $display("words left"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
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
