// Self-checking testbench of sync_fifo: random writes and reads against a
// queue model, filling the FIFO to full, checking that a write into a full
// FIFO is dropped and sets the sticky overflow flag, and that clear empties
// the FIFO and clears the flag.
module tb_sync_fifo;
  localparam int W = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, out_ready = 0;
  logic [W-1:0] wr_data = '0, out_data;
  logic full, out_valid, overflow;
  logic [3:0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one cycle: inputs set at negedge, model updated with what the edge does
  task automatic cycle(input bit wr, input bit rd);
    wr_en = wr; wr_data = W'($urandom); out_ready = rd;
    #1;
    chk(out_valid == (model.size() != 0), "out_valid");
    chk(level == 4'(model.size()), "level");
    chk(full == (model.size() == DEPTH), "full");
    if (out_valid) chk(out_data == model[0], "data");
    begin
      automatic bit was_full = model.size() == DEPTH;
      @(posedge clk);
      if (rd && model.size() != 0) void'(model.pop_front());
      if (wr && !was_full) model.push_back(wr_data);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) cycle($urandom_range(0, 1), $urandom_range(0, 2) == 0);
    // fill to full and push one more: dropped, overflow set
    while (model.size() < DEPTH) cycle(1, 0);
    cycle(1, 0);
    chk(overflow, "overflow set");
    chk(model.size() == DEPTH, "model full");
    for (int i = 0; i < 100; i++) cycle($urandom_range(0, 1), $urandom_range(0, 1));
    chk(overflow, "overflow sticky");
    clear = 1; @(negedge clk); clear = 0; model.delete();
    chk(!overflow && !out_valid && level == 0, "clear");
    for (int i = 0; i < 200; i++) cycle($urandom_range(0, 1), $urandom_range(0, 1));
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
