// Self-checking testbench of ahb_master: random words offered with random
// gaps are written through a slave model that inserts random wait states;
// every word must land at base + 4*i, in order, each exactly once, and the
// master must report idle and the right word count at the end. Back-to-back
// words with no wait state must complete one per cycle.
module tb_ahb_master;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] base_addr = 32'h4000_0100;
  logic in_valid = 0, in_ready, idle, error;
  logic [31:0] in_data = '0, words_written;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite, hready, hresp;
  logic [2:0] hsize, hburst;
  int checks = 0, failures = 0;
  logic [31:0] sent[$];

  ahb_master #(.DW(32)) dut (.*);
  ahb_mem_model #(.WAIT_PCT(30)) slave (.clk, .rst_n, .haddr, .htrans, .hwrite, .hsize,
                                        .hwdata, .hready, .hresp);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send(input int n, input bit gaps);
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = $urandom;
      do @(posedge clk); while (!in_ready);
      sent.push_back(in_data);
      @(negedge clk);
      in_valid = 0;
      if (gaps && $urandom_range(0, 1)) @(negedge clk);
    end
  endtask

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    send(50, 1);
    send(50, 0);
    repeat (10) @(negedge clk);
    chk(idle, "idle at end");
    chk(words_written == 32'(sent.size()), "word count");
    chk(slave.writes == sent.size(), "slave write count");
    chk(slave.waits > 0, "wait states exercised");
    foreach (sent[i]) chk(slave.read_word(base_addr + 32'(4*i)) == sent[i], $sformatf("word %0d", i));
    // no wait states: 20 back-to-back words are taken in 20 cycles
    slave.wait_pct = 0;
    repeat (2) @(negedge clk);
    t0 = cyc;
    send(20, 0);
    t1 = cyc;
    chk((t1 - t0) == 20, $sformatf("one word per cycle (%0d)", t1 - t0));
    repeat (5) @(negedge clk);
    chk(idle && words_written == 32'(sent.size()), "all written");
    foreach (sent[i]) chk(slave.read_word(base_addr + 32'(4*i)) == sent[i], $sformatf("word %0d", i));
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
