// Self-checking testbench of adj_vector: random label pairs (with immediate
// repeats) are pushed into a small table; the table is then read back over
// the AHB-Lite slave port and compared with a de-duplicated list kept here.
// Filling past the table size must set the overflow flag and keep count at
// the depth; start must empty the table.
module tb_adj_vector;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, start = 0, pair_valid = 0, pair_ready;
  logic [31:0] pair_data = '0;
  logic [4:0] count;
  logic overflow;
  logic hsel = 0, hwrite = 0, hready, hreadyout, hresp;
  logic [31:0] haddr = '0, hrdata;
  logic [1:0] htrans = 2'b00;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  adj_vector #(.DEPTH(DEPTH), .LABEL_W(16)) dut (.*);
  assign hready = hreadyout;

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic push(input logic [31:0] p);
    pair_valid = 1; pair_data = p;
    if ((model.size() == 0 || model[$] != p) && model.size() < DEPTH) model.push_back(p);
    @(negedge clk);
    pair_valid = 0;
  endtask

  // back-to-back AHB reads, one entry per cycle
  task automatic read_all(input int n);
    for (int i = 0; i < n; i++) begin
      hsel = 1; htrans = 2'b10; haddr = 32'(4*i); hwrite = 0;
      @(negedge clk);
      // data phase of entry i (the address phase of i+1 is set next)
      chk(hrdata == model[i], $sformatf("entry %0d: %h vs %h", i, hrdata, model[i]));
    end
    hsel = 0; htrans = 2'b00;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < 10; i++) begin
      automatic logic [31:0] p = {16'($urandom_range(1, 50)), 16'($urandom_range(1, 50))};
      push(p);
      if (i % 3 == 0) push(p);    // repeated pair is skipped
    end
    chk(count == 5'(model.size()), "count");
    read_all(model.size());
    chk(!overflow, "no overflow yet");
    for (int i = 0; i < 20; i++) push({16'(i + 100), 16'(i + 1)});
    chk(count == 5'(DEPTH), "count saturates");
    chk(overflow, "overflow flagged");
    read_all(DEPTH);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(count == 0 && !overflow, "start clears");
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
