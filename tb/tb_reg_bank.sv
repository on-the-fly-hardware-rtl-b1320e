// Self-checking testbench of reg_bank: reset values, write/read-back of every
// configuration register, the one-cycle start pulse, read-only status and
// histogram windows, the unmapped-address error, and the automatic copy of
// the histogram threshold into THR only when auto mode is on.
module tb_reg_bank;
  import ip_pkg::*;
  logic clk = 0, rst_n = 0, bus_wr = 0, bus_err, start, hist_thr_valid = 0;
  logic [9:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata, adj_count = 32'd77;
  cfg_t cfg;
  status_t status = 8'hA5;
  logic [7:0] hist_thr = '0, hist_addr;
  logic [20:0] hist_data;
  logic [15:0] label_count = 16'd321;
  int checks = 0, failures = 0, starts = 0;

  reg_bank dut (.*);
  assign hist_data = 21'(hist_addr) * 3 + 1;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(input logic [9:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk);
    bus_wr = 0;
  endtask
  task automatic rd(input logic [9:0] a, output logic [31:0] v);
    bus_addr = a;
    #1;
    v = bus_rdata;
  endtask

  initial begin
    logic [31:0] v, r0, r1, r2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cfg.in_rows == 2048 && cfg.in_cols == 2048, "reset size");
    chk(cfg.kernel == {9{8'd1}} && cfg.thr == 8'd32 && !cfg.auto_thr, "reset kernel/thr");
    wr(REG_SIZE, {4'd0, 12'd480, 4'd0, 12'd640});
    rd(REG_SIZE, r0);
    v = r0; #0;
    chk(v == {4'd0, 12'd480, 4'd0, 12'd640} && cfg.in_rows == 480 && cfg.in_cols == 640, "size");
    wr(REG_KERNEL0, 32'h04030201); wr(REG_KERNEL1, 32'h08070605); wr(REG_KERNEL2, 32'h09);
    for (int i = 0; i < 9; i++) chk(cfg.kernel[i] == 8'(i + 1), $sformatf("kernel %0d", i));
    rd(REG_KERNEL1, r0);
    chk(r0 == 32'h08070605, "kernel readback");
    wr(REG_THR, 32'd100);
    rd(REG_THR, r0);
    chk(cfg.thr == 100 && r0 == 100, "thr");
    wr(REG_BGCOUNT, 32'd123456);
    rd(REG_BGCOUNT, r0);
    chk(cfg.bg_count == 123456 && r0 == 123456, "bgcount");
    wr(REG_DSTADDR, 32'h8000_0000); chk(cfg.dst_addr == 32'h8000_0000, "dst");
    rd(REG_STATUS, r0);
    rd(REG_LABELS, r1);
    rd(REG_ADJCOUNT, r2);
    chk(r0 == 32'hA5 && r1 == 321 && r2 == 77, "status regs");
    rd(10'h105, r0);
    rd(10'h1FF, r1);
    chk(r0 == 16 && r1 == 255 * 3 + 1, "histogram window");
    rd(10'h050, v); chk(bus_err, "unmapped error");
    rd(REG_THR, v); chk(!bus_err, "mapped no error");
    wr(REG_STATUS, 32'hFFFF_FFFF);
    rd(REG_STATUS, r0);
    chk(r0 == 32'hA5, "status read-only");
    // start pulse
    wr(REG_CTRL, 32'h1);
    @(negedge clk);
    chk(starts == 1 && !start, $sformatf("single start pulse (%0d)", starts));
    // threshold from histogram: ignored in manual mode, taken in auto mode
    hist_thr = 8'd77; hist_thr_valid = 1; @(negedge clk); hist_thr_valid = 0;
    rd(REG_HISTTHR, r0);
    chk(cfg.thr == 100 && r0 == 77, "manual mode keeps T");
    wr(REG_CTRL, 32'h2);
    chk(cfg.auto_thr && starts == 1, "auto mode");
    hist_thr = 8'd55; hist_thr_valid = 1; @(negedge clk); hist_thr_valid = 0;
    rd(REG_HISTTHR, r0);
    chk(cfg.thr == 55 && r0 == 55, "auto mode loads T");
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
