// Self-checking testbench of apb_slave: APB3 writes and reads against a
// small register model on the bank side (64 registers, of which offsets 48
// and up are unmapped). Writes must reach the bank exactly once, in the
// access phase; reads must return the register in the access phase; access
// to an unmapped register must end with PSLVERR and must not write.
module tb_apb_slave;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic bus_wr, bus_err;
  logic [9:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic [31:0] regs [64];
  int checks = 0, failures = 0, bank_writes = 0;

  apb_slave #(.AW(12), .DW(32)) dut (.pclk(clk), .presetn(rst_n), .*);

  assign bus_rdata = regs[bus_addr[5:0]];
  assign bus_err   = bus_addr >= 10'd48;
  always @(posedge clk) if (bus_wr) begin regs[bus_addr[5:0]] <= bus_wdata; bank_writes++; end

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic apb(input bit wr, input logic [11:0] a, input logic [31:0] d,
                     output logic [31:0] rdata, output logic err);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    #1;
    while (!pready) @(negedge clk);
    rdata = prdata; err = pslverr;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] model [64];
    logic [31:0] r;
    logic e;
    foreach (regs[i]) begin regs[i] = 32'(i) * 32'h01010101; model[i] = regs[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int idx = $urandom_range(0, 63);
      automatic bit wr = $urandom_range(0, 1);
      automatic logic [31:0] d = $urandom;
      automatic int nwr_before = bank_writes;
      apb(wr, 12'(idx * 4), d, r, e);
      chk(e == (idx >= 48), $sformatf("pslverr at %0d", idx));
      if (wr) begin
        chk(bank_writes == nwr_before + (idx < 48 ? 1 : 0), "write count");
        if (idx < 48) model[idx] = d;
      end else begin
        chk(bank_writes == nwr_before, "read does not write");
        chk(idx >= 48 || r == model[idx], $sformatf("read %0d: %h vs %h", idx, r, model[idx]));
      end
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    foreach (model[i]) chk(regs[i] == model[i], "final contents");
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
