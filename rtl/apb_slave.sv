// apb_slave: APB3 slave port of the register bank.
//
// The host reaches the register bank through the system's AHB-to-APB bridge.
// Every transfer takes the minimum two cycles (PREADY is always high): the
// setup phase (PSEL high, PENABLE low) samples the register and its error
// flag into PRDATA/PSLVERR, and the access phase (PENABLE high) commits a
// write to the register bank. Offsets are byte addresses; bits 11:2 select
// the 32-bit register. An access to an unmapped offset completes with
// PSLVERR high and a write to it has no effect.
// The document names the APB slave interface; the APB3 signal set and the
// zero-wait-state timing are this design's choice.
module apb_slave #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 32
) (
  input  logic          pclk,
  input  logic          presetn,
  input  logic          psel,
  input  logic          penable,
  input  logic          pwrite,
  input  logic [AW-1:0] paddr,
  input  logic [DW-1:0] pwdata,
  output logic [DW-1:0] prdata,
  output logic          pready,
  output logic          pslverr,
  // register bank side
  output logic          bus_wr,
  output logic [AW-3:0] bus_addr,
  output logic [DW-1:0] bus_wdata,
  input  logic [DW-1:0] bus_rdata,
  input  logic          bus_err
);
  logic setup, err_q;

  assign setup     = psel && !penable;
  assign bus_addr  = paddr[AW-1:2];
  assign bus_wdata = pwdata;
  assign bus_wr    = psel && penable && pwrite && !err_q;
  assign pready    = 1'b1;
  assign pslverr   = psel && penable && err_q;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      prdata <= '0;
      err_q  <= 1'b0;
    end else if (setup) begin
      prdata <= pwrite ? '0 : bus_rdata;
      err_q  <= bus_err;
    end
  end

  // APB: the access phase follows a setup phase with the same address.
  assert property (@(posedge pclk) disable iff (!presetn)
                   setup |=> psel && penable && $stable(paddr) && $stable(pwrite));

endmodule
