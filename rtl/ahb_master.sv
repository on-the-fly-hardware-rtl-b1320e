// ahb_master: AHB-Lite write master that stores the label image in SDRAM.
//
// 32-bit words arrive with valid/ready and are written to consecutive word
// addresses starting at the base address latched on start. Each word is one
// SINGLE, NONSEQ, word-size write. The bus is pipelined: the address phase of
// the next word overlaps the data phase of the previous one, so one word per
// cycle is possible when the slave keeps HREADY high; HREADY low stretches
// both phases. The word is taken from upstream (in_ready) on the clock edge
// that ends its address phase, and its data is held in HWDATA during the
// following data phase. An ERROR response sets the sticky error flag and the
// transfer is not retried. idle is high when no transfer is pending.
// The document shows an AHB master writing to the SDRAM controller over a
// point-to-point AHB link; the transfer type and addressing are this
// design's choice.
module ahb_master #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   base_addr,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          idle,
  output logic          error,
  output logic [31:0]   words_written,
  // AHB-Lite master
  output logic [31:0]   haddr,
  output logic [1:0]    htrans,
  output logic          hwrite,
  output logic [2:0]    hsize,
  output logic [2:0]    hburst,
  output logic [DW-1:0] hwdata,
  input  logic          hready,
  input  logic          hresp
);
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;

  logic [31:0]   addr_q;
  logic          data_phase;
  logic [DW-1:0] wdata_q;

  assign htrans   = in_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign haddr    = addr_q;
  assign hwrite   = 1'b1;
  assign hsize    = 3'b010;   // word
  assign hburst   = 3'b000;   // SINGLE
  assign hwdata   = wdata_q;
  assign in_ready = hready;
  assign idle     = !in_valid && !data_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q        <= '0;
      data_phase    <= 1'b0;
      wdata_q       <= '0;
      error         <= 1'b0;
      words_written <= '0;
    end else if (start) begin
      addr_q        <= base_addr;
      error         <= 1'b0;
      words_written <= '0;
    end else begin
      if (data_phase && hresp) error <= 1'b1;
      if (hready) begin
        if (data_phase) words_written <= words_written + 1'b1;
        data_phase <= in_valid;
        if (in_valid) begin
          wdata_q <= in_data;
          addr_q  <= addr_q + 32'd4;
        end
      end
    end
  end

  // An issued transfer keeps its address until the slave takes it.
  assert property (@(posedge clk) disable iff (!rst_n || start)
                   htrans == HTRANS_NONSEQ && !hready |=> htrans == HTRANS_NONSEQ && $stable(haddr));

endmodule
