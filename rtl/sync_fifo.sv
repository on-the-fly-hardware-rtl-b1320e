// sync_fifo: single-clock FIFO used between pipeline stages.
//
// The pipeline inserts one of these after binning (first stage) and one in
// front of the labeling core (second stage) so that a fast producer without
// back-pressure can feed a slower consumer. Writes are accepted whenever
// wr_en is high; a write into a full FIFO is dropped and sets the sticky
// overflow flag, which only clear or reset removes. Storage is an array of
// DEPTH words (DEPTH a power of two) with read and write pointers one bit
// wider than the address. The output is first-word-fall-through: out_data is
// valid whenever out_valid is high and is removed by out_ready.
// The document gives the purpose of the FIFOs, not their depth or protocol;
// depth, the valid/ready read side and the overflow flag are this design's.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  output logic                     full,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data,
  output logic [$clog2(DEPTH):0]   level,
  output logic                     overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;
  logic         do_wr, do_rd;

  assign level     = wr_ptr - rd_ptr;
  assign full      = level == (AW+1)'(DEPTH);
  assign out_valid = level != '0;
  assign out_data  = mem[rd_ptr[AW-1:0]];
  assign do_rd     = out_valid && out_ready;
  assign do_wr     = wr_en && !full;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  // The pointers never drift further apart than the FIFO is deep.
  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
