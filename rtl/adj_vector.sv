// adj_vector: table of label adjacencies for the software second pass.
//
// The labeling core reports each pair of labels that it finds touching the
// same object. This block appends the pairs to a table of DEPTH 32-bit
// entries ({kept label, other label}), skipping a pair equal to the one just
// stored, since a boundary between two objects repeats the same pair on
// consecutive pixels. count tells how many entries are valid; a pair that
// arrives with the table full is dropped and sets the sticky overflow flag.
// start empties the table.
//
// The host reads the table through an AHB-Lite slave port: entry i sits at
// byte offset 4*i. Reads complete with zero wait states; writes are accepted
// and ignored. The address phase is registered and the entry is returned in
// the data phase.
// The document only names this block and its AHB connection; the table
// layout, de-duplication and bus behaviour are this design's choice.
module adj_vector #(
  parameter int unsigned DEPTH   = 4096,
  parameter int unsigned LABEL_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 pair_valid,
  output logic                 pair_ready,
  input  logic [2*LABEL_W-1:0] pair_data,
  output logic [$clog2(DEPTH):0] count,
  output logic                 overflow,
  // AHB-Lite slave (read-only)
  input  logic                 hsel,
  input  logic [31:0]          haddr,
  input  logic [1:0]           htrans,
  input  logic                 hwrite,
  input  logic                 hready,
  output logic [31:0]          hrdata,
  output logic                 hreadyout,
  output logic                 hresp
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [2*LABEL_W-1:0] table_q [DEPTH];
  logic [2*LABEL_W-1:0] last_pair;
  logic                 have_last;
  logic                 rd_pending;
  logic [AW-1:0]        rd_idx;
  logic                 dup;

  assign pair_ready = 1'b1;
  assign dup        = have_last && pair_data == last_pair;

  always_ff @(posedge clk) begin
    if (pair_valid && !dup && count != (AW+1)'(DEPTH) && !start)
      table_q[count[AW-1:0]] <= pair_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      overflow  <= 1'b0;
      have_last <= 1'b0;
      last_pair <= '0;
    end else if (start) begin
      count     <= '0;
      overflow  <= 1'b0;
      have_last <= 1'b0;
    end else if (pair_valid && !dup) begin
      if (count == (AW+1)'(DEPTH)) begin
        overflow <= 1'b1;
      end else begin
        count     <= count + 1'b1;
        last_pair <= pair_data;
        have_last <= 1'b1;
      end
    end
  end

  // AHB-Lite: register the address phase of a read, answer in the data phase.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      rd_idx     <= '0;
    end else if (hready) begin
      rd_pending <= hsel && htrans[1] && !hwrite;
      rd_idx     <= haddr[AW+1:2];
    end
  end

  assign hrdata    = (rd_pending && ({1'b0, rd_idx} < count)) ? 32'(table_q[rd_idx]) : '0;
  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

endmodule
