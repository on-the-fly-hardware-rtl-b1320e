// binning: 2x2 pixel binning by arithmetic average.
//
// Each output pixel is the mean of a 2x2 square of input pixels,
// P'(r/2,c/2) = (P(r,c) + P(r,c+1) + P(r+1,c) + P(r+1,c+1)) / 4, so an R x C
// image becomes R/2 x C/2. Pixels arrive one per valid cycle in raster order.
// The first adder sums each horizontal pair (ADD). On even rows the pair sum
// is parked in a line buffer of C/2 entries; on odd rows the second adder
// adds the parked sum of the row above and shifts right by two (ADD+RSH),
// which truncates. Two adders and a 2-cycle latency follow the document; the
// document coordinates rows with four FIFOs, whereas this design keeps one
// line buffer of pair sums, which needs half the storage.
//
// Interface: in_valid/in_data (no back-pressure), cfg_cols = input columns
// (even), start clears the row/column position at the start of a frame.
// Timing: the output for a 2x2 square is valid 2 cycles after the cycle in
// which its last pixel (bottom right) is presented.
module binning #(
  parameter int unsigned PIX_W    = 12,
  parameter int unsigned MAX_COLS = 2048,
  parameter int unsigned DIM_W    = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DIM_W-1:0] cfg_cols,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_data,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_data
);
  localparam int unsigned LB_DEPTH = MAX_COLS / 2;
  localparam int unsigned IDX_W    = $clog2(LB_DEPTH);

  logic [DIM_W-1:0] col;
  logic             row_odd;
  logic [PIX_W-1:0] left_pix;              // even-column pixel of the pair

  // stage 1: horizontal pair sum
  logic             hs_valid;
  logic             hs_odd_row;
  logic [IDX_W-1:0] hs_idx;
  logic [PIX_W:0]   hs_sum;

  logic [PIX_W:0]   line_buf [LB_DEPTH];   // pair sums of the even row
  logic [PIX_W+1:0] quad_sum;

  // position in the frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col     <= '0;
      row_odd <= 1'b0;
    end else if (start) begin
      col     <= '0;
      row_odd <= 1'b0;
    end else if (in_valid) begin
      if (col == cfg_cols - 1'b1) begin
        col     <= '0;
        row_odd <= ~row_odd;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_pix   <= '0;
      hs_valid   <= 1'b0;
      hs_odd_row <= 1'b0;
      hs_idx     <= '0;
      hs_sum     <= '0;
    end else begin
      hs_valid <= 1'b0;
      if (in_valid && !start) begin
        if (!col[0]) begin
          left_pix <= in_data;
        end else begin
          hs_valid   <= 1'b1;
          hs_odd_row <= row_odd;
          hs_idx     <= IDX_W'(col >> 1);
          hs_sum     <= {1'b0, left_pix} + {1'b0, in_data};
        end
      end
    end
  end

  assign quad_sum = {1'b0, hs_sum} + {1'b0, line_buf[hs_idx]};

  // stage 2: park the pair sum (even row) or add and shift (odd row)
  always_ff @(posedge clk) begin
    if (hs_valid && !hs_odd_row) line_buf[hs_idx] <= hs_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= hs_valid && hs_odd_row;
      if (hs_valid && hs_odd_row) out_data <= quad_sum[PIX_W+1:2];
    end
  end

endmodule
