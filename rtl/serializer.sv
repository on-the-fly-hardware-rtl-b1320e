// serializer: packs 16-bit labels into 32-bit bus words.
//
// Labels leave the labeling core one per pixel; the AHB master moves 32-bit
// words. The serializer collects two consecutive labels into one word, the
// first in bits 15:0 and the second in bits 31:16, and offers the word with
// valid/ready. A flush pulse at the end of a frame sends a half-filled word
// with its upper half zero. The input is stalled (in_ready low) while a full
// word waits for the bus. The document only names the block; the packing
// order and the flush are this design's choice.
module serializer #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned RATIO = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  flush,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [IN_W-1:0]       in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [IN_W*RATIO-1:0] out_data,
  output logic                  empty
);
  localparam int unsigned CW = $clog2(RATIO + 1);
  localparam int unsigned IW = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [IN_W-1:0] slot [RATIO];
  logic [CW-1:0]   fill;
  logic            word_full, flushing;

  assign word_full = fill == CW'(RATIO);
  assign out_valid = word_full || (flushing && fill != '0);
  assign in_ready  = !out_valid;
  assign empty     = fill == '0;

  always_comb begin
    for (int i = 0; i < RATIO; i++)
      out_data[i*IN_W +: IN_W] = (CW'(i) < fill) ? slot[i] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill     <= '0;
      flushing <= 1'b0;
      for (int i = 0; i < RATIO; i++) slot[i] <= '0;
    end else if (start) begin
      fill     <= '0;
      flushing <= 1'b0;
    end else begin
      if (flush && fill != '0) flushing <= 1'b1;
      if (out_valid && out_ready) begin
        fill     <= '0;
        flushing <= 1'b0;
      end else if (in_valid && in_ready) begin
        slot[IW'(fill)] <= in_data;
        fill       <= fill + 1'b1;
      end
    end
  end

endmodule
