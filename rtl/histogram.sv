// histogram: luminance histogram and background-area threshold.
//
// Every valid input pixel increments the counter of its luminance value (256
// hist_mem for 8-bit pixels). When the pixel flagged in_last has been counted the
// core walks the hist_mem from luminance 0 upwards, accumulating their counts,
// and returns as the background-area threshold the first luminance at which
// the cumulative count reaches the user's background pixel count
// (cfg_bg_count). Pixels at or below that luminance form the background.
// The result comes with a one-cycle thr_valid pulse; the hist_mem stay readable
// through rd_addr/rd_data until the next start.
//
// Counting takes one cycle per pixel (read-modify-write of one bin), so the
// core keeps up with one pixel per cycle; start clears all hist_mem in one cycle
// through a per-bin "written" flag. The scan takes 256 cycles after in_last.
// The document says that occurrences are accumulated and compared with a user
// threshold at the end of the image; the cumulative comparison, the scan and
// the clear are this design's reading of that.
module histogram #(
  parameter int unsigned LUM_W  = 8,
  parameter int unsigned HCNT_W = 21
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [HCNT_W-1:0] cfg_bg_count,
  input  logic              in_valid,
  input  logic              in_last,
  input  logic [LUM_W-1:0]  in_data,
  output logic              busy,
  output logic              thr_valid,
  output logic [LUM_W-1:0]  thr_value,
  input  logic [LUM_W-1:0]  rd_addr,
  output logic [HCNT_W-1:0] rd_data
);
  localparam int unsigned BINS = 1 << LUM_W;

  typedef enum logic [1:0] {COUNT, SCAN, FOUND} state_t;

  logic [HCNT_W-1:0] hist_mem [BINS];
  logic [BINS-1:0]   written;
  state_t            state;
  logic [LUM_W-1:0]  scan_idx;
  logic [HCNT_W:0]   cum;
  logic [HCNT_W-1:0] cur_count, scan_count;
  logic              hit;

  assign cur_count  = written[in_data]  ? hist_mem[in_data]  : '0;
  assign scan_count = written[scan_idx] ? hist_mem[scan_idx] : '0;
  assign rd_data    = written[rd_addr]  ? hist_mem[rd_addr]  : '0;
  assign hit        = (cum + (HCNT_W+1)'(scan_count)) >= (HCNT_W+1)'(cfg_bg_count);
  assign busy       = state == SCAN;

  always_ff @(posedge clk) begin
    if (state == COUNT && in_valid && !start) hist_mem[in_data] <= cur_count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written   <= '0;
      state     <= COUNT;
      scan_idx  <= '0;
      cum       <= '0;
      thr_valid <= 1'b0;
      thr_value <= '0;
    end else begin
      thr_valid <= 1'b0;
      if (start) begin
        written  <= '0;
        state    <= COUNT;
      end else begin
        unique case (state)
          COUNT: if (in_valid) begin
            written[in_data] <= 1'b1;
            if (in_last) begin
              state    <= SCAN;
              scan_idx <= '0;
              cum      <= '0;
            end
          end
          SCAN: begin
            cum <= cum + (HCNT_W+1)'(scan_count);
            if (hit || scan_idx == LUM_W'(BINS - 1)) begin
              state     <= FOUND;
              thr_valid <= 1'b1;
              thr_value <= scan_idx;
            end else begin
              scan_idx <= scan_idx + 1'b1;
            end
          end
          FOUND: ;
          default: state <= COUNT;
        endcase
      end
    end
  end

endmodule
