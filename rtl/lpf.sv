// lpf: 3x3 low-pass convolution filter with colour depth compression.
//
// For every pixel the filter computes
//   P'(r,c) = (A(r-1) + A(r) + A(r+1)) / 9,
//   A(r+i)  = sum over j of P(r+i, c+j) * K(1+i, 1+j),  i,j in {-1,0,1},
// with a user kernel K, then compresses the 12-bit result to 8 bits by
// dropping its 4 least significant bits (combinational, no extra latency).
// With an all-ones kernel it is a 3x3 mean, which removes one-pixel stars
// from the deep-space background.
//
// Two line buffers of C entries delay the input by one and by two rows, so
// three taps x[k], x[k-C], x[k-2C] feed a 3x3 window of shift registers whose
// centre is x[k-C-1]. Neighbours outside the image are taken as zero (the
// document does not say how borders are handled; zero padding is this
// design's choice). The window is complete C+1 pixels after its centre
// arrives, so once the last pixel of a frame has been accepted the filter
// runs C+1 flush steps on its own, with in_ready low, to emit the last row.
//
// Datapath, one pixel per cycle, as in the document's pipeline table:
//   cycle 0  nine products M0..M8
//   cycle 1  A0..A3 = pair sums of M0..M7, M8 carried
//   cycle 2  two sums of A0..A3
//   cycle 3  one sum
//   cycle 4  add M8
//   cycle 5  divide by 9, saturate to 12 bits, truncate to 8 bits -> dout
// Timing: out_valid for a centre pixel is high 6 cycles after the step that
// completed its window; out_last marks the last pixel of the frame.
// The kernel coefficient width and the saturation are this design's choice.
module lpf
  import ip_pkg::kernel_t, ip_pkg::COEF_W;
#(
  parameter int unsigned PIX_W    = 12,
  parameter int unsigned OUT_W    = 8,
  parameter int unsigned MAX_COLS = 1024,
  parameter int unsigned DIM_W    = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DIM_W-1:0] cfg_rows,
  input  logic [DIM_W-1:0] cfg_cols,
  input  kernel_t          kernel,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_data,
  output logic             out_valid,
  output logic             out_last,
  output logic [OUT_W-1:0] out_data
);
  localparam int unsigned AW    = $clog2(MAX_COLS);
  localparam int unsigned CNT_W = 2*DIM_W + 1;
  localparam int unsigned PROD_W = PIX_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + 4;

  // ---------------------------------------------------------------- control
  logic [CNT_W-1:0] k;            // step index: input pixel k or flush step
  logic [CNT_W-1:0] total;        // R*C
  logic             active;       // a frame is running
  logic             flushing;
  logic             step;
  logic [AW-1:0]    lb_ptr;
  logic [DIM_W-1:0] orow, ocol;   // position of the centre pixel

  assign total    = CNT_W'(cfg_rows) * CNT_W'(cfg_cols);
  assign flushing = active && (k >= total);
  assign in_ready = active && !flushing;
  assign step     = (in_valid && in_ready) || flushing;

  logic centre_ok;                // the step completes a window
  assign centre_ok = k >= CNT_W'(cfg_cols) + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= '0;
      active <= 1'b0;
      lb_ptr <= '0;
      orow   <= '0;
      ocol   <= '0;
    end else if (start) begin
      k      <= '0;
      active <= 1'b1;
      lb_ptr <= '0;
      orow   <= '0;
      ocol   <= '0;
    end else if (step) begin
      k      <= k + 1'b1;
      lb_ptr <= (lb_ptr == AW'(cfg_cols - 1'b1)) ? '0 : lb_ptr + 1'b1;
      if (centre_ok) begin
        if (ocol == cfg_cols - 1'b1) begin
          ocol <= '0;
          orow <= orow + 1'b1;
        end else begin
          ocol <= ocol + 1'b1;
        end
        if (orow == cfg_rows - 1'b1 && ocol == cfg_cols - 1'b1) active <= 1'b0;
      end
    end
  end

  // ------------------------------------------------- line buffers and window
  logic [PIX_W-1:0] lb1 [MAX_COLS];   // x[k-C]
  logic [PIX_W-1:0] lb2 [MAX_COLS];   // x[k-2C]
  logic [PIX_W-1:0] tap0, tap1, tap2;
  logic [PIX_W-1:0] win [3][3];       // win[row][col], row 0 = top, col 2 = newest
  logic [3:0]       mask;             // {right, left, bottom, top} borders
  logic             win_valid, win_last;

  assign tap0 = flushing ? '0 : in_data;
  assign tap1 = lb1[lb_ptr];
  assign tap2 = lb2[lb_ptr];

  always_ff @(posedge clk) begin
    if (step) begin
      lb1[lb_ptr] <= tap0;
      lb2[lb_ptr] <= tap1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] <= '0;
      mask      <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else begin
      win_valid <= step && centre_ok && !start;
      if (step) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= tap2;
        win[1][2] <= tap1;
        win[2][2] <= tap0;
        mask      <= {ocol == cfg_cols - 1'b1, ocol == '0,
                      orow == cfg_rows - 1'b1, orow == '0};
        win_last  <= (orow == cfg_rows - 1'b1) && (ocol == cfg_cols - 1'b1);
      end
    end
  end

  // ------------------------------------------------------ arithmetic pipeline
  logic [PIX_W-1:0]  wpix [9];
  logic [PROD_W-1:0] m_q  [9];
  logic [SUM_W-1:0]  a1_q [5];        // A0..A3, M8
  logic [SUM_W-1:0]  a2_q [3];        // two sums, M8
  logic [SUM_W-1:0]  a3_q [2];        // one sum, M8
  logic [SUM_W-1:0]  a4_q;            // full sum
  logic [SUM_W-1:0]  quot;
  logic [5:0]        v_q, l_q;        // valid / last per stage

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        automatic logic zero = (r == 0 && mask[0]) || (r == 2 && mask[1]) ||
                               (c == 0 && mask[2]) || (c == 2 && mask[3]);
        wpix[3*r+c] = zero ? '0 : win[r][c];
      end
  end

  assign quot = a4_q / SUM_W'(9);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      l_q <= '0;
      for (int i = 0; i < 9; i++) m_q[i] <= '0;
      for (int i = 0; i < 5; i++) a1_q[i] <= '0;
      for (int i = 0; i < 3; i++) a2_q[i] <= '0;
      a3_q[0] <= '0; a3_q[1] <= '0;
      a4_q     <= '0;
      out_data <= '0;
    end else begin
      v_q <= {v_q[4:0], win_valid};
      l_q <= {l_q[4:0], win_valid && win_last};
      // cycle 0: products
      for (int i = 0; i < 9; i++) m_q[i] <= PROD_W'(wpix[i]) * PROD_W'(kernel[i]);
      // cycle 1: pair sums
      for (int i = 0; i < 4; i++) a1_q[i] <= SUM_W'(m_q[2*i]) + SUM_W'(m_q[2*i+1]);
      a1_q[4] <= SUM_W'(m_q[8]);
      // cycle 2
      a2_q[0] <= a1_q[0] + a1_q[1];
      a2_q[1] <= a1_q[2] + a1_q[3];
      a2_q[2] <= a1_q[4];
      // cycle 3
      a3_q[0] <= a2_q[0] + a2_q[1];
      a3_q[1] <= a2_q[2];
      // cycle 4
      a4_q <= a3_q[0] + a3_q[1];
      // cycle 5: divide, saturate, compress
      out_data <= (quot > SUM_W'({PIX_W{1'b1}})) ? {OUT_W{1'b1}}
                                                 : quot[PIX_W-1 -: OUT_W];
    end
  end

  assign out_valid = v_q[5];
  assign out_last  = l_q[5];

endmodule
