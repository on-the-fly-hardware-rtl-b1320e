// Shared types and constants of the on-the-fly image processing pipeline.
//
// The pipeline reads 16-bit sensor words whose 12 low bits carry the pixel,
// bins them 2x2, low-pass filters them and compresses them to 8 bits, builds a
// luminance histogram, binarizes and labels the white pixels with 16-bit
// labels. The widths below follow the document (16-bit words, 12-bit colour
// depth compressed to 8 bits, 16-bit labels, 2048x2048 input). The register
// map and the configuration struct are this design's own choice.
package ip_pkg;

  localparam int unsigned IN_W    = 16;  // sensor word width
  localparam int unsigned PIX_W   = 12;  // colour depth before compression
  localparam int unsigned LUM_W   = 8;   // colour depth after compression
  localparam int unsigned LABEL_W = 16;  // target label ("colour") width
  localparam int unsigned DIM_W   = 12;  // width of a row/column count (up to 2048)
  localparam int unsigned COEF_W  = 8;   // unsigned low-pass kernel coefficient
  localparam int unsigned HCNT_W  = 21;  // histogram bin counter (1024*1024 pixels)
  localparam int unsigned BUS_W   = 32;  // AHB / APB data width

  typedef logic [COEF_W-1:0] coef_t;
  typedef coef_t [8:0]       kernel_t;   // index 3*row + col, K(0,0) first

  // Equivalence between two labels found by the first labeling pass.
  typedef struct packed {
    logic [LABEL_W-1:0] hi;  // label that was kept for the pixel
    logic [LABEL_W-1:0] lo;  // other label touching the same pixel
  } label_pair_t;

  // Configuration driven by the register bank.
  typedef struct packed {
    logic [DIM_W-1:0]  in_rows;   // rows of the sensor image (even)
    logic [DIM_W-1:0]  in_cols;   // columns of the sensor image (even)
    kernel_t           kernel;    // low-pass kernel
    logic              auto_thr;  // 1: binarization threshold from histogram
    logic [LUM_W-1:0]  thr;       // binarization threshold T
    logic [HCNT_W-1:0] bg_count;  // background-area pixel count
    logic [BUS_W-1:0]  dst_addr;  // SDRAM base address of the label image
  } cfg_t;

  // Register word addresses (byte address >> 2).
  localparam logic [9:0] REG_CTRL     = 10'h000;
  localparam logic [9:0] REG_STATUS   = 10'h001;
  localparam logic [9:0] REG_SIZE     = 10'h002;
  localparam logic [9:0] REG_KERNEL0  = 10'h003;
  localparam logic [9:0] REG_KERNEL1  = 10'h004;
  localparam logic [9:0] REG_KERNEL2  = 10'h005;
  localparam logic [9:0] REG_THR      = 10'h006;
  localparam logic [9:0] REG_BGCOUNT  = 10'h007;
  localparam logic [9:0] REG_DSTADDR  = 10'h008;
  localparam logic [9:0] REG_HISTTHR  = 10'h009;
  localparam logic [9:0] REG_LABELS   = 10'h00A;
  localparam logic [9:0] REG_ADJCOUNT = 10'h00B;
  localparam logic [9:0] REG_HIST0    = 10'h100;  // 256 histogram bins follow

  // Status bits reported by the pipeline.
  typedef struct packed {
    logic ahb_error;     // AHB master got an ERROR response
    logic adj_overflow;  // adjacency table full, pairs dropped
    logic label_ovf;     // label counter saturated
    logic fifo2_ovf;     // second-stage FIFO overflowed
    logic fifo1_ovf;     // first-stage FIFO overflowed
    logic thr_valid;     // histogram threshold of the last frame available
    logic busy;          // a frame is in flight
    logic done;          // the last frame is fully written out
  } status_t;

endpackage
