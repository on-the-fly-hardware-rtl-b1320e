// reg_bank: configuration and status registers of the image pipeline.
//
// The host programs the pipeline through these registers (reached over APB)
// and reads back its results. Word offsets (byte address / 4):
//   0x000 CTRL     [0] start (write 1: pulse, reads 0)  [1] auto threshold
//   0x001 STATUS   status_t, read only (done, busy, threshold valid, FIFO,
//                  label and adjacency overflows, AHB error)
//   0x002 SIZE     [11:0] input columns, [27:16] input rows
//   0x003 KERNEL0  K00, K01, K02, K10 (byte 0 first)
//   0x004 KERNEL1  K11, K12, K20, K21
//   0x005 KERNEL2  [7:0] K22
//   0x006 THR      [7:0] binarization threshold T
//   0x007 BGCOUNT  [20:0] background-area pixel count for the histogram
//   0x008 DSTADDR  SDRAM byte address of the label image
//   0x009 HISTTHR  [7:0] threshold found by the histogram (read only)
//   0x00A LABELS   labels handed out in the last frame (read only)
//   0x00B ADJCOUNT entries in the adjacency table (read only)
//   0x100..0x1FF   histogram bins 0..255 (read only)
// In auto mode the histogram result of each frame is copied into THR when it
// appears, so it binarizes the next frame. Reads of other offsets return 0
// and flag an error. Reset values: 2048 x 2048 image, all-ones kernel (3x3
// mean), T = 32, BGCOUNT = 0, DSTADDR = 0.
// The document shows a register bank linked to every core and to both bus
// interfaces; the map and reset values are this design's choice.
module reg_bank
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register access
  input  logic              bus_wr,
  input  logic [9:0]        bus_addr,
  input  logic [BUS_W-1:0]  bus_wdata,
  output logic [BUS_W-1:0]  bus_rdata,
  output logic              bus_err,
  // to the pipeline
  output cfg_t              cfg,
  output logic              start,
  // from the pipeline
  input  status_t           status,
  input  logic              hist_thr_valid,
  input  logic [LUM_W-1:0]  hist_thr,
  output logic [LUM_W-1:0]  hist_addr,
  input  logic [HCNT_W-1:0] hist_data,
  input  logic [LABEL_W-1:0] label_count,
  input  logic [BUS_W-1:0]  adj_count
);
  logic [LUM_W-1:0] hist_thr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.in_rows  <= DIM_W'(2048);
      cfg.in_cols  <= DIM_W'(2048);
      cfg.kernel   <= {9{COEF_W'(1)}};
      cfg.auto_thr <= 1'b0;
      cfg.thr      <= LUM_W'(32);
      cfg.bg_count <= '0;
      cfg.dst_addr <= '0;
      start        <= 1'b0;
      hist_thr_q   <= '0;
    end else begin
      start <= 1'b0;
      if (hist_thr_valid) begin
        hist_thr_q <= hist_thr;
        if (cfg.auto_thr) cfg.thr <= hist_thr;
      end
      if (bus_wr) begin
        unique case (bus_addr)
          REG_CTRL: begin
            start        <= bus_wdata[0];
            cfg.auto_thr <= bus_wdata[1];
          end
          REG_SIZE: begin
            cfg.in_cols <= bus_wdata[DIM_W-1:0];
            cfg.in_rows <= bus_wdata[16 +: DIM_W];
          end
          REG_KERNEL0: for (int i = 0; i < 4; i++) cfg.kernel[i]   <= bus_wdata[8*i +: 8];
          REG_KERNEL1: for (int i = 0; i < 4; i++) cfg.kernel[4+i] <= bus_wdata[8*i +: 8];
          REG_KERNEL2: cfg.kernel[8] <= bus_wdata[7:0];
          REG_THR:     cfg.thr       <= bus_wdata[LUM_W-1:0];
          REG_BGCOUNT: cfg.bg_count  <= bus_wdata[HCNT_W-1:0];
          REG_DSTADDR: cfg.dst_addr  <= bus_wdata;
          default: ;
        endcase
      end
    end
  end

  assign hist_addr = bus_addr[LUM_W-1:0];

  always_comb begin
    bus_rdata = '0;
    bus_err   = 1'b0;
    if (bus_addr[9:8] == REG_HIST0[9:8]) begin
      bus_rdata = BUS_W'(hist_data);
    end else begin
      unique case (bus_addr)
        REG_CTRL:     bus_rdata = {30'd0, cfg.auto_thr, 1'b0};
        REG_STATUS:   bus_rdata = BUS_W'(status);
        REG_SIZE:     bus_rdata = {4'd0, cfg.in_rows, 4'd0, cfg.in_cols};
        REG_KERNEL0:  bus_rdata = {cfg.kernel[3], cfg.kernel[2], cfg.kernel[1], cfg.kernel[0]};
        REG_KERNEL1:  bus_rdata = {cfg.kernel[7], cfg.kernel[6], cfg.kernel[5], cfg.kernel[4]};
        REG_KERNEL2:  bus_rdata = BUS_W'(cfg.kernel[8]);
        REG_THR:      bus_rdata = BUS_W'(cfg.thr);
        REG_BGCOUNT:  bus_rdata = BUS_W'(cfg.bg_count);
        REG_DSTADDR:  bus_rdata = cfg.dst_addr;
        REG_HISTTHR:  bus_rdata = BUS_W'(hist_thr_q);
        REG_LABELS:   bus_rdata = BUS_W'(label_count);
        REG_ADJCOUNT: bus_rdata = adj_count;
        default:      bus_err   = 1'b1;
      endcase
    end
  end

endmodule
