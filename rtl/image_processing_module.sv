// image_processing_module: on-the-fly target recognition front end.
//
// A star tracker / navigation camera delivers 16-bit pixel words (12-bit
// colour depth) over SpaceWire; this module turns them, while they stream in,
// into a labeled map of the bright objects in the picture, which software
// then refines. The chain, one pixel per cycle except for the labeling core:
//
//   pix_* -> binning (2x2 mean) -> sync FIFO 1 -> lpf (3x3 kernel, /9,
//   12->8 bit) -+-> histogram (background threshold)
//               +-> binarization (P > T) -> sync FIFO 2 -> mti_label
//   mti_label -> labels -> serializer -> ahb_master -> SDRAM (AHB master port)
//             -> label pairs -> adj_vector (AHB slave port)
//   APB slave port -> apb_slave -> reg_bank -> configuration of every core
//
// The host writes the image size, kernel, threshold mode and destination
// address, then writes CTRL.start; it feeds one frame of in_rows x in_cols
// words through pix_valid/pix_data (no back-pressure: the FIFOs absorb the
// rate difference and flag an overflow). done rises when the last label word
// has been written to SDRAM; the label pairs are then in the adjacency table
// and the histogram and its threshold in the register bank. The blocks, their
// order and the three bus ports follow the document; FIFO depths, the table
// size and the register map are this design's choice.
module image_processing_module
  import ip_pkg::*;
#(
  parameter int unsigned MAX_IN_COLS = 2048,
  parameter int unsigned FIFO1_DEPTH = 1024,
  parameter int unsigned FIFO2_DEPTH = 2048,
  parameter int unsigned ADJ_DEPTH   = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  // pixel stream from the SpaceWire interface
  input  logic              pix_valid,
  input  logic [IN_W-1:0]   pix_data,
  // APB slave (from the AHB-to-APB bridge)
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [11:0]       paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr,
  // AHB-Lite master (point-to-point link to the SDRAM controller)
  output logic [31:0]       m_haddr,
  output logic [1:0]        m_htrans,
  output logic              m_hwrite,
  output logic [2:0]        m_hsize,
  output logic [2:0]        m_hburst,
  output logic [31:0]       m_hwdata,
  input  logic              m_hready,
  input  logic              m_hresp,
  // AHB-Lite slave (adjacency table on the system bus)
  input  logic              s_hsel,
  input  logic [31:0]       s_haddr,
  input  logic [1:0]        s_htrans,
  input  logic              s_hwrite,
  input  logic              s_hready,
  output logic [31:0]       s_hrdata,
  output logic              s_hreadyout,
  output logic              s_hresp,
  // frame finished
  output logic              done
);
  localparam int unsigned MAX_COLS = MAX_IN_COLS / 2;

  cfg_t              cfg;
  logic              start;
  status_t           status;
  logic [DIM_W-1:0]  rows, cols;   // size of the binned image

  assign rows = cfg.in_rows >> 1;
  assign cols = cfg.in_cols >> 1;

  // ------------------------------------------------------------ register access
  logic              bus_wr, bus_err;
  logic [9:0]        bus_addr;
  logic [31:0]       bus_wdata, bus_rdata;
  logic [LUM_W-1:0]  hist_addr;
  logic [HCNT_W-1:0] hist_data;
  logic              thr_valid;
  logic [LUM_W-1:0]  thr_value;
  logic [LABEL_W-1:0] label_count;
  logic [$clog2(ADJ_DEPTH):0] adj_count;

  apb_slave #(.AW(12), .DW(32)) u_apb (
    .pclk(clk), .presetn(rst_n), .psel, .penable, .pwrite, .paddr, .pwdata,
    .prdata, .pready, .pslverr,
    .bus_wr, .bus_addr, .bus_wdata, .bus_rdata, .bus_err);

  reg_bank u_regs (
    .clk, .rst_n, .bus_wr, .bus_addr, .bus_wdata, .bus_rdata, .bus_err,
    .cfg, .start, .status,
    .hist_thr_valid(thr_valid), .hist_thr(thr_value),
    .hist_addr, .hist_data, .label_count, .adj_count(32'(adj_count)));

  // -------------------------------------------------------------- pixel chain
  logic             bin_valid;
  logic [PIX_W-1:0] bin_data;

  binning #(.PIX_W(PIX_W), .MAX_COLS(MAX_IN_COLS), .DIM_W(DIM_W)) u_binning (
    .clk, .rst_n, .start, .cfg_cols(cfg.in_cols),
    .in_valid(pix_valid), .in_data(pix_data[PIX_W-1:0]),
    .out_valid(bin_valid), .out_data(bin_data));

  logic             f1_valid, f1_ready, f1_full, f1_ovf;
  logic [PIX_W-1:0] f1_data;
  logic [$clog2(FIFO1_DEPTH):0] f1_level;

  sync_fifo #(.W(PIX_W), .DEPTH(FIFO1_DEPTH)) u_fifo1 (
    .clk, .rst_n, .clear(start), .wr_en(bin_valid), .wr_data(bin_data),
    .full(f1_full), .out_valid(f1_valid), .out_ready(f1_ready), .out_data(f1_data),
    .level(f1_level), .overflow(f1_ovf));

  logic             lpf_valid, lpf_last;
  logic [LUM_W-1:0] lpf_data;

  lpf #(.PIX_W(PIX_W), .OUT_W(LUM_W), .MAX_COLS(MAX_COLS), .DIM_W(DIM_W)) u_lpf (
    .clk, .rst_n, .start, .cfg_rows(rows), .cfg_cols(cols), .kernel(cfg.kernel),
    .in_valid(f1_valid), .in_ready(f1_ready), .in_data(f1_data),
    .out_valid(lpf_valid), .out_last(lpf_last), .out_data(lpf_data));

  logic hist_busy;

  histogram #(.LUM_W(LUM_W), .HCNT_W(HCNT_W)) u_hist (
    .clk, .rst_n, .start, .cfg_bg_count(cfg.bg_count),
    .in_valid(lpf_valid), .in_last(lpf_last), .in_data(lpf_data),
    .busy(hist_busy), .thr_valid, .thr_value,
    .rd_addr(hist_addr), .rd_data(hist_data));

  logic bz_valid, bz_bit;

  binarization #(.LUM_W(LUM_W)) u_binarize (
    .thr(cfg.thr), .in_valid(lpf_valid), .in_data(lpf_data),
    .out_valid(bz_valid), .out_bit(bz_bit));

  logic f2_valid, f2_ready, f2_bit, f2_full, f2_ovf;
  logic [$clog2(FIFO2_DEPTH):0] f2_level;

  sync_fifo #(.W(1), .DEPTH(FIFO2_DEPTH)) u_fifo2 (
    .clk, .rst_n, .clear(start), .wr_en(bz_valid), .wr_data(bz_bit),
    .full(f2_full), .out_valid(f2_valid), .out_ready(f2_ready), .out_data(f2_bit),
    .level(f2_level), .overflow(f2_ovf));

  // ------------------------------------------------------------------ labeling
  logic                 lab_valid, lab_ready, adj_valid, adj_ready;
  logic [LABEL_W-1:0]   lab_data;
  logic [2*LABEL_W-1:0] adj_pair;
  logic                 mti_done, label_ovf, adj_ovf;

  mti_label #(.MAX_COLS(MAX_COLS), .LABEL_W(LABEL_W), .DIM_W(DIM_W)) u_mti (
    .clk, .rst_n, .start, .cfg_rows(rows), .cfg_cols(cols),
    .in_valid(f2_valid), .in_ready(f2_ready), .in_bit(f2_bit),
    .lab_valid, .lab_ready, .lab_data,
    .adj_valid, .adj_ready, .adj_pair,
    .done(mti_done), .label_count, .label_ovf);

  adj_vector #(.DEPTH(ADJ_DEPTH), .LABEL_W(LABEL_W)) u_adj (
    .clk, .rst_n, .start,
    .pair_valid(adj_valid), .pair_ready(adj_ready), .pair_data(adj_pair),
    .count(adj_count), .overflow(adj_ovf),
    .hsel(s_hsel), .haddr(s_haddr), .htrans(s_htrans), .hwrite(s_hwrite),
    .hready(s_hready), .hrdata(s_hrdata), .hreadyout(s_hreadyout), .hresp(s_hresp));

  logic        ser_valid, ser_ready, ser_empty, mti_done_q;
  logic [31:0] ser_data;

  serializer #(.IN_W(LABEL_W), .RATIO(2)) u_ser (
    .clk, .rst_n, .start, .flush(mti_done && !mti_done_q),
    .in_valid(lab_valid), .in_ready(lab_ready), .in_data(lab_data),
    .out_valid(ser_valid), .out_ready(ser_ready), .out_data(ser_data),
    .empty(ser_empty));

  logic        ahb_idle, ahb_error;
  logic [31:0] words_written;

  ahb_master #(.DW(32)) u_ahbm (
    .clk, .rst_n, .start, .base_addr(cfg.dst_addr),
    .in_valid(ser_valid), .in_ready(ser_ready), .in_data(ser_data),
    .idle(ahb_idle), .error(ahb_error), .words_written,
    .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite), .hsize(m_hsize),
    .hburst(m_hburst), .hwdata(m_hwdata), .hready(m_hready), .hresp(m_hresp));

  // ------------------------------------------------------------ frame status
  logic busy, done_q, thr_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done_q     <= 1'b0;
      thr_seen   <= 1'b0;
      mti_done_q <= 1'b0;
    end else begin
      mti_done_q <= mti_done && !start;
      if (start) begin
        busy     <= 1'b1;
        done_q   <= 1'b0;
        thr_seen <= 1'b0;
      end else begin
        if (thr_valid) thr_seen <= 1'b1;
        if (busy && mti_done_q && ser_empty && ahb_idle && !hist_busy) begin
          busy   <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign done = done_q;
  assign status = '{ahb_error: ahb_error, adj_overflow: adj_ovf, label_ovf: label_ovf,
                    fifo2_ovf: f2_ovf, fifo1_ovf: f1_ovf, thr_valid: thr_seen,
                    busy: busy, done: done_q};

endmodule
