// ipm_bench: end-to-end bench of image_processing_module, shared by the
// small-frame and the full-frame testbenches.
//
// For each frame it programs the module over APB, streams in_rows x in_cols
// random sky images (dim noise, one-pixel stars, bright blobs; junk in the
// 4 unused top bits of every word) one word every GAP_X4/4 cycles on average,
// waits for done,
// and then checks against a reference computed here:
//   - every histogram bin read over APB against binning + 3x3 filter +
//     truncation to 8 bits computed independently,
//   - the histogram threshold, and THR in auto mode,
//   - the label image written to the SDRAM model: label 0 exactly on pixels
//     at or below T, and, after merging the label pairs read from the
//     adjacency table over AHB, exactly one class per 8-connected object,
//   - the label count and the status register.
// It counts how often each mechanism of the design happened (LPF flush,
// back-pressure of the labeling core, output stalls, AHB wait states, new
// labels, label merges, repeated pairs skipped, automatic threshold) and
// counts a failure for any that never happened.
module ipm_bench #(
  parameter int IN_ROWS = 16,
  parameter int IN_COLS = 20,
  parameter int FRAMES  = 3,
  parameter int GAP_X4  = 4,        // cycles between words, in quarters
  parameter bit CHECK_TAIL = 0,     // check that done follows the last word closely
  parameter int WAIT_PCT = 30,
  parameter bit REQUIRE_ALL = 1
);
  import ip_pkg::*;
  localparam int R = IN_ROWS / 2, C = IN_COLS / 2;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [15:0] pix_data = '0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic [31:0] m_haddr, m_hwdata;
  logic [1:0] m_htrans;
  logic m_hwrite, m_hready, m_hresp;
  logic [2:0] m_hsize, m_hburst;
  logic s_hsel = 0, s_hwrite = 0, s_hreadyout, s_hresp;
  logic [31:0] s_haddr = '0, s_hrdata;
  logic [1:0] s_htrans = 2'b00;
  logic done;

  image_processing_module dut (
    .clk, .rst_n, .pix_valid, .pix_data,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .m_haddr, .m_htrans, .m_hwrite, .m_hsize, .m_hburst, .m_hwdata, .m_hready, .m_hresp,
    .s_hsel, .s_haddr, .s_htrans, .s_hwrite, .s_hready(s_hreadyout), .s_hrdata,
    .s_hreadyout, .s_hresp, .done);

  ahb_mem_model #(.WAIT_PCT(WAIT_PCT)) sdram (
    .clk, .rst_n, .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite), .hsize(m_hsize),
    .hwdata(m_hwdata), .hready(m_hready), .hresp(m_hresp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------- mechanism counters
  int n_flush = 0, n_backpressure = 0, n_out_stall = 0, n_new_labels = 0;
  int n_merges = 0, n_dups = 0, n_auto_thr = 0;
  int lpf_out[$];
  always @(posedge clk) if (rst_n) begin
    if (dut.lpf_valid) lpf_out.push_back(int'(dut.lpf_data));
    if (dut.u_lpf.flushing) n_flush++;
    if (dut.f2_valid && !dut.f2_ready && dut.f2_level > 1) n_backpressure++;
    if (dut.lab_valid && !dut.lab_ready) n_out_stall++;
    if (dut.adj_valid && dut.adj_ready) n_merges++;
    if (dut.adj_valid && dut.u_adj.dup) n_dups++;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------ bus access
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    #1 d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    s_hsel = 1; s_htrans = 2'b10; s_hwrite = 0; s_haddr = a;
    @(negedge clk);
    s_hsel = 0; s_htrans = 2'b00;
    d = s_hrdata;
  endtask

  // ------------------------------------------------------------ references
  int img [];      // IN_ROWS*IN_COLS, 12-bit pixels
  int binned [];   // R*C
  int lum [];      // R*C, after filter and compression
  int hist [256];
  kernel_t kernel;

  function automatic void make_image(int seed_kind);
    img = new[IN_ROWS*IN_COLS];
    foreach (img[i]) img[i] = $urandom_range(0, 300);
    for (int s = 0; s < (IN_ROWS*IN_COLS) / 50 + 1; s++)    // one-pixel stars
      img[$urandom_range(0, IN_ROWS*IN_COLS-1)] = $urandom_range(2000, 4095);
    for (int b = 0; b < 3 + seed_kind + (IN_ROWS*IN_COLS) / 262144; b++) begin   // blobs
      automatic int cr = $urandom_range(0, IN_ROWS-1), cc = $urandom_range(0, IN_COLS-1);
      automatic int rad = $urandom_range(2, 4 + IN_ROWS / 16);
      for (int r = cr - rad; r <= cr + rad; r++)
        for (int c = cc - rad; c <= cc + rad; c++)
          if (r >= 0 && r < IN_ROWS && c >= 0 && c < IN_COLS &&
              (r-cr)*(r-cr) + (c-cc)*(c-cc) <= rad*rad && $urandom_range(0, 9) != 0)
            img[r*IN_COLS+c] = $urandom_range(1500, 4095);
    end
    // a comb: two bars one binned pixel apart, bridged on every other row,
    // so the labeling core reports the same pair of labels again and again
    if (seed_kind == 2)
      for (int br = 2; br < R - 2; br++)
        for (int bc = 2; bc <= 6; bc++) begin
          automatic int v = (bc != 4 || br % 2 == 1) ? 4000 : 0;
          for (int dr = 0; dr < 2; dr++)
            for (int dc = 0; dc < 2; dc++) img[(2*br+dr)*IN_COLS + 2*bc+dc] = v;
        end
  endfunction

  function automatic void reference();
    binned = new[R*C];
    lum = new[R*C];
    foreach (hist[i]) hist[i] = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        binned[r*C+c] = (img[(2*r)*IN_COLS+2*c] + img[(2*r)*IN_COLS+2*c+1] +
                         img[(2*r+1)*IN_COLS+2*c] + img[(2*r+1)*IN_COLS+2*c+1]) / 4;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        automatic longint acc = 0;
        automatic int q;
        for (int i = -1; i <= 1; i++)
          for (int j = -1; j <= 1; j++)
            if (r+i >= 0 && r+i < R && c+j >= 0 && c+j < C)
              acc += binned[(r+i)*C + c+j] * kernel[3*(i+1) + j+1];
        q = int'(acc / 9);
        if (q > 4095) q = 4095;
        lum[r*C+c] = q >> 4;
        hist[q >> 4]++;
      end
  endfunction

  // -------------------------------------------------------------- one frame
  task automatic frame(input int f, input bit auto_mode, input int user_thr);
    logic [31:0] d, status, nlabels, nadj;
    int thr_used, exp_hthr, cum, bg, nl;
    int labels [];
    int comp [];
    int ncomp;
    int parent [int];
    int class_comp [int];
    int comp_seen [int];
    longint t0, t_last;

    // configuration
    // frame 0: 3x3 mean, frame 1: random kernel, frame 2: identity (K11 = 9)
    for (int i = 0; i < 9; i++) kernel[i] = (f == 0) ? 8'd1 : (f == 2) ? 8'd0 : 8'($urandom_range(0, 3));
    kernel[4] = (f == 0) ? 8'd1 : (f == 2) ? 8'd9 : 8'($urandom_range(1, 4));
    bg = (R*C) * 3 / 4;
    make_image(f);
    reference();
    apb_write({REG_SIZE, 2'b00}, {4'd0, 12'(IN_ROWS), 4'd0, 12'(IN_COLS)});
    apb_write({REG_KERNEL0, 2'b00}, {kernel[3], kernel[2], kernel[1], kernel[0]});
    apb_write({REG_KERNEL1, 2'b00}, {kernel[7], kernel[6], kernel[5], kernel[4]});
    apb_write({REG_KERNEL2, 2'b00}, {24'd0, kernel[8]});
    apb_write({REG_BGCOUNT, 2'b00}, 32'(bg));
    apb_write({REG_DSTADDR, 2'b00}, 32'h1000_0000 + 32'(f) * 32'h0100_0000);
    if (user_thr >= 0) apb_write({REG_THR, 2'b00}, 32'(user_thr));
    apb_read({REG_THR, 2'b00}, d);
    thr_used = int'(d);
    apb_write({REG_CTRL, 2'b00}, {30'd0, auto_mode, 1'b1});
    lpf_out.delete();
    // stream the frame: word i enters in cycle t0 + floor(i * GAP_X4 / 4)
    @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < IN_ROWS*IN_COLS; i++) begin
      while (cyc < t0 + (longint'(i) * GAP_X4) / 4) begin
        pix_valid = 0;
        @(negedge clk);
      end
      pix_valid = 1;
      pix_data = {4'($urandom), 12'(img[i])};
      @(negedge clk);
    end
    pix_valid = 0;
    t_last = cyc;
    while (!done) @(negedge clk);
    $display("frame %0d: %0dx%0d words in %0d cycles (%0d us at 50 MHz), done %0d cycles after the last word, T=%0d",
             f, IN_ROWS, IN_COLS, cyc - t0, (cyc - t0) / 50, cyc - t_last, thr_used);
    // on the fly: after the last word only the filter flush and the
    // labeling of the last rows remain, about 5 cycles per pixel of a row
    if (CHECK_TAIL)
      chk(cyc - t_last < 6 * (C + 1) + 200, $sformatf("done %0d cycles after the last word", cyc - t_last));

    // filtered image as it left the filter
    chk(lpf_out.size() == R*C, $sformatf("filtered pixel count %0d", lpf_out.size()));
    for (int i = 0; i < R*C && i < lpf_out.size(); i++)
      chk(lpf_out[i] == lum[i], $sformatf("frame %0d filtered pixel (%0d,%0d): %0d vs %0d", f, i / C, i % C, lpf_out[i], lum[i]));
    // histogram and threshold
    for (int v = 0; v < 256; v++) begin
      apb_read(12'((REG_HIST0 + 10'(v)) << 2), d);
      chk(int'(d) == hist[v], $sformatf("frame %0d bin %0d: %0d vs %0d", f, v, d, hist[v]));
    end
    exp_hthr = 255; cum = 0;
    for (int v = 0; v < 256; v++) begin
      cum += hist[v];
      if (cum >= bg) begin exp_hthr = v; break; end
    end
    apb_read({REG_HISTTHR, 2'b00}, d);
    chk(int'(d) == exp_hthr, $sformatf("histogram threshold %0d vs %0d", d, exp_hthr));
    apb_read({REG_THR, 2'b00}, d);
    if (auto_mode) begin
      chk(int'(d) == exp_hthr, "auto mode loads T");
      if (int'(d) == exp_hthr) n_auto_thr++;
    end else begin
      chk(int'(d) == thr_used, "manual mode keeps T");
    end
    apb_read({REG_STATUS, 2'b00}, status);
    chk(status[0] && !status[1] && status[2] && status[7:3] == 0,
        $sformatf("status %b", status[7:0]));

    // label image from the SDRAM model
    labels = new[R*C];
    for (int i = 0; i < R*C; i++) begin
      automatic logic [31:0] w = sdram.read_word(32'h1000_0000 + 32'(f) * 32'h0100_0000 + 32'(4*(i/2)));
      labels[i] = (i % 2) ? int'(w[31:16]) : int'(w[15:0]);
    end
    apb_read({REG_LABELS, 2'b00}, nlabels);
    apb_read({REG_ADJCOUNT, 2'b00}, nadj);
    n_new_labels += int'(nlabels);
    for (int i = 0; i < int'(nadj); i++) begin
      automatic int a, b;
      ahb_read(32'(4*i), d);
      a = int'(d[31:16]); b = int'(d[15:0]);
      while (parent.exists(a) && parent[a] != a) a = parent[a];
      while (parent.exists(b) && parent[b] != b) b = parent[b];
      if (a != b) parent[a] = b;
    end
    // flood fill of the white pixels of the reference
    comp = new[R*C];
    foreach (comp[i]) comp[i] = -1;
    ncomp = 0;
    for (int i = 0; i < R*C; i++) if (lum[i] > thr_used && comp[i] < 0) begin
      int stack[$];
      comp[i] = ncomp; stack.push_back(i);
      while (stack.size()) begin
        automatic int p = stack.pop_back();
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            automatic int rr = p / C + dr, cc = p % C + dc;
            if (rr >= 0 && rr < R && cc >= 0 && cc < C && lum[rr*C+cc] > thr_used && comp[rr*C+cc] < 0) begin
              comp[rr*C+cc] = ncomp; stack.push_back(rr*C+cc);
            end
          end
      end
      ncomp++;
    end
    nl = 0;
    for (int i = 0; i < R*C; i++) begin
      automatic bit white = lum[i] > thr_used;
      chk((labels[i] != 0) == white, $sformatf("frame %0d pixel %0d: label %0d, lum %0d", f, i, labels[i], lum[i]));
      if (labels[i] > nl) nl = labels[i];
      if (white && labels[i] != 0) begin
        automatic int cls = labels[i];
        while (parent.exists(cls) && parent[cls] != cls) cls = parent[cls];
        if (class_comp.exists(cls)) begin
          if (class_comp[cls] != comp[i]) chk(0, $sformatf("two objects share a class at %0d", i));
        end else class_comp[cls] = comp[i];
      end
    end
    foreach (class_comp[k]) begin
      chk(!comp_seen.exists(class_comp[k]), "object split over classes");
      comp_seen[class_comp[k]] = 1;
    end
    chk(comp_seen.size() == ncomp, $sformatf("objects %0d labeled %0d", ncomp, comp_seen.size()));
    chk(int'(nlabels) == nl, "label count");
    $display("frame %0d: %0d objects, %0d labels, %0d label pairs", f, ncomp, nl, nadj);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      frame(f, f > 0, (f == 0) ? 40 : -1);
    $display("mechanisms: flush %0d, back-pressure %0d, output stalls %0d, AHB waits %0d, new labels %0d, merges %0d, repeated pairs %0d, auto thresholds %0d",
             n_flush, n_backpressure, n_out_stall, sdram.waits, n_new_labels, n_merges, n_dups, n_auto_thr);
    chk(n_flush > 0, "LPF flush happened");
    chk(n_new_labels > 0, "new labels happened");
    chk(n_merges > 0, "label merges happened");
    chk(FRAMES < 2 || n_auto_thr > 0, "automatic threshold happened");
    if (REQUIRE_ALL) begin
      chk(n_backpressure > 0, "labeling back-pressure happened");
      chk(n_out_stall > 0, "output stall happened");
      chk(sdram.waits > 0, "AHB wait states happened");
      chk(n_dups > 0, "repeated pair skipped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
