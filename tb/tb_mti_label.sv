// Self-checking testbench of mti_label. Frames of random binary pixels (and
// a U-shaped object that forces a merge) are labeled; the testbench then
// merges the reported label pairs with a union-find and compares the result
// with its own flood fill (8-connectivity): black pixels must carry label 0,
// 8-adjacent white pixels must end in the same class, and pixels of
// different objects in different classes. With the output never stalled,
// consecutive labels must be exactly 5 cycles apart; a frame with random
// output stalls checks that nothing is lost.
module tb_mti_label;
  localparam int ROWS = 9, COLS = 11, N = ROWS * COLS;
  logic clk = 0, rst_n = 0, start = 0;
  logic in_valid = 0, in_ready, in_bit = 0;
  logic lab_valid, lab_ready = 1, adj_valid, adj_ready = 1, done, label_ovf;
  logic [15:0] lab_data, label_count;
  logic [31:0] adj_pair;
  int checks = 0, failures = 0, cyc = 0;
  int stalls = 0, merges = 0, new_labels = 0;

  mti_label #(.MAX_COLS(16), .LABEL_W(16), .DIM_W(12)) dut (
    .clk, .rst_n, .start, .cfg_rows(12'(ROWS)), .cfg_cols(12'(COLS)),
    .in_valid, .in_ready, .in_bit, .lab_valid, .lab_ready, .lab_data,
    .adj_valid, .adj_ready, .adj_pair, .done, .label_count, .label_ovf);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  bit img [N];
  int labels[$];
  int pairs_a[$], pairs_b[$];
  int out_cyc[$];
  int idx;
  int parent [int];

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int find(int x);
    while (parent.exists(x) && parent[x] != x) x = parent[x];
    return x;
  endfunction

  // capture what the core hands out
  always @(posedge clk) begin
    if (in_valid && in_ready) idx <= idx + 1;
    if (lab_valid && !lab_ready) stalls++;
    if (lab_valid && lab_ready) begin labels.push_back(lab_data); out_cyc.push_back(cyc); end
    if (adj_valid && adj_ready) begin
      pairs_a.push_back(adj_pair[31:16]); pairs_b.push_back(adj_pair[15:0]); merges++;
    end
  end
  always @(negedge clk) begin
    in_valid = rst_n && idx < N;
    in_bit   = (idx < N) ? img[idx] : 1'b0;
  end

  task automatic frame(input int kind, input bit stall);
    int comp [N];
    int ncomp = 0, maxlab = 0;
    int class_comp [int];
    for (int i = 0; i < N; i++) begin
      automatic int r = i / COLS, c = i % COLS;
      case (kind)
        0: img[i] = $urandom_range(0, 1);
        1: img[i] = (c == 1 || c == 8) && r < 7 || (r == 7 && c >= 1 && c <= 8) ||
                    (r == 2 && c == 10) || (r == 1 && c == 9);
        default: img[i] = $urandom_range(0, 3) == 0;
      endcase
    end
    labels.delete(); pairs_a.delete(); pairs_b.delete(); out_cyc.delete(); parent.delete();
    @(negedge clk);
    idx = N;
    start = 1;
    @(negedge clk);
    start = 0;
    idx = 0;
    while (!done) begin
      lab_ready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      adj_ready = 1'b1;
      @(negedge clk);
    end
    lab_ready = 1;
    repeat (3) @(negedge clk);
    chk(labels.size() == N, "label count");
    // flood fill reference
    foreach (comp[i]) comp[i] = -1;
    for (int i = 0; i < N; i++) if (img[i] && comp[i] < 0) begin
      int stack[$];
      comp[i] = ncomp; stack.push_back(i);
      while (stack.size()) begin
        automatic int p = stack.pop_back();
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            automatic int rr = p / COLS + dr, cc = p % COLS + dc;
            if (rr >= 0 && rr < ROWS && cc >= 0 && cc < COLS && img[rr*COLS+cc] && comp[rr*COLS+cc] < 0) begin
              comp[rr*COLS+cc] = ncomp; stack.push_back(rr*COLS+cc);
            end
          end
      end
      ncomp++;
    end
    // union-find over the reported pairs
    foreach (pairs_a[i]) begin
      automatic int a = find(pairs_a[i]), b = find(pairs_b[i]);
      if (a != b) parent[a] = b;
    end
    for (int i = 0; i < N && labels.size() == N; i++) begin
      chk((labels[i] == 0) == !img[i], $sformatf("background at %0d", i));
      if (labels[i] > maxlab) maxlab = labels[i];
      if (img[i]) begin
        automatic int cls = find(labels[i]);
        if (!parent.exists(cls)) parent[cls] = cls;
        if (class_comp.exists(cls)) chk(class_comp[cls] == comp[i], $sformatf("two objects share class at %0d", i));
        else class_comp[cls] = comp[i];
      end
    end
    // each object must map to exactly one class
    begin
      int comp_seen [int];
      foreach (class_comp[k]) begin
        chk(!comp_seen.exists(class_comp[k]), "object split over classes");
        comp_seen[class_comp[k]] = 1;
      end
      chk(comp_seen.size() == ncomp, "every object labeled");
    end
    chk(label_count == 16'(maxlab), "label_count");
    new_labels += maxlab;
    if (!stall)
      for (int i = 1; i < out_cyc.size(); i++) chk(out_cyc[i] - out_cyc[i-1] == 5, "5 cycles per pixel");
  endtask

  initial begin
    idx = N;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(1, 0);
    frame(0, 0);
    frame(2, 1);
    frame(0, 1);
    chk(stalls > 0, "stall exercised");
    chk(merges > 0, "merge exercised");
    chk(!label_ovf, "no label overflow");
    $display("new labels %0d, merges %0d, stalls %0d", new_labels, merges, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
