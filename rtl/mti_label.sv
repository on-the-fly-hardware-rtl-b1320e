// mti_label: multi-target identification, first labeling pass.
//
// White pixels of the binarized image are grouped into objects: every white
// pixel gets a 16-bit label ("colour"), black pixels get label 0. A white
// pixel with no labeled neighbour among the four already visited ones
// (8-connectivity: west W, north-west NW, north N, north-east NE) opens a new
// object and takes the next free label; the label counter only grows, so each
// new object has a unique label. Otherwise the pixel inherits a neighbour's
// label, in the order N, NE, W, NW. When NE and W (or NE and NW) carry
// different labels the two objects meet at this pixel and the pair is sent to
// the adjacency output, so that a second pass (run in software) can merge
// them. With 8-connectivity this is the only case in which a raster scan can
// meet two labels that are not yet known to be equal.
//
// Labels of the previous row are kept in a line buffer of C entries, and the
// three north neighbours move along in registers. Each pixel runs through a
// five-state FSM, which gives the document's rate of 5 cycles per pixel:
//   FETCH     take the pixel from the input FIFO (in_ready high)
//   RETRIEVE  read the NE label from the line buffer, shift N and NW
//   ANALYZE   choose the label, detect an equivalence
//   UPDATE    write the label into the line buffer, advance the position
//   EMIT      offer the label (and a pair) downstream, wait for ready
// The Retrieve-Analyze-Update sequence, 16-bit labels and 5 cycles per pixel
// follow the document; the neighbourhood, the label order and the pair rule
// are this design's. A label counter that reaches 2^16-1 saturates and sets
// label_ovf. done rises after the last pixel of a cfg_rows x cfg_cols frame.
module mti_label #(
  parameter int unsigned MAX_COLS = 1024,
  parameter int unsigned LABEL_W  = 16,
  parameter int unsigned DIM_W    = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [DIM_W-1:0]     cfg_rows,
  input  logic [DIM_W-1:0]     cfg_cols,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 in_bit,
  output logic                 lab_valid,
  input  logic                 lab_ready,
  output logic [LABEL_W-1:0]   lab_data,
  output logic                 adj_valid,
  input  logic                 adj_ready,
  output logic [2*LABEL_W-1:0] adj_pair,    // {label kept, other label}
  output logic                 done,
  output logic [LABEL_W-1:0]   label_count, // labels handed out so far
  output logic                 label_ovf
);
  localparam int unsigned AW = $clog2(MAX_COLS);
  localparam logic [LABEL_W-1:0] LMAX = '1;

  typedef enum logic [2:0] {IDLE, FETCH, RETRIEVE, ANALYZE, UPDATE, EMIT} state_t;

  state_t             state;
  logic [LABEL_W-1:0] lbuf [MAX_COLS];
  logic [LABEL_W-1:0] w_l, nw_l, n_l, ne_l, cur_l, next_l;
  logic [DIM_W-1:0]   row, col;
  logic               pix, pair_v, last_pix;
  logic [LABEL_W-1:0] pair_other;

  assign in_ready  = state == FETCH;
  assign lab_valid = state == EMIT;
  assign lab_data  = cur_l;
  assign adj_valid = state == EMIT && pair_v;
  assign adj_pair  = {cur_l, pair_other};
  assign label_count = next_l - 1'b1;
  assign last_pix  = row == cfg_rows - 1'b1 && col == cfg_cols - 1'b1;

  logic emit_ok;
  assign emit_ok = lab_ready && (!pair_v || adj_ready);

  always_ff @(posedge clk) begin
    if (state == UPDATE) lbuf[AW'(col)] <= cur_l;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      {w_l, nw_l, n_l, ne_l, cur_l} <= '0;
      next_l     <= LABEL_W'(1);
      row        <= '0;
      col        <= '0;
      pix        <= 1'b0;
      pair_v     <= 1'b0;
      pair_other <= '0;
      done       <= 1'b0;
      label_ovf  <= 1'b0;
    end else if (start) begin
      state      <= FETCH;
      {w_l, nw_l, n_l, ne_l, cur_l} <= '0;
      next_l     <= LABEL_W'(1);
      row        <= '0;
      col        <= '0;
      pair_v     <= 1'b0;
      done       <= 1'b0;
      label_ovf  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: ;
        FETCH: if (in_valid) begin
          pix   <= in_bit;
          state <= RETRIEVE;
        end
        RETRIEVE: begin
          if (col == '0) begin
            nw_l <= '0;
            n_l  <= (row != '0) ? lbuf[0] : '0;
            w_l  <= '0;
          end else begin
            nw_l <= n_l;
            n_l  <= ne_l;
          end
          ne_l  <= (row != '0 && col != cfg_cols - 1'b1) ? lbuf[AW'(col + 1'b1)] : '0;
          state <= ANALYZE;
        end
        ANALYZE: begin
          pair_v <= 1'b0;
          if (!pix) begin
            cur_l <= '0;
          end else if (n_l != '0) begin
            cur_l <= n_l;
          end else if (ne_l != '0) begin
            cur_l <= ne_l;
            if (w_l != '0 && w_l != ne_l) begin
              pair_v <= 1'b1; pair_other <= w_l;
            end else if (w_l == '0 && nw_l != '0 && nw_l != ne_l) begin
              pair_v <= 1'b1; pair_other <= nw_l;
            end
          end else if (w_l != '0) begin
            cur_l <= w_l;
          end else if (nw_l != '0) begin
            cur_l <= nw_l;
          end else begin
            cur_l <= next_l;
            if (next_l != LMAX) next_l <= next_l + 1'b1;
            else                label_ovf <= 1'b1;
          end
          state <= UPDATE;
        end
        UPDATE: begin
          w_l   <= cur_l;
          state <= EMIT;
        end
        EMIT: if (emit_ok) begin
          if (last_pix) begin
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            if (col == cfg_cols - 1'b1) begin
              col <= '0;
              row <= row + 1'b1;
            end else begin
              col <= col + 1'b1;
            end
            state <= FETCH;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A pair always names two different, non-zero labels.
  assert property (@(posedge clk) disable iff (!rst_n)
                   adj_valid |-> adj_pair[LABEL_W-1:0] != '0 &&
                                 adj_pair[LABEL_W-1:0] != adj_pair[2*LABEL_W-1:LABEL_W]);

endmodule
