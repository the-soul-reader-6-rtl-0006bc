// find_edges: finds the card's four edges along the centre-of-mass cross-hair.
//
// A pulse on start (a new centre of mass) begins a pass. The block reads the
// thresholded frame through the frame buffer's read port (two-cycle latency):
// first the 240 pixels of row y_com into a row cache, then the 320 pixels of
// column x_com into a column cache. It then scans the caches from the frame
// border inwards towards the centre: the first white pixel met from the left
// is the left edge, from the right the right edge, from the top the top edge
// and from the bottom the bottom edge. Scanning from the outside lets black
// symbols printed on the card, which lie on the cross-hair, not be mistaken
// for an edge. All four scans run side by side, one pixel per cycle; a side
// with no white pixel reports the centre coordinate. About 880 cycles after
// start the edges are updated and done pulses once. The card is taken to be
// upright (not rotated), as the design requires.
// Reading the cross-hair pixels into a cache follows the design; the
// outside-in scan is this implementation's choice of edge criterion.
module find_edges
  import card_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  hcount_t             x_com,
  input  vcount_t             y_com,
  output logic [FRAME_AW-1:0] addr_corners,
  input  logic                pixel_data_corners,
  output edges_t              edges,
  output logic                done
);

  typedef enum logic [2:0] {IDLE, READ_ROW, READ_COL, SCAN, FINISH} state_t;
  state_t state;

  logic [FRAME_W-1:0] row_cache;
  logic [FRAME_H-1:0] col_cache;
  hcount_t xc;                 // latched centre
  vcount_t yc;
  logic [9:0] idx;             // read / scan index
  // tags of the reads in flight: {valid, is_column, index}
  logic        rd_v [2];
  logic        rd_col [2];
  logic [9:0]  rd_idx [2];
  edges_t      found;
  logic [3:0]  got;            // {left, right, top, bottom} found

  always_comb begin
    addr_corners = '0;
    if (state == READ_ROW)
      addr_corners = FRAME_AW'(yc) * FRAME_AW'(FRAME_W) + FRAME_AW'(idx);
    else if (state == READ_COL)
      addr_corners = FRAME_AW'(idx) * FRAME_AW'(FRAME_W) + FRAME_AW'(xc);
  end

  logic [9:0] ridx, bidx;
  assign ridx = 10'(FRAME_W - 1) - idx;
  assign bidx = 10'(FRAME_H - 1) - idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      idx   <= '0;
      xc    <= '0;
      yc    <= '0;
      done  <= 1'b0;
      got   <= '0;
      found <= '0;
      edges <= '0;
      row_cache <= '0;
      col_cache <= '0;
      for (int i = 0; i < 2; i++) begin
        rd_v[i] <= 1'b0;
        rd_col[i] <= 1'b0;
        rd_idx[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      // read tag pipeline: the data for tag stage 1 arrives now
      rd_v[0]   <= (state == READ_ROW) || (state == READ_COL);
      rd_col[0] <= (state == READ_COL);
      rd_idx[0] <= idx;
      rd_v[1]   <= rd_v[0];
      rd_col[1] <= rd_col[0];
      rd_idx[1] <= rd_idx[0];
      if (rd_v[1]) begin
        if (rd_col[1]) col_cache[rd_idx[1][8:0]] <= pixel_data_corners;
        else           row_cache[rd_idx[1][7:0]] <= pixel_data_corners;
      end

      unique case (state)
        IDLE: begin
          if (start && (x_com < hcount_t'(FRAME_W)) && (y_com < vcount_t'(FRAME_H))) begin
            xc    <= x_com;
            yc    <= y_com;
            idx   <= '0;
            state <= READ_ROW;
          end
        end
        READ_ROW: begin
          if (idx == 10'(FRAME_W - 1)) begin
            idx   <= '0;
            state <= READ_COL;
          end else idx <= idx + 10'd1;
        end
        READ_COL: begin
          if (idx == 10'(FRAME_H - 1)) begin
            idx   <= '0;
            state <= SCAN;
            got   <= '0;
            found <= '{left: xc, right: xc, top: yc, bottom: yc};
          end else idx <= idx + 10'd1;
        end
        SCAN: begin
          // wait two cycles at the start for the last reads to land
          if (!rd_v[0] && !rd_v[1]) begin
            if (!got[3] && (hcount_t'(idx) <= xc) && row_cache[idx[7:0]]) begin
              got[3] <= 1'b1;  found.left <= hcount_t'(idx);
            end
            if (!got[2] && (idx < 10'(FRAME_W)) && (hcount_t'(ridx) >= xc) && row_cache[ridx[7:0]]) begin
              got[2] <= 1'b1;  found.right <= hcount_t'(ridx);
            end
            if (!got[1] && (vcount_t'(idx) <= yc) && col_cache[idx[8:0]]) begin
              got[1] <= 1'b1;  found.top <= vcount_t'(idx);
            end
            if (!got[0] && (vcount_t'(bidx) >= yc) && col_cache[bidx[8:0]]) begin
              got[0] <= 1'b1;  found.bottom <= vcount_t'(bidx);
            end
            if (idx == 10'(FRAME_H - 1)) state <= FINISH;
            else idx <= idx + 10'd1;
          end
        end
        FINISH: begin
          state <= IDLE;
          done  <= 1'b1;
          edges <= found;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
