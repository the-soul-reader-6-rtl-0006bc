// mirror: frame-buffer read address for the current raster position.
//
// scale_in selects the display size of the 240x320 frame: 2'b00 shows it
// 1:1 in the top-left corner of the screen, any other value doubles it to
// 480x640. With mirror_in high the image is flipped left to right. Outside
// the image the address is 0 (the scale block blanks those pixels). The
// address appears two clock edges after hcount/vcount: the frame position
// is registered first, then the address y*240 + x.
// Port names and the two-cycle latency follow the design; the scale codes
// and the left-right flip are this implementation's choice.
module mirror
  import card_pkg::*;
(
  input  logic                clk,
  input  logic                mirror_in,
  input  logic [1:0]          scale_in,
  input  hcount_t             hcount,
  input  vcount_t             vcount,
  output logic [FRAME_AW-1:0] pixel_addr_out
);

  hcount_t x_c, x_q;
  vcount_t y_c, y_q;
  logic    in_c, in_q;

  always_comb begin
    if (scale_in == 2'b00) begin
      x_c  = hcount;
      y_c  = vcount;
    end else begin
      x_c  = hcount >> 1;
      y_c  = vcount >> 1;
    end
    in_c = (x_c < hcount_t'(FRAME_W)) && (y_c < vcount_t'(FRAME_H));
    if (mirror_in) x_c = hcount_t'(FRAME_W - 1) - x_c;
  end

  always_ff @(posedge clk) begin
    x_q  <= x_c;
    y_q  <= y_c;
    in_q <= in_c;
    pixel_addr_out <= in_q ? FRAME_AW'(y_q) * FRAME_AW'(FRAME_W) + FRAME_AW'(x_q) : '0;
  end

endmodule
