// scale: blanks the frame-buffer pixel outside the displayed image.
//
// The pixel read from the frame buffer arrives four cycles after the raster
// counters, so it is judged against the raster position delayed by four
// (hcount_pipe, vcount_pipe). Inside the image (240x320 at scale_in = 2'b00,
// 480x640 otherwise, the same codes as the mirror block) the pixel passes
// through; outside it is black. Purely combinational, matching the "#0"
// latency given for this block.
module scale
  import card_pkg::*;
(
  input  logic [1:0] scale_in,
  input  hcount_t    hcount_pipe,
  input  vcount_t    vcount_pipe,
  input  rgb565_t    frame_buff,
  output rgb565_t    full_pixel
);

  logic in_image;

  always_comb begin
    if (scale_in == 2'b00)
      in_image = (hcount_pipe < hcount_t'(FRAME_W)) && (vcount_pipe < vcount_t'(FRAME_H));
    else
      in_image = (hcount_pipe < hcount_t'(2 * FRAME_W)) && (vcount_pipe < vcount_t'(2 * FRAME_H));
    full_pixel = in_image ? frame_buff : '0;
  end

endmodule
