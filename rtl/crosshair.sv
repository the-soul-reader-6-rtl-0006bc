// crosshair: marks the centre-of-mass cross-hair on the display.
//
// crosshair_out is high when the (delayed) raster position lies on column x_com
// or on row y_com of the frame, which draws the two lines through the centre
// of mass seen over the thresholded image. Combinational.
module crosshair
  import card_pkg::*;
(
  input  hcount_t hcount_pipe,
  input  vcount_t vcount_pipe,
  input  hcount_t x_com,
  input  vcount_t y_com,
  output logic    crosshair_out
);

  logic in_frame;

  always_comb begin
    in_frame  = (hcount_pipe < hcount_t'(FRAME_W)) && (vcount_pipe < vcount_t'(FRAME_H));
    crosshair_out = in_frame && ((hcount_pipe == x_com) || (vcount_pipe == y_com));
  end

endmodule
