// rotate: frame-buffer write address for each camera pixel.
//
// The camera delivers a 320x240 landscape image, row by row. The card reader
// works on a 240x320 portrait frame, so each camera pixel (cx, cy) is stored
// at portrait position (x, y) = (239 - cy, cx), address y*240 + x: a quarter
// turn clockwise. Two counters follow the camera's raster: they advance on
// each pixel_valid_in and return to zero on frame_done_in. pixel_addr_out is
// combinational from the counters and is the address of the pixel presented
// with the current pixel_valid_in, so it can drive the frame buffer's write
// port directly. The block's existence and place come from the design; the
// direction of the turn is this implementation's choice.
module rotate
  import card_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                pixel_valid_in,
  input  logic                frame_done_in,
  output logic [FRAME_AW-1:0] pixel_addr_out
);

  logic [8:0] cx;   // 0..CAM_W-1
  logic [7:0] cy;   // 0..CAM_H-1

  always_ff @(posedge clk) begin
    if (rst || frame_done_in) begin
      cx <= '0;
      cy <= '0;
    end else if (pixel_valid_in) begin
      if (cx == 9'(CAM_W - 1)) begin
        cx <= '0;
        cy <= (cy == 8'(CAM_H - 1)) ? '0 : cy + 8'd1;
      end else begin
        cx <= cx + 9'd1;
      end
    end
  end

  assign pixel_addr_out = FRAME_AW'(cx) * FRAME_AW'(FRAME_W)
                        + FRAME_AW'(FRAME_W - 1) - FRAME_AW'(cy);

endmodule
