// threshold: turns an RGB 5:6:5 pixel into a 1-bit mask pixel.
//
// Each colour field is widened to 8 bits by appending zeros (R and B shifted
// left by 3, G by 2), the luminance is the plain average L = (R + G + B) / 3,
// and the mask bit is 1 (white, shown as 255) when L is above the 8-bit
// threshold level set from the switches and 0 (black) otherwise. Purely
// combinational (the design gives this block zero latency).
// The equal-weight average and the switch-set threshold follow the design;
// the widening of the fields and the strict "above" comparison are this
// implementation's choices.
module threshold
  import card_pkg::*;
(
  input  rgb565_t    pixel_in,
  input  logic [7:0] mask_level,
  output logic [7:0] luminance,
  output logic       mask
);

  logic [9:0] sum;

  always_comb begin
    sum       = {2'b00, pixel_in.r, 3'b000} + {2'b00, pixel_in.g, 2'b00}
              + {2'b00, pixel_in.b, 3'b000};
    luminance = 8'(sum / 10'd3);
    mask      = luminance > mask_level;
  end

endmodule
