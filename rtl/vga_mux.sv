// vga_mux: chooses what the display shows.
//
// sel[0] picks the background: 0 shows the camera pixel (RGB 5:6:5 cut to the
// 4:4:4 display), 1 shows the thresholded mask as white or black. sel[1]
// overlays the centre-of-mass cross-hair (drawn over the frame) and sel[2]
// overlays the four card edge lines (drawn across the whole screen), both in
// magenta. Outside the visible area (blank) the
// output is black. The output is registered: vga_out follows its inputs by
// one clock.
// The inputs follow the design's output multiplexer; the meaning of the
// select bits and the colours are this implementation's choices.
module vga_mux
  import card_pkg::*;
(
  input  logic       clk,
  input  logic [2:0] sel,
  input  logic       blank,
  input  hcount_t    hcount_pipe,
  input  vcount_t    vcount_pipe,
  input  rgb565_t    full_pixel,
  input  logic       mask,
  input  logic       crosshair,
  input  edges_t     edges,
  output rgb444_t    vga_out
);

  localparam rgb444_t MAGENTA = '{r: 4'hF, g: 4'h0, b: 4'hF};

  rgb444_t pix;
  logic    on_edge;

  always_comb begin
    on_edge = (hcount_pipe == edges.left) || (hcount_pipe == edges.right) ||
              (vcount_pipe == edges.top)  || (vcount_pipe == edges.bottom);
    if (sel[0]) pix = mask ? 12'hFFF : 12'h000;
    else        pix = '{r: full_pixel.r[4:1], g: full_pixel.g[5:2], b: full_pixel.b[4:1]};
    if (sel[1] && crosshair) pix = MAGENTA;
    if (sel[2] && on_edge)   pix = MAGENTA;
    if (blank)               pix = '0;
  end

  always_ff @(posedge clk) vga_out <= pix;

endmodule
