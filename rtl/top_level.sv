// top_level: playing-card reader.
//
// A camera image is stored in a frame buffer and scanned out to a
// 1024x768 display; on the way out every pixel is thresholded, and from the
// thresholded frame the reader finds the card, cuts out its top-left corner
// and compares it with 13 rank and 4 suit kernels. The best match is shown on
// the 8-digit seven-segment display.
//
// Path of a pixel:
//   camera_read -> rotate (write address) -> framebuffer 1 (240x320 RGB 5:6:5)
//   vga_gen -> mirror (2 cycles) -> framebuffer 1 read (2 cycles) -> scale
//   -> threshold -> mask, four cycles after the raster counters. Everything
//   downstream uses the raster counters delayed by four (hcount_pipe,
//   vcount_pipe).
//   mask -> framebuffer 2 (1 bit, 240x320), com (centre of mass per frame),
//   card_math (corner XOR scores), vga_mux.
//   com -> find_edges (reads framebuffer 2 along the cross-hair) -> edges
//   -> card_math window position and vga_mux edge lines.
//   card_math -> ssc (seven-segment digits).
// Timing per display frame: com updates once the raster has passed the
// 320 frame rows, find_edges about 900 cycles later, both well before the
// next frame; the scores are taken over the corner window of one frame and
// compare the corner stored in the frame before, so a steady card is read
// two frames after its edges are known.
// Switches: sw[1:0] scale (00 = 1:1, else 2x), sw[2] mirror, sw[5:3] display
// select (mask background, cross-hair, edge lines), sw[15:8] threshold level.
// Recognition assumes scale 00: the processing works on display coordinates,
// which equal frame coordinates only at 1:1.
// The 65 MHz pixel clock comes from the board's clock generator (a vendor
// clocking primitive) and enters as clk_65mhz. Kernels are loaded through the
// kernel_* port (see card_math). card_map/card_valid bring the recognised
// card number out for the board's LEDs or a host.
// The block structure and its connections follow the design's block
// diagram; reset, the kernel port and the switch meanings beyond scale,
// mirror and threshold level are this implementation's choices.
module top_level
  import card_pkg::*;
(
  input  logic                 clk_65mhz,
  input  logic                 rst,
  input  logic [15:0]          sw,
  // camera connector
  input  logic                 cam_pclk,
  input  logic                 cam_href,
  input  logic                 cam_vsync,
  input  logic [7:0]           cam_data,
  output logic                 cam_xclk,
  // kernel load port
  input  logic                 kernel_we,
  input  logic [4:0]           kernel_sel,
  input  logic [KERNEL_AW-1:0] kernel_addr,
  input  logic                 kernel_data,
  // display
  output rgb444_t              vga_out,
  output logic                 hsync,
  output logic                 vsync,
  output logic [7:0]           an,
  output logic [7:0]           ca,
  output logic [5:0]           card_map,
  output logic                 card_valid
);

  logic clk;
  assign clk = clk_65mhz;

  // ---------------- camera to frame buffer 1 ----------------
  logic [15:0]         cam_pixel;
  logic                cam_valid, frame_done;
  logic [FRAME_AW-1:0] cam_addr;

  camera_read u_camera (
    .clk, .rst, .cam_pclk_in(cam_pclk), .href_in(cam_href), .vsync_in(cam_vsync),
    .pixel_in(cam_data), .cam_xclk, .pixel_out(cam_pixel),
    .pixel_valid_out(cam_valid), .frame_done_out(frame_done)
  );

  rotate u_rotate (
    .clk, .rst, .pixel_valid_in(cam_valid), .frame_done_in(frame_done),
    .pixel_addr_out(cam_addr)
  );

  logic [FRAME_AW-1:0] read_addr;
  logic [15:0]         frame_buff;

  bram_sdp #(.WIDTH(16), .DEPTH(FRAME_PIXELS)) u_framebuffer_1 (
    .clk, .wea(cam_valid), .addra(cam_addr), .dina(cam_pixel),
    .addrb(read_addr), .doutb(frame_buff)
  );

  // ---------------- raster and read-out ----------------
  hcount_t hcount;
  vcount_t vcount;
  logic    hs, vs, blank;

  vga_gen u_vga_gen (.clk, .rst, .hcount, .vcount, .hsync(hs), .vsync(vs), .blank);

  mirror u_mirror (
    .clk, .mirror_in(sw[2]), .scale_in(sw[1:0]), .hcount, .vcount,
    .pixel_addr_out(read_addr)
  );

  // raster position and sync delayed to the pixel
  hcount_t hcount_pipe [PIX_PIPE+1];
  vcount_t vcount_pipe [PIX_PIPE+1];
  logic [PIX_PIPE+1:0] hs_pipe, vs_pipe, blank_pipe;

  always_comb begin
    hcount_pipe[0] = hcount;
    vcount_pipe[0] = vcount;
  end

  always_ff @(posedge clk) begin
    for (int i = 1; i <= PIX_PIPE; i++) begin
      hcount_pipe[i] <= hcount_pipe[i-1];
      vcount_pipe[i] <= vcount_pipe[i-1];
    end
    hs_pipe    <= {hs_pipe[PIX_PIPE:0], hs};
    vs_pipe    <= {vs_pipe[PIX_PIPE:0], vs};
    blank_pipe <= {blank_pipe[PIX_PIPE:0], blank};
  end

  hcount_t hp;
  vcount_t vp;
  assign hp = hcount_pipe[PIX_PIPE];
  assign vp = vcount_pipe[PIX_PIPE];

  rgb565_t full_pixel;
  scale u_scale (
    .scale_in(sw[1:0]), .hcount_pipe(hp), .vcount_pipe(vp),
    .frame_buff(frame_buff), .full_pixel
  );

  logic       mask;
  logic [7:0] luminance;
  threshold u_threshold (.pixel_in(full_pixel), .mask_level(sw[15:8]), .luminance, .mask);

  // ---------------- thresholded frame, centre of mass, edges ----------------
  logic                fb2_we;
  logic [FRAME_AW-1:0] fb2_waddr, addr_corners;
  logic                pixel_data_corners;

  always_comb begin
    fb2_we    = (hp < hcount_t'(FRAME_W)) && (vp < vcount_t'(FRAME_H));
    fb2_waddr = fb2_we ? FRAME_AW'(vp) * FRAME_AW'(FRAME_W) + FRAME_AW'(hp) : '0;
  end

  bram_sdp #(.WIDTH(1), .DEPTH(FRAME_PIXELS)) u_framebuffer_2 (
    .clk, .wea(fb2_we), .addra(fb2_waddr), .dina(mask),
    .addrb(addr_corners), .doutb(pixel_data_corners)
  );

  hcount_t x_com;
  vcount_t y_com;
  logic    com_valid;

  com u_com (.clk, .rst, .hcount_pipe(hp), .vcount_pipe(vp), .mask, .x_com, .y_com, .com_valid);

  edges_t edges;
  logic   edges_done;

  find_edges u_edges (
    .clk, .rst, .start(com_valid), .x_com, .y_com, .addr_corners,
    .pixel_data_corners, .edges, .done(edges_done)
  );

  logic xhair;
  crosshair u_crosshair (.hcount_pipe(hp), .vcount_pipe(vp), .x_com, .y_com, .crosshair_out(xhair));

  // ---------------- corner scoring and display ----------------
  seg7_t  rank_score, suit_score;
  score_t scores [NUM_KERNELS];

  card_math u_math (
    .clk, .rst, .hcount_pipe(hp), .vcount_pipe(vp), .mask,
    .left_edge(edges.left), .top_edge(edges.top),
    .kernel_we, .kernel_sel, .kernel_addr, .kernel_data,
    .rank_score, .suit_score, .card_map, .card_valid, .scores
  );

  ssc u_ssc (.clk, .rst, .rank_score, .suit_score, .card_map, .an, .ca);

  vga_mux u_vga_mux (
    .clk, .sel(sw[5:3]), .blank(blank_pipe[PIX_PIPE-1]), .hcount_pipe(hp), .vcount_pipe(vp),
    .full_pixel, .mask, .crosshair(xhair), .edges, .vga_out
  );

  assign hsync = hs_pipe[PIX_PIPE];
  assign vsync = vs_pipe[PIX_PIPE];

endmodule
