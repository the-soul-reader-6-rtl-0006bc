// camera_read: receives the camera's byte-wide pixel bus and assembles
// 16-bit RGB 5:6:5 pixels.
//
// The camera drives a pixel clock, line-valid (href), frame sync (vsync) and
// an 8-bit data bus. All four are brought into the system clock domain through
// a two-flop synchroniser and the pixel clock is edge-detected, so the system
// clock must be several times faster than the pixel clock. On each rising
// pixel-clock edge with href high one byte is taken: the first byte of a pair
// is the upper half of the pixel, the second the lower half. pixel_valid_out
// pulses for one cycle with pixel_out when the second byte arrives.
// frame_done_out pulses for one cycle on the rising edge of vsync, which ends
// a frame. A byte pair is restarted whenever href is low. cam_xclk is the
// system clock divided by four, for the camera's clock input.
// The 5:6:5 format and the port set follow the design; the byte order,
// synchroniser and edge detection are choices of this implementation.
module camera_read (
  input  logic        clk,
  input  logic        rst,
  input  logic        cam_pclk_in,
  input  logic        href_in,
  input  logic        vsync_in,
  input  logic [7:0]  pixel_in,
  output logic        cam_xclk,
  output logic [15:0] pixel_out,
  output logic        pixel_valid_out,
  output logic        frame_done_out
);

  // two-flop synchroniser for all camera inputs: {pclk, href, vsync, data}
  logic [10:0] sync1, sync2;
  logic        pclk_d, vsync_d;   // previous synchronised pclk and vsync
  logic [1:0]  xclk_div;

  always_ff @(posedge clk) begin
    sync1   <= {cam_pclk_in, href_in, vsync_in, pixel_in};
    sync2   <= sync1;
    pclk_d  <= sync2[10];
    vsync_d <= sync2[8];
  end

  logic pclk_s, href_s, vsync_s;
  logic [7:0] data_s;
  assign {pclk_s, href_s, vsync_s, data_s} = sync2;

  logic       second_byte;
  logic [7:0] high_byte;

  always_ff @(posedge clk) begin
    if (rst) begin
      second_byte     <= 1'b0;
      high_byte       <= '0;
      pixel_out       <= '0;
      pixel_valid_out <= 1'b0;
      frame_done_out  <= 1'b0;
      xclk_div        <= '0;
    end else begin
      xclk_div        <= xclk_div + 2'd1;
      pixel_valid_out <= 1'b0;
      frame_done_out  <= vsync_s && !vsync_d;
      if (!href_s) begin
        second_byte <= 1'b0;
      end else if (pclk_s && !pclk_d) begin
        if (!second_byte) begin
          high_byte   <= data_s;
          second_byte <= 1'b1;
        end else begin
          pixel_out       <= {high_byte, data_s};
          pixel_valid_out <= 1'b1;
          second_byte     <= 1'b0;
        end
      end
    end
  end

  assign cam_xclk = xclk_div[1];

endmodule
