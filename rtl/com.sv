// com: centre of mass of the white pixels of the thresholded frame.
//
// While the (delayed) raster position lies inside the 240x320 frame, every
// mask pixel that is 1 adds its x to an x sum, its y to a y sum and 1 to a
// count. When the raster reaches the first pixel below the frame
// (hcount_pipe = 0, vcount_pipe = 320) the sums are handed to two sequential
// dividers and cleared for the next frame; 25 cycles later x_com = xsum/count
// and y_com = ysum/count are updated and com_valid pulses once. A frame with
// no white pixel leaves the previous centre in place (no pulse).
// The centre-of-mass calculation is the design's; the sequential dividers and
// the update point are this implementation's choices.
module com
  import card_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  hcount_t hcount_pipe,
  input  vcount_t vcount_pipe,
  input  logic    mask,
  output hcount_t x_com,
  output vcount_t y_com,
  output logic    com_valid
);

  localparam int SW = $clog2(FRAME_PIXELS * FRAME_H);   // wide enough for any sum

  logic [SW-1:0] xsum, ysum, count;
  logic [SW-1:0] xq, yq;
  logic          start, xdone, ydone, xbusy, ybusy;
  logic [SW-1:0] xsum_l, ysum_l, count_l;

  logic in_frame, frame_end;
  assign in_frame  = (hcount_pipe < hcount_t'(FRAME_W)) && (vcount_pipe < vcount_t'(FRAME_H));
  assign frame_end = (hcount_pipe == '0) && (vcount_pipe == vcount_t'(FRAME_H));

  always_ff @(posedge clk) begin
    if (rst) begin
      xsum    <= '0;
      ysum    <= '0;
      count   <= '0;
      start   <= 1'b0;
      xsum_l  <= '0;
      ysum_l  <= '0;
      count_l <= '0;
    end else begin
      start <= 1'b0;
      if (frame_end) begin
        xsum_l  <= xsum;
        ysum_l  <= ysum;
        count_l <= count;
        start   <= (count != '0);
        xsum    <= '0;
        ysum    <= '0;
        count   <= '0;
      end else if (in_frame && mask) begin
        xsum  <= xsum + SW'(hcount_pipe);
        ysum  <= ysum + SW'(vcount_pipe);
        count <= count + 1'b1;
      end
    end
  end

  divider #(.WIDTH(SW)) u_xdiv (
    .clk, .rst, .start, .dividend(xsum_l), .divisor(count_l),
    .quotient(xq), .done(xdone), .busy(xbusy)
  );
  divider #(.WIDTH(SW)) u_ydiv (
    .clk, .rst, .start, .dividend(ysum_l), .divisor(count_l),
    .quotient(yq), .done(ydone), .busy(ybusy)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      x_com     <= hcount_t'(FRAME_W / 2);
      y_com     <= vcount_t'(FRAME_H / 2);
      com_valid <= 1'b0;
    end else begin
      com_valid <= xdone && ydone && !xbusy && !ybusy;
      if (xdone && ydone && !xbusy && !ybusy) begin
        x_com <= xq[$bits(hcount_t)-1:0];
        y_com <= yq[$bits(vcount_t)-1:0];
      end
    end
  end

endmodule
