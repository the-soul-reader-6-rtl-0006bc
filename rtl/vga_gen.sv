// vga_gen: display raster generator for 1024x768 at 60 Hz (65 MHz clock).
//
// hcount runs 0..1343 and vcount 0..805; the visible area is hcount < 1024,
// vcount < 768, where blank is low. hsync is low for hcount 1048..1183 and
// vsync low for vcount 771..776 (negative sync pulses, as the 1024x768 timing
// specifies). All outputs are registered and change together each clock.
// The counter names and widths follow the design; the timing numbers are the
// standard ones for this mode.
module vga_gen
  import card_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  output hcount_t hcount,
  output vcount_t vcount,
  output logic    hsync,
  output logic    vsync,
  output logic    blank
);

  hcount_t h_next;
  vcount_t v_next;

  always_comb begin
    h_next = hcount + 11'd1;
    v_next = vcount;
    if (hcount == hcount_t'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcount == vcount_t'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !((h_next >= hcount_t'(H_ACTIVE + H_FP)) &&
                  (h_next <  hcount_t'(H_ACTIVE + H_FP + H_SYNC)));
      vsync  <= !((v_next >= vcount_t'(V_ACTIVE + V_FP)) &&
                  (v_next <  vcount_t'(V_ACTIVE + V_FP + V_SYNC)));
      blank  <= (h_next >= hcount_t'(H_ACTIVE)) || (v_next >= vcount_t'(V_ACTIVE));
    end
  end

endmodule
