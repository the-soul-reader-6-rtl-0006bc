// corner_addr: position of the raster inside a kernel window at the card's
// top-left corner.
//
// The window is KW pixels wide and KH rows high; its top-left pixel is at
// (left_edge, top_edge + Y_OFF) of the frame. in_win is high while the
// (delayed) raster position is inside the window, and addr is then the
// row-major offset (row * KW + column) of that pixel in a kernel-sized
// memory. Combinational. This is the address generation the design shows as
// addr_read and addr_write beside each kernel memory; one instance serves
// both, since they address the same corner pixel.
module corner_addr
  import card_pkg::*;
#(
  parameter int KW    = 28,
  parameter int KH    = 40,
  parameter int Y_OFF = 0,
  localparam int AW   = $clog2(KW * KH)
) (
  input  hcount_t       hcount_pipe,
  input  vcount_t       vcount_pipe,
  input  hcount_t       left_edge,
  input  vcount_t       top_edge,
  output logic          in_win,
  output logic [AW-1:0] addr
);

  logic [11:0] col;   // signed-free differences, valid only when in_win
  logic [11:0] row;

  always_comb begin
    col    = 12'(hcount_pipe) - 12'(left_edge);
    row    = 12'(vcount_pipe) - 12'(top_edge) - 12'(Y_OFF);
    in_win = (hcount_pipe >= left_edge) && (col < 12'(KW)) &&
             (12'(vcount_pipe) >= 12'(top_edge) + 12'(Y_OFF)) && (row < 12'(KH));
    addr   = in_win ? AW'(row) * AW'(KW) + AW'(col) : '0;
  end

endmodule
