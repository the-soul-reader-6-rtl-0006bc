// bram_sdp: simple dual-port block RAM with a two-cycle read.
//
// Port A writes (addra, dina when wea); port B reads addrb. The read address
// is registered, then the array output is registered, so doutb shows the word
// at addrb two clock edges after addrb is presented, matching the "#2" read
// latency given for the frame buffers. The array is read in the cycle after
// the address is presented, so a write made in the same cycle as the read
// address is seen, and a write one cycle later is not. Used for both frame
// buffers and the kernel memories: the
// 240x320 RGB 5:6:5 camera frame and the 240x320 1-bit thresholded frame.
// Contents are not reset.
module bram_sdp #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 76800,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wea,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dina,
  input  logic [AW-1:0]    addrb,
  output logic [WIDTH-1:0] doutb
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addrb_q;

  always_ff @(posedge clk) begin
    if (wea && (32'(addra) < DEPTH)) mem[addra] <= dina;
    addrb_q <= addrb;
    doutb   <= (32'(addrb_q) < DEPTH) ? mem[addrb_q] : '0;
  end

endmodule
