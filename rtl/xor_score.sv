// xor_score: scores how far the card's corner differs from one kernel.
//
// One of these runs per kernel. While the delayed raster position is inside
// the kernel's window at the card's top-left corner (corner_addr), the mask
// pixel there is written into a corner memory the size of the kernel, and
// the same address is read from the kernel memory and from the corner
// memory. The corner memory reads before it writes, so it returns the pixel
// stored one frame earlier. The two pixels are XORed (1 where they differ)
// and the ones are added up over the window. At the start of each frame
// (raster at 0,0) the sum is moved to score, score_valid pulses, and the sum
// restarts. So score counts the pixels in which the corner captured in the
// previous frame differs from the kernel: 0 is a perfect match. Both memory
// reads take two cycles, and the window flag is delayed to match.
// The kernel memory is filled through the kernel_* write port (one pixel per
// cycle, row-major, 1 = white).
// The corner memory, kernel memory, address generation and XOR-and-add
// follow the design; the read-before-write timing, the frame-start update
// and the kernel write port are this implementation's choices.
module xor_score
  import card_pkg::*;
#(
  parameter int KW    = 28,
  parameter int KH    = 40,
  parameter int Y_OFF = 0,
  localparam int AW   = $clog2(KW * KH)
) (
  input  logic          clk,
  input  logic          rst,
  input  hcount_t       hcount_pipe,
  input  vcount_t       vcount_pipe,
  input  logic          mask,
  input  hcount_t       left_edge,
  input  vcount_t       top_edge,
  input  logic          kernel_we,
  input  logic [AW-1:0] kernel_addr,
  input  logic          kernel_data,
  output score_t        score,
  output logic          score_valid
);

  localparam int DEPTH = KW * KH;

  logic          in_win;
  logic [AW-1:0] addr;

  corner_addr #(.KW(KW), .KH(KH), .Y_OFF(Y_OFF)) u_addr (
    .hcount_pipe, .vcount_pipe, .left_edge, .top_edge, .in_win, .addr
  );

  // kernel memory: written by the load port, read at the corner address
  logic dout_kernel;
  bram_sdp #(.WIDTH(1), .DEPTH(DEPTH)) u_kernel (
    .clk, .wea(kernel_we), .addra(kernel_addr), .dina(kernel_data),
    .addrb(addr), .doutb(dout_kernel)
  );

  // corner memory: single port, read before write
  logic          corner_mem [DEPTH];
  logic [AW-1:0] addr_q;
  logic          we_q, din_q, dout_mask;

  always_ff @(posedge clk) begin
    addr_q <= addr;
    we_q   <= in_win;
    din_q  <= mask;
    if (32'(addr_q) < DEPTH) begin
      dout_mask <= corner_mem[addr_q];
      if (we_q) corner_mem[addr_q] <= din_q;
    end else begin
      dout_mask <= 1'b0;
    end
  end

  // window flag and frame start, delayed to the memory outputs
  logic [1:0] in_win_d, fstart_d;
  logic       diff;
  score_t     acc;

  assign diff = in_win_d[1] && (dout_kernel ^ dout_mask);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_win_d    <= '0;
      fstart_d    <= '0;
      acc         <= '0;
      score       <= '1;
      score_valid <= 1'b0;
    end else begin
      in_win_d    <= {in_win_d[0], in_win};
      fstart_d    <= {fstart_d[0], (hcount_pipe == '0) && (vcount_pipe == '0)};
      score_valid <= 1'b0;
      if (fstart_d[1]) begin
        score       <= acc;
        score_valid <= 1'b1;
        acc         <= score_t'(diff);
      end else begin
        acc <= acc + score_t'(diff);
      end
    end
  end

endmodule
