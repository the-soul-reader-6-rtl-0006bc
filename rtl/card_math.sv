// card_math: compares the card's corner with all 17 kernels at once.
//
// Thirteen xor_score instances hold the rank kernels (28x40, window at the
// top of the corner) and four hold the suit kernels (28x29, window in the 29
// rows under the rank). All of them see the same delayed raster position,
// mask pixel and card edges, so the corner is scored against every kernel in
// the same frame. When the scores are updated at the start of a frame the
// comparator picks the best rank and suit one cycle later.
// Kernel loading: kernel_sel 0..12 selects a rank kernel in comparator order,
// 13..16 a suit kernel; kernel_addr is row * 28 + column.
// The 17 parallel XOR scorers, their sizes and the comparator follow the
// design; the kernel load port replaces kernels built into the memories.
module card_math
  import card_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  hcount_t              hcount_pipe,
  input  vcount_t              vcount_pipe,
  input  logic                 mask,
  input  hcount_t              left_edge,
  input  vcount_t              top_edge,
  input  logic                 kernel_we,
  input  logic [4:0]           kernel_sel,
  input  logic [KERNEL_AW-1:0] kernel_addr,
  input  logic                 kernel_data,
  output seg7_t                rank_score,
  output seg7_t                suit_score,
  output logic [5:0]           card_map,
  output logic                 card_valid,
  output score_t               scores [NUM_KERNELS]
);

  logic [NUM_KERNELS-1:0] valid;
  score_t rank_scores [NUM_RANKS];
  score_t suit_scores [NUM_SUITS];

  for (genvar i = 0; i < NUM_RANKS; i++) begin : g_rank
    xor_score #(.KW(CORNER_W), .KH(RANK_H), .Y_OFF(0)) u_xor (
      .clk, .rst, .hcount_pipe, .vcount_pipe, .mask, .left_edge, .top_edge,
      .kernel_we(kernel_we && (kernel_sel == 5'(i))),
      .kernel_addr(kernel_addr), .kernel_data,
      .score(rank_scores[i]), .score_valid(valid[i])
    );
    assign scores[i] = rank_scores[i];
  end

  for (genvar i = 0; i < NUM_SUITS; i++) begin : g_suit
    xor_score #(.KW(CORNER_W), .KH(SUIT_H), .Y_OFF(RANK_H)) u_xor (
      .clk, .rst, .hcount_pipe, .vcount_pipe, .mask, .left_edge, .top_edge,
      .kernel_we(kernel_we && (kernel_sel == 5'(NUM_RANKS + i))),
      .kernel_addr(kernel_addr[$clog2(CORNER_W * SUIT_H)-1:0]), .kernel_data,
      .score(suit_scores[i]), .score_valid(valid[NUM_RANKS + i])
    );
    assign scores[NUM_RANKS + i] = suit_scores[i];
  end

  comparator u_cmp (
    .clk, .rst, .scores_valid(&valid), .rank_scores, .suit_scores,
    .rank_score, .suit_score, .card_map, .card_valid
  );

endmodule
