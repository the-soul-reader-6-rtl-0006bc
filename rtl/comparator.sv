// comparator: picks the best-matching rank kernel and suit kernel.
//
// When scores_valid is high, the 13 rank scores and the 4 suit scores are
// searched for their smallest value (a score is the number of differing
// pixels, so smaller is better; on a tie the lower index wins). The winners
// are registered: rank_score and suit_score are the seven-segment characters
// of the winning rank and suit, card_map the card number suit*13 + rank
// (0..51), and card_valid pulses with them.
// Rank order (index 0..12): 2 3 4 5 6 7 8 9 10 J Q K A.
// Suit order (index 0..3): spades, hearts, clubs, diamonds.
// The lowest-score choice and the 7-bit character and 6-bit card outputs
// follow the design; the index orders and the character shapes (10 as "0",
// J, q, K as "H", A; suits as S, H, C, d) are this implementation's choices.
module comparator
  import card_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       scores_valid,
  input  score_t     rank_scores [NUM_RANKS],
  input  score_t     suit_scores [NUM_SUITS],
  output seg7_t      rank_score,
  output seg7_t      suit_score,
  output logic [5:0] card_map,
  output logic       card_valid
);

  // segment bits {g,f,e,d,c,b,a}
  localparam seg7_t RANK_SEG [NUM_RANKS] = '{
    7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F,   // 2..9
    7'h3F, 7'h1E, 7'h67, 7'h76, 7'h77                         // 10 J Q K A
  };
  localparam seg7_t SUIT_SEG [NUM_SUITS] = '{7'h6D, 7'h76, 7'h39, 7'h5E};

  logic [3:0] best_rank;
  logic [1:0] best_suit;
  score_t     best_rank_score, best_suit_score;

  always_comb begin
    best_rank       = '0;
    best_rank_score = rank_scores[0];
    for (int i = 1; i < NUM_RANKS; i++) begin
      if (rank_scores[i] < best_rank_score) begin
        best_rank       = 4'(i);
        best_rank_score = rank_scores[i];
      end
    end
    best_suit       = '0;
    best_suit_score = suit_scores[0];
    for (int i = 1; i < NUM_SUITS; i++) begin
      if (suit_scores[i] < best_suit_score) begin
        best_suit       = 2'(i);
        best_suit_score = suit_scores[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rank_score <= '0;
      suit_score <= '0;
      card_map   <= '0;
      card_valid <= 1'b0;
    end else begin
      card_valid <= scores_valid;
      if (scores_valid) begin
        rank_score <= RANK_SEG[best_rank];
        suit_score <= SUIT_SEG[best_suit];
        card_map   <= 6'(best_suit) * 6'(NUM_RANKS) + 6'(best_rank);
      end
    end
  end

endmodule
