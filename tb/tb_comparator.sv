// tb_comparator: random score sets (with deliberate ties) must select the
// lowest rank and suit score, the lower index on a tie, and give the
// matching seven-segment characters and card number suit*13 + rank one
// clock after scores_valid. Outputs must hold while scores_valid is low.
module tb_comparator;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic   scores_valid = 0;
  score_t rank_scores [NUM_RANKS];
  score_t suit_scores [NUM_SUITS];
  seg7_t  rank_score, suit_score;
  logic [5:0] card_map;
  logic   card_valid;
  int checks = 0, failures = 0;

  comparator dut (.*);

  // characters: 2 3 4 5 6 7 8 9 0 J q H A, and S H C d
  localparam logic [6:0] RSEG [13] = '{7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F,
                                       7'h6F, 7'h3F, 7'h1E, 7'h67, 7'h76, 7'h77};
  localparam logic [6:0] SSEG [4] = '{7'h6D, 7'h76, 7'h39, 7'h5E};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int br, bs;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int hi;
      hi = (i % 3 == 0) ? 3 : 1120;         // small range gives many ties
      foreach (rank_scores[k]) rank_scores[k] = score_t'($urandom_range(hi));
      foreach (suit_scores[k]) suit_scores[k] = score_t'($urandom_range(hi));
      br = 0; bs = 0;
      for (int k = 0; k < 13; k++) if (rank_scores[k] < rank_scores[br]) br = k;
      for (int k = 0; k < 4; k++)  if (suit_scores[k] < suit_scores[bs]) bs = k;
      scores_valid = 1;
      @(negedge clk);
      scores_valid = 0;
      checks++;
      if (!card_valid || rank_score !== RSEG[br] || suit_score !== SSEG[bs] || int'(card_map) != bs * 13 + br) begin
        failures++;
        if (failures < 10) $display("i=%0d: map %0d expected %0d", i, card_map, bs * 13 + br);
      end
      // changing scores without valid must not change the outputs
      foreach (rank_scores[k]) rank_scores[k] = score_t'($urandom_range(1120));
      @(negedge clk);
      checks++;
      if (card_valid || int'(card_map) != bs * 13 + br) begin failures++; $display("outputs moved"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
