// tb_card_deck: reads a whole deck. 17 random kernels are loaded into
// card_math, then each of the 52 cards (13 ranks x 4 suits) is shown in
// turn: the card's 28x69 corner carries its rank kernel over its suit kernel,
// with 3% of the corner pixels flipped afresh in every frame as camera noise.
// The raster is cut down to the area around the corner (60 x 100 positions)
// since nothing else in card_math depends on it. After three frames of a
// card, card_map must name it and the rank and suit characters must match.
// The deck is shown at a different corner position for each suit.
module tb_card_deck;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  hcount_t hcount_pipe = 11'd1000, left_edge;
  vcount_t vcount_pipe = '0, top_edge;
  logic mask = 0;
  logic kernel_we = 0, kernel_data = 0;
  logic [4:0] kernel_sel = '0;
  logic [KERNEL_AW-1:0] kernel_addr = '0;
  seg7_t rank_score, suit_score;
  logic [5:0] card_map;
  logic card_valid;
  score_t scores [NUM_KERNELS];
  int checks = 0, failures = 0;

  card_math dut (.*);

  localparam logic [6:0] RSEG [13] = '{7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F,
                                       7'h6F, 7'h3F, 7'h1E, 7'h67, 7'h76, 7'h77};
  localparam logic [6:0] SSEG [4] = '{7'h6D, 7'h76, 7'h39, 7'h5E};

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic kern [17][28*40];

  // one frame of the cut-down raster showing card (r, s) with noise
  task automatic frame(input int r, input int s, input int l, input int t);
    for (int v = 0; v < 100; v++)
      for (int h = 0; h < 60; h++) begin
        logic m;
        m = 1'b1;                                    // white card face
        if (h >= l && h < l + 28 && v >= t && v < t + 40) m = kern[r][(v - t) * 28 + h - l];
        if (h >= l && h < l + 28 && v >= t + 40 && v < t + 69) m = kern[13 + s][(v - t - 40) * 28 + h - l];
        if ($urandom_range(99) < 3) m = !m;
        hcount_pipe = 11'(h); vcount_pipe = 10'(v); mask = m;
        @(negedge clk);
      end
  endtask

  initial begin
    int correct = 0;
    foreach (kern[k, a]) kern[k][a] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 17; k++)
      for (int a = 0; a < ((k < 13) ? 28 * 40 : 28 * 29); a++) begin
        kernel_we = 1; kernel_sel = 5'(k); kernel_addr = KERNEL_AW'(a); kernel_data = kern[k][a];
        @(negedge clk);
      end
    kernel_we = 0;
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < 13; r++) begin
        int l, t;
        l = 2 + 5 * s; t = 3 + 3 * s;
        left_edge = 11'(l); top_edge = 10'(t);
        repeat (3) frame(r, s, l, t);
        checks++;
        if (int'(card_map) != s * 13 + r || rank_score !== RSEG[r] || suit_score !== SSEG[s]) begin
          failures++;
          $display("card rank %0d suit %0d read as %0d", r, s, card_map);
        end else correct++;
      end
    $display("cards read correctly: %0d of 52", correct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
