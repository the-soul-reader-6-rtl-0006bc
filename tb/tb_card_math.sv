// tb_card_math: 17 random kernels are loaded (13 ranks of 28x40, 4 suits
// of 28x29). A shortened raster (300x340) then shows, frame after frame, an
// image whose 28x69 corner holds rank kernel R over suit kernel S. Once the
// corner has been stored and compared (score published two frames after it
// is first shown), the comparator must report card suit*13 + rank, each
// of the 17 scores must equal the pixel difference counted here, and the
// two matching kernels must score 0. Three cards are tried.
module tb_card_math;
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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic kern [17][28*40];
  logic img [240*320];

  task automatic frame();
    for (int v = 0; v < 340; v++)
      for (int h = 0; h < 300; h++) begin
        hcount_pipe = 11'(h); vcount_pipe = 10'(v);
        mask = (h < 240 && v < 320) ? img[v * 240 + h] : 1'b0;
        @(negedge clk);
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 17; k++)
      for (int a = 0; a < ((k < 13) ? 28 * 40 : 28 * 29); a++) begin
        kern[k][a] = 1'($urandom);
        kernel_we = 1; kernel_sel = 5'(k); kernel_addr = KERNEL_AW'(a); kernel_data = kern[k][a];
        @(negedge clk);
      end
    kernel_we = 0;
    for (int t = 0; t < 3; t++) begin
      int r, s, l, tp;
      r = $urandom_range(12); s = $urandom_range(3);
      l = $urandom_range(200); tp = $urandom_range(250);
      left_edge = 11'(l); top_edge = 10'(tp);
      foreach (img[i]) img[i] = 1'($urandom);
      for (int y = 0; y < 40; y++) for (int x = 0; x < 28; x++)
        img[(tp + y) * 240 + l + x] = kern[r][y * 28 + x];
      for (int y = 0; y < 29; y++) for (int x = 0; x < 28; x++)
        img[(tp + 40 + y) * 240 + l + x] = kern[13 + s][y * 28 + x];
      repeat (3) frame();
      // the third frame began with the scores of the corner stored in the first
      checks++;
      if (int'(card_map) != s * 13 + r) begin
        failures++; $display("card %0d: map %0d expected %0d", t, card_map, s * 13 + r);
      end
      for (int k = 0; k < 17; k++) begin
        int e;
        e = 0;
        for (int y = 0; y < ((k < 13) ? 40 : 29); y++)
          for (int x = 0; x < 28; x++)
            if (kern[k][y * 28 + x] != img[(tp + ((k < 13) ? 0 : 40) + y) * 240 + l + x]) e++;
        checks++;
        if (int'(scores[k]) != e) begin failures++; $display("card %0d kernel %0d: score %0d expected %0d", t, k, scores[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
