// tb_find_edges: a 240x320 thresholded frame is built in the frame-buffer
// RAM: a white card rectangle with black symbols on it (some placed on the
// cross-hair lines), and white noise pixels off the cross-hair lines. From a
// centre inside the card the block must report the card's four edges, take
// one done pulse, and finish within 900 cycles of start. Several random
// cards are tried, plus one touching the frame border.
module tb_find_edges;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                start = 0;
  hcount_t             x_com;
  vcount_t             y_com;
  logic [FRAME_AW-1:0] addr_corners, addra;
  logic                pixel_data_corners, wea = 0, dina = 0;
  edges_t              edges;
  logic                done;
  int checks = 0, failures = 0;

  bram_sdp #(.WIDTH(1), .DEPTH(FRAME_PIXELS)) u_fb (
    .clk, .wea, .addra, .dina, .addrb(addr_corners), .doutb(pixel_data_corners)
  );

  find_edges dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int done_count = 0;
  always @(posedge clk) if (done) done_count++;

  initial begin
    int l, r, t, b, cx, cy, cycles, d0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 5; c++) begin
      if (c == 4) begin l = 0; r = 239; t = 0; b = 319; end
      else begin
        l = $urandom_range(100, 1); r = l + $urandom_range(130, 40);
        t = $urandom_range(120, 1); b = t + $urandom_range(190, 60);
      end
      cx = (l + r) / 2; cy = (t + b) / 2;
      // paint the frame, one pixel per clock
      for (int y = 0; y < 320; y++)
        for (int x = 0; x < 240; x++) begin
          logic w;
          w = (x >= l && x <= r && y >= t && y <= b);
          // black symbols on the cross-hair inside the card
          if (w && ((y == cy && (x == cx + 3 || x == cx - 5)) || (x == cx && (y == cy - 4 || y == cy + 6)))) w = 0;
          // noise outside the card, away from the cross-hair
          if (!w && x != cx && y != cy && $urandom_range(99) < 2) w = 1;
          wea = 1; addra = FRAME_AW'(y * 240 + x); dina = w;
          @(negedge clk);
        end
      wea = 0;
      x_com = 11'(cx); y_com = 10'(cy);
      d0 = done_count;
      start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (done_count == d0 && cycles < 5000) begin @(negedge clk); cycles++; end
      checks++;
      if (int'(edges.left) != l || int'(edges.right) != r || int'(edges.top) != t || int'(edges.bottom) != b) begin
        failures++;
        $display("card %0d: edges l%0d r%0d t%0d b%0d expected l%0d r%0d t%0d b%0d", c,
                 edges.left, edges.right, edges.top, edges.bottom, l, r, t, b);
      end
      checks++;
      if (cycles > 900) begin failures++; $display("took %0d cycles", cycles); end
      repeat (10) @(negedge clk);
      checks++;
      if (done_count != d0 + 1) begin failures++; $display("done pulsed %0d times", done_count - d0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
