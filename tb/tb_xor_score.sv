// tb_xor_score: two scorers, a rank-sized one (28x40 at the corner) and a
// suit-sized one (28x29, 40 rows below), run over a shortened raster (300
// positions per line, 340 lines). Random kernels are loaded through the
// write port. Each frame presents a new random mask image. During frame N
// the corner stored in frame N-1 is compared, and the result is published
// at the start of frame N+1: it must equal the number of pixels in which
// that corner differs from the kernel, counted here. A frame whose corner
// equals the kernel must score 0 two frames later, and
// score_valid must pulse once per frame.
module tb_xor_score;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  hcount_t hcount_pipe = '0, left_edge;
  vcount_t vcount_pipe = '0, top_edge;
  logic mask = 0;
  logic kwe = 0, kdata = 0;
  logic [10:0] kaddr = '0;
  score_t score_r, score_s;
  logic   valid_r, valid_s;
  int checks = 0, failures = 0;

  xor_score #(.KW(28), .KH(40), .Y_OFF(0)) dut_rank (
    .clk, .rst, .hcount_pipe, .vcount_pipe, .mask, .left_edge, .top_edge,
    .kernel_we(kwe), .kernel_addr(kaddr), .kernel_data(kdata), .score(score_r), .score_valid(valid_r)
  );
  xor_score #(.KW(28), .KH(29), .Y_OFF(40)) dut_suit (
    .clk, .rst, .hcount_pipe, .vcount_pipe, .mask, .left_edge, .top_edge,
    .kernel_we(kwe && (kaddr < 11'(28*29))), .kernel_addr(kaddr[9:0]), .kernel_data(kdata), .score(score_s), .score_valid(valid_s)
  );

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic kern [28*40];
  logic img [240*320];
  int   vcount_r = 0;
  always @(posedge clk) if (valid_r) vcount_r++;

  function automatic int expected(int kh, int yoff);
    int s = 0;
    for (int r = 0; r < kh; r++)
      for (int c = 0; c < 28; c++)
        if (kern[r * 28 + c] != img[(int'(top_edge) + yoff + r) * 240 + int'(left_edge) + c]) s++;
    return s;
  endfunction

  initial begin
    int exp_r, exp_s, v0, old_r, old_s;
    left_edge = 11'd37; top_edge = 10'd51;
    hcount_pipe = 11'd1000;
    repeat (3) @(negedge clk);
    rst = 0;
    // one kernel pattern shared by both scorers (the suit one uses its first 28*29 pixels)
    for (int a = 0; a < 28 * 40; a++) begin
      kern[a] = 1'($urandom);
      kwe = 1; kaddr = 11'(a); kdata = kern[a];
      @(negedge clk);
    end
    kwe = 0;
    exp_r = -1; exp_s = -1; old_r = -1; old_s = -1;
    for (int f = 0; f < 7; f++) begin
      // frame f's image; frame 4 shows the kernels exactly
      foreach (img[i]) img[i] = 1'($urandom);
      if (f == 4) begin
        for (int r = 0; r < 40; r++) for (int c = 0; c < 28; c++)
          img[(51 + r) * 240 + 37 + c] = kern[r * 28 + c];
        for (int r = 0; r < 29; r++) for (int c = 0; c < 28; c++)
          img[(91 + r) * 240 + 37 + c] = kern[r * 28 + c];
      end
      if (f == 6) begin
        checks++;
        if (old_r != 0 || old_s != 0) begin failures++; $display("matching frame expected non-zero"); end
      end
      v0 = vcount_r;
      for (int v = 0; v < 340; v++)
        for (int h = 0; h < 300; h++) begin
          hcount_pipe = 11'(h); vcount_pipe = 10'(v);
          mask = (h < 240 && v < 320) ? img[v * 240 + h] : 1'b0;
          @(negedge clk);
          // the score for the previous frame's corner appears 3 clocks into the frame
          if (v == 0 && h == 4 && f >= 3) begin
            checks++;
            if (int'(score_r) != old_r || int'(score_s) != old_s) begin
              failures++;
              $display("frame %0d: scores %0d %0d expected %0d %0d", f, score_r, score_s, old_r, old_s);
            end
          end
        end
      checks++;
      if (vcount_r != v0 + 1) begin failures++; $display("frame %0d: %0d valid pulses", f, vcount_r - v0); end
      old_r = exp_r; old_s = exp_s;
      exp_r = expected(40, 0);
      exp_s = expected(29, 40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
