// tb_mirror: random raster positions under all scale and mirror settings;
// the frame-buffer address must appear two clocks later and equal
// y*240 + x, x flipped to 239 - x when mirrored, halved positions at 2x,
// and 0 outside the image.
module tb_mirror;
  import card_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic mirror_in;
  logic [1:0] scale_in;
  hcount_t hcount;
  vcount_t vcount;
  logic [FRAME_AW-1:0] pixel_addr_out;
  int checks = 0, failures = 0;

  mirror dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_addr(int h, int v, int s, bit m);
    int x, y;
    x = (s == 0) ? h : h / 2;
    y = (s == 0) ? v : v / 2;
    if (x >= 240 || y >= 320) return 0;
    if (m) x = 239 - x;
    return y * 240 + x;
  endfunction

  initial begin
    int exp_q [$];
    mirror_in = 0; scale_in = 0; hcount = 0; vcount = 0;
    @(negedge clk); @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      int h, v;
      h = (i % 7 == 0) ? 239 + (i % 3) : $urandom_range(1023);
      v = (i % 11 == 0) ? 319 + (i % 3) : $urandom_range(767);
      mirror_in = 1'($urandom); scale_in = 2'($urandom);
      hcount = 11'(h); vcount = 10'(v);
      exp_q.push_back(expect_addr(h, v, int'(scale_in), mirror_in));
      @(negedge clk);
      if (exp_q.size() == 2) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(pixel_addr_out) != e) begin
          failures++;
          if (failures < 10) $display("i=%0d got %0d expected %0d", i, pixel_addr_out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
