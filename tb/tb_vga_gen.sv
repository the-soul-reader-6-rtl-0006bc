// tb_vga_gen: follows two full frames and checks that hcount/vcount step
// through 1344x806 positions, that blank, hsync and vsync match the
// 1024x768 timing at every position, and that a frame is 1344*806 clocks.
module tb_vga_gen;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  hcount_t hcount;
  vcount_t vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  vga_gen dut (.*);

  initial begin
    repeat (3 * 1344 * 806) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, ev, n, frame_start [$];
    repeat (3) @(negedge clk);
    rst = 0;
    eh = 0; ev = 0;
    for (n = 0; n < 2 * 1344 * 806 + 5; n++) begin
      logic bad;
      bad = (int'(hcount) != eh) || (int'(vcount) != ev) ||
            (blank != (eh >= 1024 || ev >= 768)) ||
            (hsync != !(eh >= 1048 && eh < 1184)) ||
            (vsync != !(ev >= 771 && ev < 777));
      if (eh == 0 && ev == 0) frame_start.push_back(n);
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("n=%0d h=%0d v=%0d exp %0d %0d blank %b hs %b vs %b",
                                    n, hcount, vcount, eh, ev, blank, hsync, vsync);
      end
      eh++;
      if (eh == 1344) begin eh = 0; ev = (ev == 805) ? 0 : ev + 1; end
      @(negedge clk);
    end
    checks++;
    if (frame_start.size() < 2 || frame_start[1] - frame_start[0] != 1344 * 806) begin
      failures++; $display("frame period wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
