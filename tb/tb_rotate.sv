// tb_rotate: streams two 320x240 camera frames (with gaps between pixels)
// and checks each pixel's write address against (239 - cy) + 240*cx, that
// every frame address is hit exactly once, and that frame_done restarts
// the counters mid-frame.
module tb_rotate;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pixel_valid_in = 0, frame_done_in = 0;
  logic [FRAME_AW-1:0] pixel_addr_out;
  int checks = 0, failures = 0;

  rotate dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [76800];

  task automatic send_pixels(input int count);
    for (int p = 0; p < count; p++) begin
      int cx, cy, e;
      cx = p % 320; cy = p / 320;
      e = (239 - cy) + 240 * cx;
      pixel_valid_in = 1;
      #1;
      checks++;
      if (int'(pixel_addr_out) != e) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d): addr %0d expected %0d", cx, cy, pixel_addr_out, e);
      end
      if (count == 76800) seen[int'(pixel_addr_out)] = 1;
      @(negedge clk);
      pixel_valid_in = 0;
      if (p % 5 == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    send_pixels(1000);                       // part of a frame
    frame_done_in = 1; @(negedge clk); frame_done_in = 0;
    send_pixels(76800);                      // a whole frame
    begin
      int missing = 0;
      foreach (seen[i]) if (!seen[i]) missing++;
      checks++;
      if (missing != 0) begin failures++; $display("%0d addresses never written", missing); end
    end
    send_pixels(10);                         // counters wrap to the next frame
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
