// tb_com: drives a shortened raster (250 positions per line, 330 lines, so
// that the 240x320 frame and the end-of-frame point are covered) with
// random white rectangles plus scattered pixels, and checks x_com/y_com
// against sums taken here. A frame with no white pixel must leave the
// centre unchanged with no com_valid pulse. The update must come within 30
// cycles of the end-of-frame point.
module tb_com;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  hcount_t hcount_pipe = '0;
  vcount_t vcount_pipe = '0;
  logic    mask = 0;
  hcount_t x_com;
  vcount_t y_com;
  logic    com_valid;
  int checks = 0, failures = 0;

  com dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int valid_count = 0;
  always @(posedge clk) if (com_valid) valid_count++;

  task automatic run_frame(input int l, input int r, input int t, input int b,
                           input int noise, output longint xs, output longint ys, output longint n);
    xs = 0; ys = 0; n = 0;
    for (int v = 0; v < 330; v++)
      for (int h = 0; h < 250; h++) begin
        logic m;
        m = (h >= l && h <= r && v >= t && v <= b) || (noise != 0 && ($urandom_range(99) < noise));
        hcount_pipe = 11'(h); vcount_pipe = 10'(v); mask = m;
        if (m && h < 240 && v < 320) begin xs += h; ys += v; n++; end
        @(negedge clk);
      end
  endtask

  initial begin
    longint xs, ys, n;
    int vc0, wait_cycles;
    hcount_t px;
    vcount_t py;
    repeat (3) @(negedge clk);
    rst = 0;
    // the frame-end point (0, 320) is passed inside run_frame, and the
    // 9 lines after it give the dividers time to finish
    for (int f = 0; f < 6; f++) begin
      int l, t;
      l = $urandom_range(150); t = $urandom_range(200);
      vc0 = valid_count;
      run_frame(l, l + $urandom_range(80, 10), t, t + $urandom_range(110, 10), (f % 2) ? 3 : 0, xs, ys, n);
      checks++;
      if (valid_count != vc0 + 1) begin failures++; $display("frame %0d: %0d pulses", f, valid_count - vc0); end
      checks++;
      if (int'(x_com) != int'(xs / n) || int'(y_com) != int'(ys / n)) begin
        failures++;
        $display("frame %0d: com (%0d,%0d) expected (%0d,%0d)", f, x_com, y_com, xs / n, ys / n);
      end
    end
    // latency: from the end-of-frame point to com_valid
    px = x_com; py = y_com;
    vc0 = valid_count;
    for (int v = 0; v <= 320; v++)
      for (int h = 0; h < ((v == 320) ? 1 : 250); h++) begin
        hcount_pipe = 11'(h); vcount_pipe = 10'(v); mask = (h == 5 && v == 7);
        @(negedge clk);
      end
    hcount_pipe = 11'(1); mask = 0;
    wait_cycles = 0;
    while (valid_count == vc0 && wait_cycles < 100) begin @(negedge clk); wait_cycles++; end
    checks++;
    if (wait_cycles > 30 || x_com != 5 || y_com != 7) begin
      failures++; $display("latency %0d, com (%0d,%0d)", wait_cycles, x_com, y_com);
    end
    // empty frame: no update
    run_frame(1000, 0, 1000, 0, 0, xs, ys, n);
    repeat (40) @(negedge clk);
    checks++;
    if (x_com != 5 || y_com != 7) begin failures++; $display("empty frame changed the centre"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
