// tb_camera_read: a camera model sends a small frame (a few lines of byte
// pairs, pixel clock at a quarter of the system clock, gaps between lines)
// and the assembled pixels are checked in order against the bytes sent.
// Also checked: one frame_done pulse per vsync rising edge, a byte pair that
// is cut off by href falling is dropped, and cam_xclk runs at clk/4.
module tb_camera_read;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cam_pclk_in = 0, href_in = 0, vsync_in = 0;
  logic [7:0] pixel_in = 0;
  logic cam_xclk, pixel_valid_out, frame_done_out;
  logic [15:0] pixel_out;
  int checks = 0, failures = 0;

  camera_read dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] sent [$];
  int frames = 0, got = 0;

  // one camera pixel-clock period is 4 system clocks (40 time units)
  task automatic cam_byte(input logic [7:0] b);
    pixel_in = b;
    #20 cam_pclk_in = 1;
    #20 cam_pclk_in = 0;
  endtask

  always @(posedge clk) if (!rst) begin
    if (frame_done_out) frames++;
    if (pixel_valid_out) begin
      checks++;
      if (sent.size() == 0) begin
        failures++; $display("unexpected pixel %h at %0t", pixel_out, $time);
      end else begin
        logic [15:0] e;
        e = sent.pop_front();
        got++;
        if (pixel_out !== e) begin failures++; $display("pixel %h expected %h", pixel_out, e); end
      end
    end
  end

  initial begin
    int xt0, xt1;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      vsync_in = 1; #400 vsync_in = 0; #400;
      for (int line = 0; line < 6; line++) begin
        href_in = 1;
        for (int p = 0; p < 20; p++) begin
          logic [15:0] px;
          px = 16'($urandom);
          sent.push_back(px);
          cam_byte(px[15:8]);
          cam_byte(px[7:0]);
        end
        if (line == 3) cam_byte(8'hAA);     // odd byte: dropped at href low
        #20 href_in = 0;
        #400;
      end
    end
    vsync_in = 1; #400 vsync_in = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (got != 240 || sent.size() != 0) begin failures++; $display("got %0d pixels", got); end
    checks++;
    if (frames != 3) begin failures++; $display("frames %0d", frames); end
    // xclk toggles every two system clocks
    @(posedge cam_xclk); xt0 = $time; @(posedge cam_xclk); xt1 = $time;
    checks++;
    if (xt1 - xt0 != 40) begin failures++; $display("xclk period %0d", xt1 - xt0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
