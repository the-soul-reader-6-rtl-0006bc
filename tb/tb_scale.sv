// tb_scale: the pixel passes inside the shown image (240x320 at scale 00,
// 480x640 otherwise) and is black outside, for random and boundary
// positions.
module tb_scale;
  import card_pkg::*;
  logic [1:0] scale_in;
  hcount_t    hcount_pipe;
  vcount_t    vcount_pipe;
  rgb565_t    frame_buff, full_pixel;
  int checks = 0, failures = 0;

  scale dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int s, input int h, input int v);
    int w, ht; logic exp_in;
    scale_in = 2'(s); hcount_pipe = 11'(h); vcount_pipe = 10'(v);
    frame_buff = rgb565_t'($urandom_range(65535, 1));
    #1;
    w  = (s == 0) ? 240 : 480;
    ht = (s == 0) ? 320 : 640;
    exp_in = (h < w) && (v < ht);
    checks++;
    if (full_pixel !== (exp_in ? frame_buff : 16'h0)) begin
      failures++;
      $display("scale %0d (%0d,%0d): got %h", s, h, v, full_pixel);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      check(s, 239, 319); check(s, 240, 0); check(s, 0, 320);
      check(s, 479, 639); check(s, 480, 10); check(s, 10, 640);
      for (int i = 0; i < 500; i++) check(s, $urandom_range(1343), $urandom_range(805));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
