// tb_crosshair: the cross-hair is on exactly where the raster position is
// inside the 240x320 frame and on the centre row or column.
module tb_crosshair;
  import card_pkg::*;
  hcount_t hcount_pipe, x_com;
  vcount_t vcount_pipe, y_com;
  logic    crosshair_out;
  int checks = 0, failures = 0, hits = 0;

  crosshair dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int t = 0; t < 5; t++) begin
      x_com = 11'($urandom_range(239)); y_com = 10'($urandom_range(319));
      for (int v = 0; v < 330; v += 1)
        for (int h = 0; h < 250; h += 1) begin
          hcount_pipe = 11'(h); vcount_pipe = 10'(v);
          #1;
          e = (h < 240) && (v < 320) && (h == int'(x_com) || v == int'(y_com));
          checks++;
          if (e) hits++;
          if (crosshair_out !== e) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d) com (%0d,%0d): %b", h, v, x_com, y_com, crosshair_out);
          end
        end
    end
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
