// tb_threshold: exhaustive check of the luminance threshold.
// For every 5:6:5 colour (65536) and a set of levels, the luminance
// (8R5 + 4G6 + 8B5) / 3 and the mask bit are computed here and compared.
module tb_threshold;
  import card_pkg::*;
  rgb565_t    pixel_in;
  logic [7:0] mask_level, luminance;
  logic       mask;
  int checks = 0, failures = 0;

  threshold dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lum, lev;
    int levels [5] = '{0, 128, 210, 254, 255};
    for (int li = 0; li < 5; li++) begin
      lev = levels[li];
      mask_level = 8'(lev);
      for (int p = 0; p < 65536; p++) begin
        pixel_in = rgb565_t'(p);
        #1;
        lum = ((p >> 11) * 8 + ((p >> 5) & 63) * 4 + (p & 31) * 8) / 3;
        checks++;
        if (int'(luminance) != lum || mask != (lum > lev)) begin
          failures++;
          if (failures < 10) $display("pixel %h level %0d: lum %0d mask %b", p, lev, luminance, mask);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
