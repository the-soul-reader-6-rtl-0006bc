// tb_vga_mux: random inputs under every select value; the registered output
// one clock later must equal a model of the selection and overlay rules.
module tb_vga_mux;
  import card_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] sel;
  logic       blank, mask, crosshair;
  hcount_t    hcount_pipe;
  vcount_t    vcount_pipe;
  rgb565_t    full_pixel;
  edges_t     edges;
  rgb444_t    vga_out;
  int checks = 0, failures = 0;

  vga_mux dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] e;
    int overlays = 0;
    for (int i = 0; i < 20000; i++) begin
      sel = 3'($urandom); blank = ($urandom_range(9) == 0);
      mask = 1'($urandom); crosshair = ($urandom_range(7) == 0);
      full_pixel = rgb565_t'($urandom);
      edges = '{left: 11'($urandom_range(20)), right: 11'($urandom_range(20)),
                top: 10'($urandom_range(20)), bottom: 10'($urandom_range(20))};
      hcount_pipe = 11'($urandom_range(20)); vcount_pipe = 10'($urandom_range(20));
      if (sel[0]) e = mask ? 12'hFFF : 12'h000;
      else        e = {full_pixel[15:12], full_pixel[10:7], full_pixel[4:1]};
      if ((sel[1] && crosshair) ||
          (sel[2] && (hcount_pipe == edges.left || hcount_pipe == edges.right ||
                      vcount_pipe == edges.top  || vcount_pipe == edges.bottom))) begin
        e = 12'hF0F; overlays++;
      end
      if (blank) e = 12'h000;
      @(negedge clk);
      checks++;
      if (vga_out !== e) begin
        failures++;
        if (failures < 10) $display("i=%0d sel %b: got %h expected %h", i, sel, vga_out, e);
      end
    end
    if (overlays == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
