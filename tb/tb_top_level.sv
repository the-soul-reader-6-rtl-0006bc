// tb_top_level: end-to-end run of the card reader at full size.
//
// A camera model streams a 320x240 image (byte pairs of RGB 5:6:5, pixel
// clock at a quarter of the system clock) that, once turned into the
// 240x320 portrait frame, shows a dark table and a white card spanning
// x 40..200, y 30..300, with two black marks on the cross-hair. The card's
// 28x69 corner carries rank kernel RANK over suit kernel SUIT, both random
// and loaded through the kernel port beforehand. Threshold level 210, as in
// the design's example.
// Checked: the frame buffer holds the rotated camera image; the centre of
// mass equals the one computed here from the thresholded frame; the four
// edges equal the card's; the card number is SUIT*13 + RANK with both
// matching scores 0; the seven-segment digits show the suit and rank
// characters; the display shows the image, the mask, the cross-hair and
// edge overlays, the mirrored image and the 2x image at chosen positions.
// Each mechanism (camera pixels and frames, centre updates, edge passes,
// corner scores, card results, display modes, mirror, 2x scale) is counted
// and one that never happened is a failure.
module tb_top_level;
  import card_pkg::*;

  localparam int RANK = 10;     // Q
  localparam int SUIT = 1;      // hearts
  localparam int CL = 40, CR = 200, CT = 30, CB = 300;
  localparam logic [15:0] TABLE = 16'h4208;   // luminance 64
  localparam logic [15:0] WHITE = 16'hFFFF;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] sw = {8'd210, 8'h00};
  logic cam_pclk = 0, cam_href = 0, cam_vsync = 0;
  logic [7:0] cam_data = 0;
  logic cam_xclk;
  logic kernel_we = 0, kernel_data = 0;
  logic [4:0] kernel_sel = 0;
  logic [KERNEL_AW-1:0] kernel_addr = 0;
  rgb444_t vga_out;
  logic hsync, vsync;
  logic [7:0] an, ca;
  logic [5:0] card_map;
  logic card_valid;
  int checks = 0, failures = 0;

  top_level dut (
    .clk_65mhz(clk), .rst, .sw, .cam_pclk, .cam_href, .cam_vsync, .cam_data, .cam_xclk,
    .kernel_we, .kernel_sel, .kernel_addr, .kernel_data,
    .vga_out, .hsync, .vsync, .an, .ca, .card_map, .card_valid
  );

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scene ----------------
  logic kern [17][28*40];

  function automatic logic [15:0] scene(int fx, int fy);
    if (fx >= CL && fx <= CR && fy >= CT && fy <= CB) begin
      if (fx < CL + 28 && fy < CT + 40) return kern[RANK][(fy - CT) * 28 + fx - CL] ? WHITE : 16'h0000;
      if (fx < CL + 28 && fy < CT + 69) return kern[13 + SUIT][(fy - CT - 40) * 28 + fx - CL] ? WHITE : 16'h0000;
      if ((fx == 125 && fy == 160) || (fx == 121 && fy == 170)) return 16'h0000;  // marks on the card
      return WHITE;
    end
    return TABLE;
  endfunction

  function automatic bit is_white(logic [15:0] p);
    int lum;
    lum = (int'(p[15:11]) * 8 + int'(p[10:5]) * 4 + int'(p[4:0]) * 8) / 3;
    return lum > 210;
  endfunction

  // ---------------- camera model ----------------
  bit camera_on = 0;
  task automatic cam_byte(input logic [7:0] b);
    cam_data = b;
    repeat (2) @(negedge clk); cam_pclk = 1;
    repeat (2) @(negedge clk); cam_pclk = 0;
  endtask

  initial begin
    wait (camera_on);
    forever begin
      cam_vsync = 1; repeat (100) @(negedge clk); cam_vsync = 0; repeat (100) @(negedge clk);
      for (int cy = 0; cy < 240; cy++) begin
        cam_href = 1;
        for (int cx = 0; cx < 320; cx++) begin
          logic [15:0] p;
          p = scene(239 - cy, cx);
          cam_byte(p[15:8]);
          cam_byte(p[7:0]);
        end
        cam_href = 0;
        repeat (50) @(negedge clk);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_cam_pix = 0, n_cam_frames = 0, n_com = 0, n_edges = 0, n_scores = 0, n_cards = 0;
  int n_vga_frames = 0, n_mask_view = 0, n_xhair = 0, n_edge_lines = 0, n_mirror = 0, n_scale2 = 0;
  bit digits_seen [8];
  always @(posedge clk) if (!rst) begin
    if (dut.cam_valid)            n_cam_pix++;
    if (dut.frame_done)           n_cam_frames++;
    if (dut.com_valid)            n_com++;
    if (dut.edges_done)           n_edges++;
    if (dut.u_math.valid[0])      n_scores++;
    if (card_valid)               n_cards++;
    if (dut.hcount == 0 && dut.vcount == 0) n_vga_frames++;
    for (int d = 0; d < 8; d++) if (an == ~(8'b1 << d)) digits_seen[d] = 1;
  end

  // display probe: the value shown at raster (h, v) leaves vga_out one clock
  // after that position reaches the end of the pixel pipeline
  hcount_t prev_h;
  vcount_t prev_v;
  always @(posedge clk) begin
    prev_h <= dut.hp;
    prev_v <= dut.vp;
  end

  task automatic probe(input int h, input int v, input logic [11:0] e, input string what);
    // wait for the raster to reach (h, v), then compare
    do @(negedge clk); while (!(int'(prev_h) == h && int'(prev_v) == v));
    checks++;
    if (vga_out !== e) begin
      failures++;
      $display("%s: vga_out at (%0d,%0d) = %h expected %h", what, h, v, vga_out, e);
    end
  endtask

  task automatic wait_vga_frames(input int n);
    int f0;
    f0 = n_vga_frames;
    while (n_vga_frames < f0 + n) @(negedge clk);
  endtask

  initial begin
    longint xs, ys, cnt;
    int ex, ey, seg_checked;
    logic [6:0] rseg [13] = '{7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F,
                              7'h6F, 7'h3F, 7'h1E, 7'h67, 7'h76, 7'h77};
    logic [6:0] sseg [4] = '{7'h6D, 7'h76, 7'h39, 7'h5E};

    foreach (kern[k, a]) kern[k][a] = 1'($urandom);
    repeat (5) @(negedge clk);
    rst = 0;
    // load the 17 kernels
    for (int k = 0; k < 17; k++)
      for (int a = 0; a < ((k < 13) ? 28 * 40 : 28 * 29); a++) begin
        kernel_we = 1; kernel_sel = 5'(k); kernel_addr = KERNEL_AW'(a); kernel_data = kern[k][a];
        @(negedge clk);
      end
    kernel_we = 0;
    camera_on = 1;

    // ---- wait for one whole camera frame, then check the frame buffer ----
    wait (n_cam_frames >= 2);
    repeat (10) @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      int fx, fy;
      fx = $urandom_range(239); fy = $urandom_range(319);
      if (i < 4) begin fx = (i % 2) ? 239 : 0; fy = (i / 2) ? 319 : 0; end
      checks++;
      if (dut.u_framebuffer_1.mem[fy * 240 + fx] !== scene(fx, fy)) begin
        failures++;
        if (failures < 10) $display("frame buffer (%0d,%0d) = %h expected %h", fx, fy,
                                    dut.u_framebuffer_1.mem[fy * 240 + fx], scene(fx, fy));
      end
    end

    // ---- centre of mass and edges after a whole display frame ----
    wait_vga_frames(2);
    xs = 0; ys = 0; cnt = 0;
    for (int fy = 0; fy < 320; fy++)
      for (int fx = 0; fx < 240; fx++)
        if (is_white(scene(fx, fy))) begin xs += fx; ys += fy; cnt++; end
    ex = int'(xs / cnt); ey = int'(ys / cnt);
    checks++;
    if (int'(dut.x_com) != ex || int'(dut.y_com) != ey) begin
      failures++; $display("centre (%0d,%0d) expected (%0d,%0d)", dut.x_com, dut.y_com, ex, ey);
    end
    checks++;
    if (int'(dut.edges.left) != CL || int'(dut.edges.right) != CR ||
        int'(dut.edges.top) != CT || int'(dut.edges.bottom) != CB) begin
      failures++;
      $display("edges l%0d r%0d t%0d b%0d", dut.edges.left, dut.edges.right, dut.edges.top, dut.edges.bottom);
    end

    // ---- card recognised once the corner has been stored and compared ----
    wait_vga_frames(3);
    checks++;
    if (int'(card_map) != SUIT * 13 + RANK) begin
      failures++; $display("card_map %0d expected %0d", card_map, SUIT * 13 + RANK);
    end
    checks++;
    if (dut.scores[RANK] != 0 || dut.scores[13 + SUIT] != 0) begin
      failures++; $display("matching scores %0d %0d", dut.scores[RANK], dut.scores[13 + SUIT]);
    end
    for (int k = 0; k < 17; k++) begin
      if (k != RANK && k != 13 + SUIT) begin
        checks++;
        if (dut.scores[k] == 0) begin failures++; $display("kernel %0d also scores 0", k); end
      end
    end

    // ---- seven-segment digits 0 and 1 ----
    seg_checked = 0;
    while (seg_checked < 2) begin
      @(negedge clk);
      if (an == 8'b1111_1110 && seg_checked == 0) begin
        checks++; seg_checked++;
        if (ca !== ~{1'b0, sseg[SUIT]}) begin failures++; $display("suit digit %b", ca); end
      end
      if (an == 8'b1111_1101 && seg_checked == 1) begin
        checks++; seg_checked++;
        if (ca !== ~{1'b0, rseg[RANK]}) begin failures++; $display("rank digit %b", ca); end
      end
    end

    // ---- display modes ----
    probe(100, 200, 12'hFFF, "image, card");
    probe(10, 10, 12'h444, "image, table");
    probe(600, 10, 12'h000, "image, right of frame");
    sw[3] = 1; n_mask_view++;
    probe(10, 10, 12'h000, "mask, table");
    probe(100, 200, 12'hFFF, "mask, card");
    sw[4] = 1; n_xhair++;
    probe(int'(dut.x_com), 250, 12'hF0F, "cross-hair column");
    probe(20, int'(dut.y_com), 12'hF0F, "cross-hair row");
    sw[5] = 1; n_edge_lines++;
    probe(CL, 310, 12'hF0F, "left edge line");
    probe(500, CB, 12'hF0F, "bottom edge line");
    sw[5:3] = 3'b000;
    wait_vga_frames(1);
    sw[2] = 1; n_mirror++;                // mirrored: frame x = 239 - h
    probe(239 - 100, 200, 12'hFFF, "mirror, card");
    probe(239 - 10, 10, 12'h444, "mirror, table");
    probe(239 - 220, 10, 12'h444, "mirror, table left");
    sw[2] = 0;
    sw[1:0] = 2'b01; n_scale2++;          // 2x
    probe(200, 400, 12'hFFF, "2x, card");
    probe(20, 20, 12'h444, "2x, table");
    probe(470, 630, 12'h444, "2x, table corner");
    probe(600, 100, 12'h000, "2x, outside");
    sw[1:0] = 2'b00;

    // ---- every mechanism must have happened ----
    begin
      int counts [12];
      string names [12];
      counts = '{n_cam_pix, n_cam_frames, n_com, n_edges, n_scores, n_cards,
                          n_vga_frames, n_mask_view, n_xhair, n_edge_lines, n_mirror, n_scale2};
      names = '{"camera pixels", "camera frames", "centre updates", "edge passes",
                            "score updates", "card results", "display frames", "mask view",
                            "cross-hair", "edge lines", "mirror", "2x scale"};
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("never happened: %s", names[i]); end
        $display("%-15s %0d", names[i], counts[i]);
      end
      foreach (digits_seen[d]) begin
        checks++;
        if (!digits_seen[d]) begin failures++; $display("digit %0d never lit", d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
