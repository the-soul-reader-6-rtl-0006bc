// tb_bram_sdp: checks the frame-buffer RAM at its full 240x320 RGB size.
// Random words are written through port A and kept in a reference array;
// reads through port B are checked two clock edges after the address is
// presented, and checked not to appear after one edge. A write in the same
// cycle as the read address must be seen by that read; a write one cycle
// later must not.
module tb_bram_sdp;
  localparam int WIDTH = 16;
  localparam int DEPTH = 76800;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic             wea;
  logic [AW-1:0]    addra, addrb;
  logic [WIDTH-1:0] dina, doutb;
  int checks = 0, failures = 0;

  bram_sdp #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] ref_mem [int];
  logic [AW-1:0]    addrs [64];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wea = 0; addra = '0; addrb = '0; dina = '0;
    @(negedge clk);
    // write 64 random locations, including both ends
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? '0 : (i == 1) ? AW'(DEPTH - 1) : AW'($urandom_range(DEPTH - 1));
      wea = 1; addra = addrs[i]; dina = WIDTH'($urandom);
      ref_mem[int'(addrs[i])] = dina;
      @(negedge clk);
    end
    wea = 0;
    // read back each one, checking the two-cycle latency
    for (int i = 0; i < 64; i++) begin
      addrb = addrs[i];
      @(negedge clk);
      addrb = addrs[(i + 1) % 64];       // next address must not disturb this read
      @(negedge clk);
      checks++;
      if (doutb !== ref_mem[int'(addrs[i])]) begin
        failures++;
        $display("read %0d: got %h expected %h", addrs[i], doutb, ref_mem[int'(addrs[i])]);
      end
    end
    // one-edge read must still show the previous result
    addrb = addrs[2]; @(negedge clk); addrb = addrs[3]; @(negedge clk);
    addrb = addrs[4]; @(negedge clk);
    checks++;
    if (ref_mem[int'(addrs[3])] != ref_mem[int'(addrs[4])] && doutb !== ref_mem[int'(addrs[3])]) begin
      failures++; $display("latency: data arrived early");
    end
    // a write in the same cycle as the read address is seen by the read
    addrb = addrs[5]; wea = 1; addra = addrs[5]; dina = ~ref_mem[int'(addrs[5])];
    ref_mem[int'(addrs[5])] = dina;
    @(negedge clk); wea = 0;
    @(negedge clk);
    checks++;
    if (doutb !== ref_mem[int'(addrs[5])]) begin failures++; $display("same-cycle write not seen"); end
    // a write one cycle after the read address is not seen by that read
    addrb = addrs[6];
    @(negedge clk);
    wea = 1; addra = addrs[6]; dina = ~ref_mem[int'(addrs[6])];
    @(negedge clk); wea = 0;
    checks++;
    if (doutb !== ref_mem[int'(addrs[6])]) begin failures++; $display("later write seen too early"); end
    ref_mem[int'(addrs[6])] = ~ref_mem[int'(addrs[6])];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
