// tb_ssc: with a short refresh period (2**2 clocks per digit) the digit
// enables must step through digits 0..7, one low bit at a time, each held
// 4 clocks, with the suit, rank and card-number hex patterns on digits
// 0..3 and dark segments on 4..7.
module tb_ssc;
  import card_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  seg7_t rank_score, suit_score;
  logic [5:0] card_map;
  logic [7:0] an, ca;
  int checks = 0, failures = 0;

  ssc #(.REFRESH_BITS(2)) dut (.*);

  localparam logic [6:0] HEX [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                                      7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held [8];
    rank_score = 7'h77; suit_score = 7'h39; card_map = 6'd50;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);     // first registered output
    for (int n = 0; n < 64 * 4; n++) begin
      int d;
      logic [6:0] e;
      d = (n / 4) % 8;
      unique case (d)
        0: e = suit_score;
        1: e = rank_score;
        2: e = HEX[card_map[3:0]];
        3: e = HEX[{2'b00, card_map[5:4]}];
        default: e = 7'h00;
      endcase
      checks++;
      if (an !== ~(8'b1 << d) || ca !== ~{1'b0, e}) begin
        failures++;
        if (failures < 10) $display("n=%0d an %b ca %b expected digit %0d seg %h", n, an, ca, d, e);
      end
      if (n == 100) begin rank_score = 7'h5B; card_map = 6'd13; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
