// ssc: seven-segment display controller for the 8-digit display.
//
// Shows the recognised card: digit 1 the rank character, digit 0 the suit
// character, digits 3 and 2 the card number card_map in hexadecimal; digits
// 7..4 stay dark. The digits are lit one at a time, each for
// 2**REFRESH_BITS clocks, by a free-running counter. an selects a digit and
// ca drives its segments, both active low; ca = {dp, g, f, e, d, c, b, a}
// with the decimal point off.
// The outputs and their widths follow the design; the digit layout and the
// refresh rate are this implementation's choices.
module ssc
  import card_pkg::*;
#(
  parameter int REFRESH_BITS = 17
) (
  input  logic       clk,
  input  logic       rst,
  input  seg7_t      rank_score,
  input  seg7_t      suit_score,
  input  logic [5:0] card_map,
  output logic [7:0] an,
  output logic [7:0] ca
);

  logic [REFRESH_BITS+2:0] count;
  logic [2:0]              digit;
  seg7_t                   seg;

  function automatic seg7_t hex_seg(input logic [3:0] v);
    unique case (v)
      4'h0: hex_seg = 7'h3F;  4'h1: hex_seg = 7'h06;  4'h2: hex_seg = 7'h5B;
      4'h3: hex_seg = 7'h4F;  4'h4: hex_seg = 7'h66;  4'h5: hex_seg = 7'h6D;
      4'h6: hex_seg = 7'h7D;  4'h7: hex_seg = 7'h07;  4'h8: hex_seg = 7'h7F;
      4'h9: hex_seg = 7'h6F;  4'hA: hex_seg = 7'h77;  4'hB: hex_seg = 7'h7C;
      4'hC: hex_seg = 7'h39;  4'hD: hex_seg = 7'h5E;  4'hE: hex_seg = 7'h79;
      default: hex_seg = 7'h71;
    endcase
  endfunction

  assign digit = count[REFRESH_BITS+2:REFRESH_BITS];

  always_comb begin
    unique case (digit)
      3'd0:    seg = suit_score;
      3'd1:    seg = rank_score;
      3'd2:    seg = hex_seg(card_map[3:0]);
      3'd3:    seg = hex_seg({2'b00, card_map[5:4]});
      default: seg = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      an    <= 8'hFF;
      ca    <= 8'hFF;
    end else begin
      count <= count + 1'b1;
      an    <= ~(8'b1 << digit);
      ca    <= ~{1'b0, seg};
    end
  end

endmodule
