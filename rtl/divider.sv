// divider: unsigned restoring divider, one quotient bit per clock.
//
// Pulse start with dividend and divisor; WIDTH cycles later done pulses for
// one cycle with the quotient. A zero divisor gives an all-ones quotient.
// Inputs are sampled at start and may change afterwards; a start while busy
// restarts the division. Used by com for the centre-of-mass division; the
// design does not say how it divides, so this sequential divider is this
// implementation's choice.
module divider #(
  parameter int WIDTH = 25
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic             done,
  output logic             busy
);

  logic [WIDTH-1:0] rem, quo, dsr;
  logic [$clog2(WIDTH+1)-1:0] count;
  logic [WIDTH:0]   shifted;   // partial remainder with the next dividend bit
  logic [WIDTH+1:0] trial;     // shifted - divisor, sign in the top bit

  always_comb begin
    shifted = {rem, quo[WIDTH-1]};
    trial   = {1'b0, shifted} - {2'b00, dsr};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      count    <= '0;
      rem      <= '0;
      quo      <= '0;
      dsr      <= '0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        rem   <= '0;
        quo   <= dividend;
        dsr   <= divisor;
        count <= '0;
      end else if (busy) begin
        // shift the next dividend bit into the partial remainder
        if (!trial[WIDTH+1]) begin
          rem <= trial[WIDTH-1:0];
          quo <= {quo[WIDTH-2:0], 1'b1};
        end else begin
          rem <= shifted[WIDTH-1:0];
          quo <= {quo[WIDTH-2:0], 1'b0};
        end
        count <= count + 1'b1;
        if (32'(count) == WIDTH - 1) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= (!trial[WIDTH+1]) ? {quo[WIDTH-2:0], 1'b1} : {quo[WIDTH-2:0], 1'b0};
        end
      end
    end
  end

endmodule
