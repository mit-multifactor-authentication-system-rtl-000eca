// Eight-digit hex display driver for the board's seven-segment displays, used to
// show debug data. The digits share one set of segment lines, so they are
// time-division multiplexed: each digit is lit alone for DIGIT_MS milliseconds
// (16 ms by default) before the next one. A small lookup table turns each 4-bit
// nibble into segment patterns. Outputs are active low, segment order
// {g,f,e,d,c,b,a}, digit 0 (rightmost) shows data[3:0]; the decimal points stay
// off. Polarity and ordering follow the usual board wiring and are this design's
// choice.
module hex_display #(
  parameter int unsigned CLK_HZ   = 65_000_000,
  parameter int unsigned DIGIT_MS = 16
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] data,
  output logic [6:0]  seg_n,   // {g,f,e,d,c,b,a}, active low
  output logic        dp_n,
  output logic [7:0]  an_n     // digit enables, active low
);
  localparam int unsigned DWELL = (CLK_HZ / 1000) * DIGIT_MS;

  logic       next_digit;
  logic [2:0] digit;
  logic [3:0] nibble;

  divider #(.PERIOD(DWELL)) u_dwell (.clk(clk), .reset(reset), .pulse(next_digit));

  always_ff @(posedge clk) begin
    if (reset) digit <= '0;
    else if (next_digit) digit <= digit + 1'b1;
  end

  always_comb begin
    nibble = data[digit*4 +: 4];
    unique case (nibble)
      4'h0: seg_n = ~7'b0111111;
      4'h1: seg_n = ~7'b0000110;
      4'h2: seg_n = ~7'b1011011;
      4'h3: seg_n = ~7'b1001111;
      4'h4: seg_n = ~7'b1100110;
      4'h5: seg_n = ~7'b1101101;
      4'h6: seg_n = ~7'b1111101;
      4'h7: seg_n = ~7'b0000111;
      4'h8: seg_n = ~7'b1111111;
      4'h9: seg_n = ~7'b1101111;
      4'hA: seg_n = ~7'b1110111;
      4'hB: seg_n = ~7'b1111100;
      4'hC: seg_n = ~7'b0111001;
      4'hD: seg_n = ~7'b1011110;
      4'hE: seg_n = ~7'b1111001;
      default: seg_n = ~7'b1110001;
    endcase
    an_n = ~(8'b1 << digit);
    dp_n = 1'b1;
  end
endmodule
