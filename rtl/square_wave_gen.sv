// Square wave generator: a 50% duty-cycle square wave whose period is PERIOD
// clock cycles. A counter runs for PERIOD/2 cycles and the output flips each
// time it wraps. The default of 520 cycles gives the 125 kHz carrier for the
// passive RFID cards from the 65 MHz clock. PERIOD should be even.
module square_wave_gen #(
  parameter int unsigned PERIOD = 520
) (
  input  logic clk,
  input  logic reset,
  output logic wave
);
  localparam int unsigned HALF = PERIOD / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset) begin
      count <= '0;
      wave  <= 1'b0;
    end else if (count == CW'(HALF - 1)) begin
      count <= '0;
      wave  <= ~wave;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
