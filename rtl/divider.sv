// Divider: raises a one-cycle pulse every PERIOD clock cycles. A counter runs
// from 0 to PERIOD-1 and the pulse is high in the cycle it wraps, so the first
// pulse comes PERIOD cycles after reset falls.
module divider #(
  parameter int unsigned PERIOD = 65_000_000
) (
  input  logic clk,
  input  logic reset,
  output logic pulse
);
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  logic [CW-1:0] count;
  always_ff @(posedge clk) begin
    if (reset) begin
      count <= '0;
      pulse <= 1'b0;
    end else if (count == CW'(PERIOD - 1)) begin
      count <= '0;
      pulse <= 1'b1;
    end else begin
      count <= count + 1'b1;
      pulse <= 1'b0;
    end
  end
endmodule
