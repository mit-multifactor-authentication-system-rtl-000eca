// Edge detector: outputs a one-cycle pulse the cycle after the input makes a
// low-to-high (EDGE = POSEDGE) or high-to-low (EDGE = NEGEDGE) transition. The
// previous input value is held in one flip-flop, so the pulse comes one cycle
// after the new level is first seen. Reset loads the level that cannot start the watched edge, so no
// edge is reported out of reset.
module edge_detector
  import mfa_pkg::*;
#(
  parameter edge_t EDGE = POSEDGE
) (
  input  logic clk,
  input  logic reset,
  input  logic in,
  output logic pulse
);
  logic prev;
  always_ff @(posedge clk) begin
    if (reset) begin
      prev  <= (EDGE == POSEDGE);
      pulse <= 1'b0;
    end else begin
      prev  <= in;
      pulse <= (EDGE == POSEDGE) ? (in & ~prev) : (~in & prev);
    end
  end
endmodule
