// Debouncer: the output takes the value of a noisy input (a push button) only once
// the input has held that value for DELAY consecutive cycles. Any change restarts
// the count. On reset the output follows the input at once. The DELAY parameter
// lets the same block run in the 100 MHz and 65 MHz domains; its default of
// 1,000,000 cycles (10 ms at 100 MHz) is this design's choice.
module debounce #(
  parameter int unsigned DELAY = 1_000_000
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy,
  output logic clean
);
  localparam int unsigned CW = $clog2(DELAY + 1);
  logic [CW-1:0] count;
  logic          last;

  always_ff @(posedge clk) begin
    if (reset) begin
      last  <= noisy;
      clean <= noisy;
      count <= '0;
    end else if (noisy != last) begin
      last  <= noisy;
      count <= '0;
    end else if (count == CW'(DELAY - 1)) begin
      clean <= last;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
