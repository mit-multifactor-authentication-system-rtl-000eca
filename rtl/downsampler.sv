// Downsampler: gathers RATIO valid samples, then outputs the majority value of
// the window with a one-cycle valid strobe, filtering out short glitches. The
// window restarts on reset, which lets a caller align windows to an external
// event. A tie (exactly half ones) gives 0, a choice of this design.
module downsampler #(
  parameter int unsigned RATIO = 8
) (
  input  logic clk,
  input  logic reset,
  input  logic sample,
  input  logic sample_valid,
  output logic out,
  output logic out_valid
);
  localparam int unsigned CW = $clog2(RATIO + 1);
  logic [CW-1:0] seen;
  logic [CW-1:0] ones;
  logic [CW-1:0] ones_next;

  always_comb ones_next = ones + CW'(sample);

  always_ff @(posedge clk) begin
    if (reset) begin
      seen      <= '0;
      ones      <= '0;
      out       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (sample_valid) begin
        if (seen == CW'(RATIO - 1)) begin
          out       <= (2 * int'(ones_next)) > int'(RATIO);
          out_valid <= 1'b1;
          seen      <= '0;
          ones      <= '0;
        end else begin
          seen <= seen + 1'b1;
          ones <= ones_next;
        end
      end
    end
  end
endmodule
