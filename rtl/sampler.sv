// Sampler: takes one sample of its input every PERIOD cycles, timed by an
// internal divider, and marks it with a one-cycle valid strobe. Used to
// oversample slow external signals at a known rate.
module sampler #(
  parameter int unsigned PERIOD = 8
) (
  input  logic clk,
  input  logic reset,
  input  logic in,
  output logic sample,
  output logic sample_valid
);
  logic tick;
  divider #(.PERIOD(PERIOD)) u_div (.clk(clk), .reset(reset), .pulse(tick));

  always_ff @(posedge clk) begin
    if (reset) begin
      sample       <= 1'b0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= tick;
      if (tick) sample <= in;
    end
  end
endmodule
