// Seconds timer: a start pulse loads a length in seconds, given at run time, and
// restarts a one-second divider; expired goes high once that many seconds have
// passed and stays high until the next start or reset. A length of zero expires
// one cycle after start. The level-style expired output and the 8-bit length are
// this design's choices.
module timer #(
  parameter int unsigned CLK_HZ = 65_000_000,
  parameter int unsigned LEN_W  = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [LEN_W-1:0] length,
  output logic             expired
);
  logic             tick;
  logic [LEN_W-1:0] remaining;
  logic             running;

  // The one-second divider is restarted with the timer, so the first second is full.
  divider #(.PERIOD(CLK_HZ)) u_second (.clk(clk), .reset(reset | start), .pulse(tick));

  always_ff @(posedge clk) begin
    if (reset) begin
      remaining <= '0;
      running   <= 1'b0;
      expired   <= 1'b0;
    end else if (start) begin
      remaining <= length;
      running   <= 1'b1;
      expired   <= 1'b0;
    end else if (running) begin
      if (remaining == '0) begin
        running <= 1'b0;
        expired <= 1'b1;
      end else if (tick) begin
        remaining <= remaining - 1'b1;
      end
    end
  end
endmodule
