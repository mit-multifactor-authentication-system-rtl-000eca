// De-duplicator for remote-control digits. A remote repeats its command while a
// key is held, so after passing one command on (registered, one cycle later)
// this block ignores all input for HOLD_S seconds, timed by a seconds timer.
// ready is high while a new command will be accepted and drives LEDs so the user
// knows when to press the next digit. The one-second hold follows the source.
module deduplicator #(
  parameter int unsigned CLK_HZ = 65_000_000,
  parameter int unsigned HOLD_S = 1
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [3:0] cmd_in,
  input  logic       valid_in,
  output logic [3:0] cmd_out,
  output logic       valid_out,
  output logic       ready
);
  logic accept, expired, locked;

  assign accept = valid_in & ~locked;
  assign ready  = ~locked;

  timer #(.CLK_HZ(CLK_HZ)) u_hold (
    .clk(clk), .reset(reset), .start(accept), .length(8'(HOLD_S)), .expired(expired));

  always_ff @(posedge clk) begin
    if (reset) begin
      locked    <= 1'b0;
      cmd_out   <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= accept;
      if (accept) begin
        cmd_out <= cmd_in;
        locked  <= 1'b1;
      end else if (expired) begin
        locked <= 1'b0;
      end
    end
  end
endmodule
