// Serial output selector: merges every source of outgoing characters into the
// single RS-232 sender. Sources are the bell request, the echo of a typed
// character and NPROMPTS prompt senders. The highest-priority active request
// wins: bell, then echo, then prompt 0, 1, ... The chosen character and its send
// strobe are registered, one cycle after the request. Bell first follows the
// source; the rest of the order is this design's choice.
module serial_output_selector #(
  parameter int unsigned NPROMPTS = 4
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     bell_en,
  input  logic                     echo_en,
  input  logic [7:0]               echo_char,
  input  logic [NPROMPTS-1:0]      prompt_send,
  input  logic [NPROMPTS-1:0][7:0] prompt_char,
  output logic                     send,
  output logic [7:0]               char_out
);
  import mfa_pkg::*;
  logic       next_send;
  logic [7:0] next_char;

  always_comb begin
    next_send = 1'b0;
    next_char = '0;
    for (int i = NPROMPTS - 1; i >= 0; i--) begin
      if (prompt_send[i]) begin
        next_send = 1'b1;
        next_char = prompt_char[i];
      end
    end
    if (echo_en) begin
      next_send = 1'b1;
      next_char = echo_char;
    end
    if (bell_en) begin
      next_send = 1'b1;
      next_char = ASCII_BELL;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      send     <= 1'b0;
      char_out <= '0;
    end else begin
      send     <= next_send;
      char_out <= next_char;
    end
  end
endmodule
