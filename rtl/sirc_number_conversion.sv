// Converts a remote-control command into the digit on the key pressed. The
// remote numbers its digit keys from 0, so key "1" sends command 0 ... key "9"
// sends 8, and key "0" sends 9. Commands 0-8 become 1-9, command 9 becomes 0;
// other commands are not digits and produce no output. Output is registered:
// digit and valid follow the input strobe by one cycle. Mapping the "0" key and
// dropping non-digits are this design's choices.
module sirc_number_conversion (
  input  logic       clk,
  input  logic       reset,
  input  logic [3:0] cmd_in,
  input  logic       valid_in,
  output logic [3:0] digit,
  output logic       valid_out
);
  always_ff @(posedge clk) begin
    if (reset) begin
      digit     <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in && (cmd_in <= 4'd9);
      if (valid_in) digit <= (cmd_in == 4'd9) ? 4'd0 : cmd_in + 4'd1;
    end
  end
endmodule
