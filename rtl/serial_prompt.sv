// Serial prompt sender. On start it asks to send the first character of the
// PROMPT string (LEN characters, first character in the most significant byte)
// and then one more character each time the sender reports done, until the whole
// string is out. busy is high while a prompt is in progress; a start while busy
// is ignored. One parameterized module serves every prompt, as in the source;
// the prompt texts are chosen where it is instantiated.
module serial_prompt #(
  parameter int unsigned     LEN    = 4,
  parameter logic [LEN*8-1:0] PROMPT = "Hi\r\n"
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic       tx_done,
  output logic       send,
  output logic [7:0] char_out,
  output logic       busy
);
  logic [$clog2(LEN+1)-1:0] index;

  always_ff @(posedge clk) begin
    if (reset) begin
      index    <= '0;
      busy     <= 1'b0;
      send     <= 1'b0;
      char_out <= '0;
    end else begin
      send <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          send     <= 1'b1;
          char_out <= PROMPT[LEN*8-1 -: 8];
          index    <= 1;
        end
      end else if (tx_done) begin
        if (int'(index) == LEN) begin
          busy <= 1'b0;
        end else begin
          send     <= 1'b1;
          char_out <= PROMPT[(LEN - int'(index))*8 - 1 -: 8];
          index    <= index + 1'b1;
        end
      end
    end
  end
endmodule
