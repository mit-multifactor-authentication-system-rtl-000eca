// Phase-shift-keying decoder for the ID card signal. For each valid input sample
// it outputs 1 if the sample differs from the previous one (a phase transition)
// and 0 if it is the same, registered, with the valid strobe one cycle later.
module psk_decoder (
  input  logic clk,
  input  logic reset,
  input  logic in,
  input  logic in_valid,
  output logic bit_out,
  output logic bit_valid
);
  logic prev;
  always_ff @(posedge clk) begin
    if (reset) begin
      prev      <= 1'b0;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= in_valid;
      if (in_valid) begin
        bit_out <= in ^ prev;
        prev    <= in;
      end
    end
  end
endmodule
