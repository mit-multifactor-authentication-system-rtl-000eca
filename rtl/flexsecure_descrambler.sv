// Descrambler for the FlexSecure-protected card data. Decoded bits are shifted
// into a 32-bit window, newest bit at position 0, and after every bit the
// window is transformed into the 32-bit card value: each output bit is either a
// window bit chosen by the PERM table, or, for the one position in XOR_POS, the
// XOR of window bits PERM[XOR_POS] and XOR_SRC; the result is XORed with a
// secret KEY. A duplicated bit is expressed by two PERM entries naming the same
// window bit. The scheme's shape (one duplicated bit, one XORed pair, shuffled
// bits, key XOR over a 32-bit window) follows the source; the actual bit map and
// key are not known, so the defaults are an identity order, no XOR
// (XOR_POS = 32 disables it) and a zero key. With those defaults an idle reader
// (all-zero window) reads as 0. Output updates one cycle after each bit.
module flexsecure_descrambler #(
  parameter logic [31:0]        KEY     = 32'h0000_0000,
  parameter logic [32*5-1:0]    PERM    = {5'd31, 5'd30, 5'd29, 5'd28, 5'd27, 5'd26, 5'd25, 5'd24,
                                           5'd23, 5'd22, 5'd21, 5'd20, 5'd19, 5'd18, 5'd17, 5'd16,
                                           5'd15, 5'd14, 5'd13, 5'd12, 5'd11, 5'd10, 5'd9,  5'd8,
                                           5'd7,  5'd6,  5'd5,  5'd4,  5'd3,  5'd2,  5'd1,  5'd0},
  parameter int unsigned        XOR_POS = 32,
  parameter int unsigned        XOR_SRC = 0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        bit_in,
  input  logic        bit_valid,
  output logic [31:0] card_data
);
  logic [31:0] window;
  logic [31:0] shuffled;

  always_comb begin
    for (int i = 0; i < 32; i++) begin
      shuffled[i] = window[PERM[i*5 +: 5]];
      if (i == int'(XOR_POS)) shuffled[i] = window[PERM[i*5 +: 5]] ^ window[XOR_SRC % 32];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      window    <= '0;
      card_data <= KEY;
    end else begin
      if (bit_valid) window <= {window[30:0], bit_in};
      card_data <= shuffled ^ KEY;
    end
  end
endmodule
