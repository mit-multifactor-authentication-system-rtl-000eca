// Character spritemap: a 1-bit font ROM for the 128 ASCII codes, looked up with
// one cycle of latency like a block ROM. Callers address a 32x32-pixel sprite
// by character, row and column, and the ROM address is just the concatenation
// {char, row, col}, because every dimension is a power of two. The stored font
// has 16x16 glyphs that are shown doubled in both directions, so the stored
// address drops the lowest row and column bit: {char, row[4:1], col[4:1]}.
// FONT_FILE holds 1024 32-bit hex words, two glyph rows per word, first pixel in
// the most significant bit. The source design stored full 32x32 glyphs of the
// DejaVu Sans Mono font; the halved resolution keeps the table small.
module character_spritemap #(
  parameter string FONT_FILE = "rtl/char_sprites.hex"
) (
  input  logic       clk,
  input  logic [6:0] char_code,
  input  logic [4:0] row,
  input  logic [4:0] col,
  output logic       pixel
);
  logic [31:0] rom [1024];
  initial $readmemh(FONT_FILE, rom);

  logic [14:0] index;
  logic [31:0] word;
  assign index = {char_code, row[4:1], col[4:1]};
  assign word  = rom[index[14:5]];

  always_ff @(posedge clk) pixel <= word[5'd31 - index[4:0]];
endmodule
