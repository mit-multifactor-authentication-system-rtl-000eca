// Testbench for character_spritemap. A reference reads the same font table and
// indexes it as glyph rows (glyph c, 16-pixel row r: word c*8 + r/2, left half
// for even rows), doubling each pixel; random lookups must match one cycle
// later. It also checks that the space is blank and that every printable
// character has some pixels.
module tb_character_spritemap;
  logic clk = 0;
  logic [6:0] c = 0;
  logic [4:0] r = 0, k = 0;
  logic pixel;
  logic [31:0] font [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  character_spritemap dut (.clk(clk), .char_code(c), .row(r), .col(k), .pixel(pixel));
  function automatic logic ref_pixel(input int ch, input int row, input int col);
    logic [31:0] w;
    w = font[ch * 8 + (row / 2) / 2];
    return w[31 - (((row / 2) % 2) * 16 + col / 2)];
  endfunction
  initial begin
    $readmemh("rtl/char_sprites.hex", font);
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic e;
      c = 7'($urandom_range(32, 126)); r = 5'($urandom); k = 5'($urandom);
      e = ref_pixel(c, r, k);
      @(negedge clk);
      checks++; if (pixel !== e) begin failures++; if (failures < 5) $display("FAIL %c %0d %0d", c, r, k); end
    end
    for (int ch = 32; ch < 127; ch++) begin
      int n = 0;
      for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) begin
        c = 7'(ch); r = 5'(y); k = 5'(x); @(negedge clk); n += pixel;
      end
      checks++;
      if (ch == 32 ? n != 0 : n < 8) begin failures++; $display("FAIL glyph %c has %0d pixels", ch, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
