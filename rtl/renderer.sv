// Renderer: the pixel pipeline that draws the login screens on an XVGA monitor.
// The timing generator produces the pixel position; the address calculator maps
// it to a character sprite pixel (one cycle), the spritemap ROM returns that
// pixel (one more cycle) and the colour map colours it. The sync and blank
// signals are delayed alongside, so the colour outputs and syncs leave aligned,
// three clock cycles after the position is generated. Colours are forced to
// black during blanking. The pipeline order follows the source design; the
// extra sync delay for the ROM cycle and the blanking are this design's.
module renderer (
  input  logic         clk,
  input  logic         reset,
  input  logic [63:0]  username,
  input  logic [63:0]  dummy_password,
  input  logic [71:0]  id_number,
  input  logic [223:0] joke_line0,
  input  logic [223:0] joke_line1,
  input  logic [223:0] joke_line2,
  input  logic         login_en,
  input  logic         username_prompt_en,
  input  logic         username_en,
  input  logic         password_prompt_en,
  input  logic         password_en,
  input  logic         id_tap_prompt_en,
  input  logic         id_tapped_en,
  input  logic         id_number_en,
  input  logic         authorized_en,
  input  logic         unauthorized_en,
  output logic [3:0]   vga_r,
  output logic [3:0]   vga_g,
  output logic [3:0]   vga_b,
  output logic         vga_hs,
  output logic         vga_vs
);
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync0, vsync0, blank0, hsync1, vsync1, blank1, hsync2, vsync2, blank2;
  logic [6:0]  char_code;
  logic [4:0]  char_row, char_col;
  logic        char_on, char_on2, sprite_pixel;
  logic [3:0]  r, g, b;

  xvga u_xvga (.clk(clk), .reset(reset), .hcount(hcount), .vcount(vcount),
               .hsync(hsync0), .vsync(vsync0), .blank(blank0));

  address_calculator u_addr (
    .clk(clk), .reset(reset), .hcount(hcount), .vcount(vcount),
    .hsync_in(hsync0), .vsync_in(vsync0), .blank_in(blank0),
    .username(username), .dummy_password(dummy_password), .id_number(id_number),
    .joke_line0(joke_line0), .joke_line1(joke_line1), .joke_line2(joke_line2),
    .login_en(login_en), .username_prompt_en(username_prompt_en), .username_en(username_en),
    .password_prompt_en(password_prompt_en), .password_en(password_en),
    .id_tap_prompt_en(id_tap_prompt_en), .id_tapped_en(id_tapped_en), .id_number_en(id_number_en),
    .authorized_en(authorized_en), .unauthorized_en(unauthorized_en),
    .char_code(char_code), .char_row(char_row), .char_col(char_col), .char_on(char_on),
    .hsync_out(hsync1), .vsync_out(vsync1), .blank_out(blank1));

  character_spritemap u_font (.clk(clk), .char_code(char_code), .row(char_row), .col(char_col), .pixel(sprite_pixel));

  always_ff @(posedge clk) begin
    if (reset) begin
      {hsync2, vsync2, blank2, char_on2} <= 4'b1110;
    end else begin
      {hsync2, vsync2, blank2, char_on2} <= {hsync1, vsync1, blank1, char_on};
    end
  end

  background_selector u_colour (.authorized_en(authorized_en), .unauthorized_en(unauthorized_en),
                                .pixel(sprite_pixel & char_on2), .red(r), .green(g), .blue(b));

  always_ff @(posedge clk) begin
    if (reset) begin
      vga_r <= '0; vga_g <= '0; vga_b <= '0; vga_hs <= 1'b1; vga_vs <= 1'b1;
    end else begin
      vga_r  <= blank2 ? 4'h0 : r;
      vga_g  <= blank2 ? 4'h0 : g;
      vga_b  <= blank2 ? 4'h0 : b;
      vga_hs <= hsync2;
      vga_vs <= vsync2;
    end
  end
endmodule
