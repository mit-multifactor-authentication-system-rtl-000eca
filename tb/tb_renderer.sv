// Testbench for the renderer. Three whole frames are drawn (login screen with
// every field shown, authorized screen with a joke, unauthorized screen) and
// every output pixel and both syncs are compared with a reference model: the
// screen text is laid out independently, glyph pixels are looked up in the
// font image loaded from char_sprites.hex (16x16 glyphs shown doubled), and
// the expected syncs come from the XVGA timing (hsync low for columns
// 1048..1183, vsync low for lines 771..776). Outputs are expected three clock
// cycles after the pixel position.
module tb_renderer;
  localparam int HT = 1344, VT = 806;
  logic clk = 0, reset = 1;
  logic [63:0] user = "paige   ", dpass = "********";
  logic [71:0] idn = "923456789";
  logic [223:0] j0 = "WHY DID THE CHICKEN CROSS TH", j1 = "E ROAD? TO GET TO THE OTHER ",
                j2 = "SIDE.                       ";
  logic le = 1, upe = 1, ue = 1, ppe = 1, pe = 1, itpe = 1, ite = 0, ine = 1, ae = 0, ue2 = 0;
  logic [3:0] r, g, b;
  logic hs, vs;
  logic [31:0] font [0:1023];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  renderer dut (.clk(clk), .reset(reset), .username(user), .dummy_password(dpass), .id_number(idn),
    .joke_line0(j0), .joke_line1(j1), .joke_line2(j2),
    .login_en(le), .username_prompt_en(upe), .username_en(ue), .password_prompt_en(ppe), .password_en(pe),
    .id_tap_prompt_en(itpe), .id_tapped_en(ite), .id_number_en(ine), .authorized_en(ae), .unauthorized_en(ue2),
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs));

  function automatic string str_of(input logic [255:0] v, input int n);
    string s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, string'(v[i*8 +: 8])};
    return s;
  endfunction
  function automatic string line_text(input int l);
    if (ae) case (l)
      0: return "AUTHORIZED";
      1: return {"WELCOME ", str_of(256'(user), 8)};
      3: return str_of(256'(j0), 28);
      4: return str_of(256'(j1), 28);
      5: return str_of(256'(j2), 28);
      default: return "";
    endcase
    if (ue2) return l == 0 ? "UNAUTHORIZED" : "";
    case (l)
      0: return "MIT LOGIN:";
      1: return {"USERNAME: ", str_of(256'(user), 8)};
      2: return {"PASSWORD: ", str_of(256'(dpass), 8)};
      3: return "TAP ID CARD";
      4: return {"ID NUMBER: ", str_of(256'(idn), 9)};
      default: return "";
    endcase
  endfunction
  function automatic bit glyph(input int c, input int y, input int x);
    int n = c * 256 + (y / 2) * 16 + (x / 2);
    return font[n / 32][31 - n % 32];
  endfunction

  // position model, counted from the first cycle after reset
  int px = 0, py = 0, cyc = 0, lit = 0;
  string lines [0:5];
  task automatic refresh();
    for (int l = 0; l < 6; l++) lines[l] = line_text(l);
  endtask
  initial begin
    $readmemh("rtl/char_sprites.hex", font);
    refresh();
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < HT * VT; i++) begin
        @(posedge clk);
        // outputs now reflect the position generated three cycles earlier
        cyc++;
        if (cyc > 3) begin
          int x, y, l, c; bit pix, ebox; logic [3:0] er, eg, eb; logic [7:0] ch;
          x = px; y = py;
          ebox = x < 1024 && y < 768 && x >= 64 && y >= 64 && y < 64 + 6 * 64 && ((y - 64) % 64) < 32;
          l = (y - 64) / 64; c = (x - 64) / 32;
          ch = (ebox && c < lines[l].len()) ? lines[l][c] : " ";
          pix = ebox && glyph(ch[6:0], (y - 64) % 32, (x - 64) % 32);
          er = (pix && !ae) ? 4'hf : 4'h0;
          eg = (pix && !ue2) ? 4'hf : 4'h0;
          eb = (pix && !ae && !ue2) ? 4'hf : 4'h0;
          lit += pix;
          checks++;
          if (r !== er || g !== eg || b !== eb || hs !== !(x >= 1048 && x < 1184) || vs !== !(y >= 771 && y < 777)) begin
            failures++;
            if (failures < 6) $display("FAIL frame %0d at %0d,%0d: rgb %h%h%h expected %h%h%h hs %b vs %b", f, x, y, r, g, b, er, eg, eb, hs, vs);
          end
          px++;
          if (px == HT) begin px = 0; py = (py + 1) % VT; end
          if (px == 0 && py == 0) begin
            // switch screens at a frame boundary, allowing for the pipeline
            if (f == 0) begin ae = 1; le = 0; end
            else if (f == 1) begin ae = 0; ue2 = 1; end
            refresh();
          end
        end
      end
    end
    // the screens must actually contain drawn character pixels
    checks++;
    if (lit < 10000) begin failures++; $display("FAIL only %0d lit pixels", lit); end
    $display("lit pixels %0d", lit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (4_000_000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
