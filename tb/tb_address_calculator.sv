// Testbench for address_calculator. A reference model written with strings
// lays out the same screens (text lines every 64 pixels from y = 64, 32-pixel
// character boxes from x = 64) for the login, authorized and unauthorized
// modes with random enables and buffer contents. Random pixel positions are
// driven and the registered character, sprite row and column, char_on and the
// delayed syncs are compared one cycle later.
module tb_address_calculator;
  logic clk = 0, reset = 1;
  logic [10:0] hc = 0;
  logic [9:0] vc = 0;
  logic hs = 1, vs = 1, bl = 0;
  logic [63:0] user, dpass;
  logic [71:0] idn;
  logic [223:0] j0, j1, j2;
  logic le, upe, ue, ppe, pe, itpe, ite, ine, ae, ue2;
  logic [6:0] ch;
  logic [4:0] row, col;
  logic on, hso, vso, blo;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  address_calculator dut (.clk(clk), .reset(reset), .hcount(hc), .vcount(vc), .hsync_in(hs), .vsync_in(vs), .blank_in(bl),
    .username(user), .dummy_password(dpass), .id_number(idn), .joke_line0(j0), .joke_line1(j1), .joke_line2(j2),
    .login_en(le), .username_prompt_en(upe), .username_en(ue), .password_prompt_en(ppe), .password_en(pe),
    .id_tap_prompt_en(itpe), .id_tapped_en(ite), .id_number_en(ine), .authorized_en(ae), .unauthorized_en(ue2),
    .char_code(ch), .char_row(row), .char_col(col), .char_on(on), .hsync_out(hso), .vsync_out(vso), .blank_out(blo));

  function automatic string str_of(input logic [255:0] v, input int n);
    string s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, string'(v[i*8 +: 8])};
    return s;
  endfunction
  // printable ASCII only, as the design's text sources never hold NUL
  function automatic logic [7:0] pr();
    return 8'($urandom_range(32, 126));
  endfunction
  function automatic string sp(input int n);
    string s = "";
    repeat (n) s = {s, " "};
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
    if (!le) return "";
    case (l)
      0: return "MIT LOGIN:";
      1: return {upe ? "USERNAME: " : sp(10), ue ? str_of(256'(user), 8) : sp(8)};
      2: return {ppe ? "PASSWORD: " : sp(10), pe ? str_of(256'(dpass), 8) : sp(8)};
      3: return ite ? "ID TAPPED" : (itpe ? "TAP ID CARD" : "");
      4: return ine ? {"ID NUMBER: ", str_of(256'(idn), 9)} : "";
      default: return "";
    endcase
  endfunction
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int m = 0; m < 40; m++) begin
      {le, upe, ue, ppe, pe, itpe, ite, ine} = 8'($urandom);
      ae = (m % 4 == 1); ue2 = (m % 4 == 2); le = !(ae | ue2);
      for (int q = 0; q < 8; q++) begin user[q*8 +: 8] = pr(); dpass[q*8 +: 8] = pr(); end
      for (int q = 0; q < 9; q++) idn[q*8 +: 8] = pr();
      for (int q = 0; q < 28; q++) begin j0[q*8 +: 8] = pr(); j1[q*8 +: 8] = pr(); j2[q*8 +: 8] = pr(); end
      for (int i = 0; i < 300; i++) begin
        int x, y, l, c; bit ebox; logic [7:0] ec; string t;
        x = $urandom_range(0, 1023); y = (i % 3 == 0) ? $urandom_range(64, 64 + 6 * 64) : $urandom_range(0, 767);
        hc = 11'(x); vc = 10'(y); hs = $urandom_range(0, 1); vs = $urandom_range(0, 1); bl = (i % 17 == 0);
        ebox = !bl && x >= 64 && x < 64 + 1024 && y >= 64 && y < 64 + 6 * 64 && ((y - 64) % 64) < 32;
        l = (y - 64) / 64; c = (x - 64) / 32;
        t = line_text(l);
        ec = (ebox && c < t.len()) ? t[c] : " ";
        @(negedge clk);
        checks++;
        if (on !== ebox || hso !== hs || vso !== vs || blo !== bl ||
            (ebox && (ch !== ec[6:0] || row !== 5'((y - 64) % 32) || col !== 5'((x - 64) % 32)))) begin
          failures++;
          if (failures < 5) $display("FAIL at %0d,%0d: char %h expected %h on %b", x, y, ch, ec, on);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
