// End-to-end testbench for the whole authentication system at a 1 MHz system
// clock and 15625 baud (64 clocks per serial bit), so a "second" of the
// design's timers is 1,000,000 cycles. The surroundings are modelled: a serial
// terminal (sender and receiver), an active-low IR receiver replaying Sony
// remote frames, a card reader whose output toggles while a card is near, the
// two clocks with their lock flag and the reset button.
//
// It plays three sessions:
//   1. a valid user: enter, a username with a mistyped character and a
//      backspace, a password with one character too many (bell), a card tap,
//      nine ID digits each sent three times like a held key, then the green
//      authorized screen with a joke, left with escape;
//   2. a wrong password: the identity check fails, the red unauthorized screen
//      shows and its timer returns the system to idle;
//   3. a user who stops typing: the username stage times out.
// Then the reset button is pressed. The text the terminal receives, the
// stored fields, the states and the colours on the VGA outputs are checked,
// and each mechanism is counted; one that never happened is a failure.
module tb_mfa_top;
  import mfa_pkg::*;
  localparam int CLK_HZ = 1_000_000, BAUD = 15625, BIT = CLK_HZ / BAUD, SLOT = 600;
  localparam int FRAME = 1344 * 806;  // clocks per XVGA frame
  logic clk = 0, clk100 = 0, locked = 0, btn = 0;
  logic uart_rx = 1, ir_n = 1, rfid_in = 0;
  logic clockgen_reset, uart_tx, carrier, vga_hs, vga_vs, dp_n;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [6:0] seg_n;
  logic [7:0] an_n;
  logic [15:0] led;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always #3 clk100 = ~clk100;

  mfa_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DEBOUNCE_DELAY(4)) dut (
    .clk_100mhz(clk100), .clk_65mhz(clk), .clocks_locked(locked), .btn_reset(btn), .clockgen_reset(clockgen_reset),
    .uart_rx(uart_rx), .uart_tx(uart_tx), .ir_n(ir_n), .rfid_carrier(carrier), .rfid_in(rfid_in),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .vga_hs(vga_hs), .vga_vs(vga_vs),
    .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n), .led(led));

  main_state_t state;
  assign state = main_state_t'(led[3:0]);

  // ---- mechanism counters ----
  int n_prompt = 0, n_echo = 0, n_star = 0, n_bell = 0, n_backspace = 0, n_tap = 0;
  int n_frames = 0, n_digits = 0, n_dropped = 0, n_auth = 0, n_unauth = 0, n_joke = 0;
  int n_escape = 0, n_unauth_timeout = 0, n_stage_timeout = 0, n_green = 0, n_red = 0, n_white = 0;
  int n_reset = 0, n_hex_digits = 0, n_not_ready = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s)", what, state.name()); end
  endtask

  // ---- serial terminal: receiver ----
  string term = "", expected = "";
  logic live = 0;
  initial begin
    wait (live);
    forever begin
      logic [7:0] c;
      @(negedge uart_tx);
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); c[i] = uart_tx; end
      repeat (BIT) @(posedge clk);
      check(uart_tx == 1'b1, "stop bit");
      term = {term, string'(c)};
      if (c == ASCII_BELL) n_bell++;
      if (c == ASCII_ASTERISK) n_star++;
    end
  end
  // ---- serial terminal: sender ----
  task automatic send_char(input logic [7:0] c);
    uart_rx = 0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = c[i]; repeat (BIT) @(negedge clk); end
    uart_rx = 1; repeat (BIT * 3) @(negedge clk);
  endtask
  task automatic send_str(input string s);
    for (int i = 0; i < s.len(); i++) send_char(s[i]);
  endtask
  // wait until the terminal has printed everything expected so far
  task automatic expect_text(input string s, input string what);
    int t = 0;
    expected = {expected, s};
    while (term.len() < expected.len() && t < 100 * BIT * 10) begin @(negedge clk); t++; end
    repeat (BIT * 12) @(negedge clk);
    check(term == expected, what);
    if (term != expected) $display("  terminal: \"%s\"\n  expected: \"%s\"", term, expected);
  endtask

  // ---- IR remote: Sony 12-bit frames, address 1, key command ----
  task automatic send_sirc(input logic [6:0] command);
    logic [11:0] code;
    code = {5'd1, command};
    ir_n = 0; repeat (4 * SLOT) @(negedge clk); ir_n = 1; repeat (SLOT) @(negedge clk);
    for (int b = 0; b < 12; b++) begin
      ir_n = 0; repeat (code[b] ? 2 * SLOT : SLOT) @(negedge clk); ir_n = 1; repeat (SLOT) @(negedge clk);
    end
    n_frames++;
  endtask
  // press a digit key, held for three frames 45 ms apart; press again if the
  // receiver missed all three (the user sees no progress on the screen)
  task automatic press_digit(input int d);
    int n_before;
    while (!led[15]) @(negedge clk);
    n_before = n_digits;
    for (int tries = 0; tries < 4 && n_digits == n_before; tries++)
      for (int rep = 0; rep < 3; rep++) begin
        repeat ($urandom_range(0, SLOT - 1)) @(negedge clk);
        send_sirc(7'(d == 0 ? 9 : d - 1));
        repeat (45_000 - 21_000) @(negedge clk);
      end
    check(n_digits == n_before + 1, "one digit per held key");
  endtask
  task automatic press_number(input string s);
    for (int i = 0; i < s.len(); i++) press_digit(s[i] - "0");
  endtask
  always @(posedge clk) if (live) begin
    if (dut.digit_valid) n_digits++;
    if (dut.sirc_digit_valid && !dut.digit_valid && !led[15]) n_dropped++;
  end

  // ---- card reader: toggles at random data-bit boundaries while a card is near ----
  logic card_near = 0;
  initial forever begin
    repeat (CLK_HZ / 4000) @(negedge clk);
    if (card_near && $urandom_range(0, 1)) rfid_in = ~rfid_in;
  end

  // ---- watchers ----
  main_state_t prev_state = STATE_IDLE;
  logic [7:0] prev_an = 8'hff;
  logic prev_ready = 1;
  always @(posedge clk) if (live) begin
    if (state == STATE_AUTHORIZED && vga_g != 0 && vga_r == 0 && vga_b == 0) n_green++;
    if (state == STATE_UNAUTHORIZED && vga_r != 0 && vga_g == 0 && vga_b == 0) n_red++;
    if (state == STATE_ECHO_USERNAME_CHAR && vga_r == 4'hf && vga_g == 4'hf && vga_b == 4'hf) n_white++;
    if (an_n != prev_an && $countones(~an_n) == 1) n_hex_digits++;
    if (prev_ready && !led[15]) n_not_ready++;
    if (dut.prompt_start != 0) n_prompt++;
    if (dut.echo_en) n_echo++;
    if (dut.joke_read) n_joke++;
    if (prev_state == STATE_WAIT_ID_TAP && state == STATE_ID_NUMBER) n_tap++;
    if (prev_state == STATE_WAIT_VALIDITY && state == STATE_AUTHORIZED) n_auth++;
    if (prev_state == STATE_WAIT_VALIDITY && state == STATE_UNAUTHORIZED) n_unauth++;
    prev_state <= state; prev_an <= an_n; prev_ready <= led[15];
  end

  task automatic wait_state(input main_state_t s, input int limit, input string what);
    int t = 0;
    while (state != s && t < limit) begin @(negedge clk); t++; end
    check(state == s, what);
  endtask

  initial begin
    // power up: clocks not locked yet, so the system is held in reset
    repeat (20) @(negedge clk);
    check(dut.reset == 1'b1, "reset while the clock generator is unlocked");
    locked = 1;
    repeat (20) @(negedge clk);
    check(dut.reset == 1'b0 && state == STATE_IDLE, "reset released after lock");
    live = 1;
    repeat (100) @(negedge clk);

    // ---------------- session 1: valid user ----------------
    send_char(ASCII_ENTER);
    expect_text("\r\nUsername:", "username prompt");
    check(state == STATE_ECHO_USERNAME_CHAR, "collecting username");
    send_str("paigx"); send_char(ASCII_BACKSPACE); n_backspace++; send_str("e");
    expect_text("paigxe", "username echo");
    check(dut.username == "paige   ", "username buffer after backspace");
    repeat (FRAME) @(negedge clk);  // let a frame of the login screen be drawn
    send_char(ASCII_ENTER);
    expect_text("\r\nPassword:", "password prompt");
    send_str("joke61119");
    expect_text({"********", string'(ASCII_BELL)}, "password echo as asterisks, bell on overflow");
    check(dut.password == "joke6111" && dut.dummy_password == "********", "password buffers");
    send_char(ASCII_ENTER);
    expect_text("\r\nTap your ID card.", "tap prompt");
    check(state == STATE_WAIT_ID_TAP, "waiting for the card");
    card_near = 1;
    wait_state(STATE_ID_NUMBER, CLK_HZ / 10, "card tap detected");
    card_near = 0;
    check(dut.card_data != 0, "card data shown");
    expect_text("\r\nEnter your ID number", "ID number prompt");
    press_number("923456789");
    check(dut.id_number == "923456789", "ID number buffer");
    wait_state(STATE_AUTHORIZED, 1000, "valid user authorized");
    repeat (FRAME) @(negedge clk);  // a frame of the green screen
    check(dut.joke0 != 0, "a joke is selected");
    send_char(ASCII_ESCAPE);
    check(state == STATE_IDLE && dut.username == "        ", "escape returns to idle and clears");
    if (state == STATE_IDLE) n_escape++;

    // ---------------- session 2: wrong password ----------------
    send_char(ASCII_ENTER);
    expect_text("\r\nUsername:", "username prompt again");
    send_str("alex"); send_char(ASCII_ENTER);
    expect_text({"alex", "\r\nPassword:"}, "second username");
    send_str("mentos"); send_char(ASCII_ENTER);
    expect_text({"******", "\r\nTap your ID card."}, "second password");
    repeat (CLK_HZ / 100) @(negedge clk);
    check(state == STATE_WAIT_ID_TAP, "no stale card data");
    card_near = 1;
    wait_state(STATE_ID_NUMBER, CLK_HZ / 10, "second card tap");
    card_near = 0;
    expect_text("\r\nEnter your ID number", "second ID number prompt");
    press_number("934567890");
    wait_state(STATE_UNAUTHORIZED, 1000, "wrong password refused");
    send_char("x");  // typing does nothing here
    wait_state(STATE_IDLE, CLK_HZ * 11, "unauthorized screen times out");
    if (state == STATE_IDLE) n_unauth_timeout++;
    check(dut.id_number == "         ", "buffers cleared after timeout");

    // ---------------- session 3: username stage timeout ----------------
    send_char(ASCII_ENTER);
    expect_text("\r\nUsername:", "third username prompt");
    send_str("gi");
    expect_text("gi", "third echo");
    wait_state(STATE_IDLE, CLK_HZ * 31, "username stage times out");
    if (state == STATE_IDLE) n_stage_timeout++;

    // ---------------- reset button ----------------
    send_char(ASCII_ENTER);
    expect_text("\r\nUsername:", "fourth username prompt");
    btn = 1;
    repeat (20) @(negedge clk);
    check(dut.reset == 1'b1 && clockgen_reset == 1'b1, "reset button resets");
    if (dut.reset) n_reset++;
    btn = 0;
    repeat (20) @(negedge clk);
    check(dut.reset == 1'b0 && state == STATE_IDLE, "back to idle after reset");

    // ---------------- every mechanism happened ----------------
    check(n_prompt == 10, $sformatf("prompts started %0d", n_prompt));
    check(n_echo == 26 && n_star == 14, $sformatf("echoes %0d, asterisks %0d", n_echo, n_star));
    check(n_bell == 1, "bell");
    check(n_backspace == 1, "backspace");
    check(n_tap == 2, "card taps");
    check(n_digits == 18, $sformatf("digits accepted %0d", n_digits));
    check(n_frames >= 54 && n_dropped > 0, $sformatf("held keys deduplicated: %0d frames, %0d dropped", n_frames, n_dropped));
    check(n_not_ready > 0, "ready LEDs go dark after a digit");
    check(n_auth == 1 && n_joke == 1, "authorized once with a joke");
    check(n_unauth == 1, "unauthorized once");
    check(n_green > 1000, $sformatf("green text pixels %0d", n_green));
    check(n_red > 500, $sformatf("red text pixels %0d", n_red));
    check(n_white > 1000, $sformatf("white login pixels %0d", n_white));
    check(n_escape == 1, "escape");
    check(n_unauth_timeout == 1 && n_stage_timeout == 1, "timeouts");
    check(n_reset == 1, "reset button");
    check(n_hex_digits > 8, "hex display scanning");
    $display("frames %0d dropped %0d digits %0d green %0d red %0d white %0d", n_frames, n_dropped, n_digits, n_green, n_red, n_white);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
