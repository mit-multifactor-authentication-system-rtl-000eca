// Testbench for the whole system with every parameter at its default: a 65 MHz
// system clock, 9600 baud, a 10 ms reset debounce and one-second timers. It
// goes through the start of a login at real rates: enter, username, password
// (asterisks echoed), a card tap, and the first ID digit sent by the remote as
// a held key (three frames 45 ms apart), then escape returns to idle. The
// remaining eight digits are not entered because each one costs a full second
// of lock-out (65 million cycles); the end-to-end testbench covers the whole
// flow at a 1 MHz clock.
module tb_mfa_top_full;
  import mfa_pkg::*;
  localparam int CLK_HZ = 65_000_000, BIT = CLK_HZ / 9600, SLOT = 600 * (CLK_HZ / 1_000_000);
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

  mfa_top dut (
    .clk_100mhz(clk100), .clk_65mhz(clk), .clocks_locked(locked), .btn_reset(btn), .clockgen_reset(clockgen_reset),
    .uart_rx(uart_rx), .uart_tx(uart_tx), .ir_n(ir_n), .rfid_carrier(carrier), .rfid_in(rfid_in),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .vga_hs(vga_hs), .vga_vs(vga_vs),
    .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n), .led(led));

  main_state_t state;
  assign state = main_state_t'(led[3:0]);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s)", what, state.name()); end
  endtask

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
    end
  end
  task automatic send_char(input logic [7:0] c);
    uart_rx = 0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = c[i]; repeat (BIT) @(negedge clk); end
    uart_rx = 1; repeat (BIT * 3) @(negedge clk);
  endtask
  task automatic send_str(input string s);
    for (int i = 0; i < s.len(); i++) send_char(s[i]);
  endtask
  task automatic expect_text(input string s, input string what);
    int t = 0;
    expected = {expected, s};
    while (term.len() < expected.len() && t < 40 * BIT * 10) begin @(negedge clk); t++; end
    repeat (BIT * 12) @(negedge clk);
    check(term == expected, what);
    if (term != expected) $display("  terminal: \"%s\"\n  expected: \"%s\"", term, expected);
  endtask
  task automatic send_sirc(input logic [6:0] command);
    logic [11:0] code;
    code = {5'd1, command};
    ir_n = 0; repeat (4 * SLOT) @(negedge clk); ir_n = 1; repeat (SLOT) @(negedge clk);
    for (int b = 0; b < 12; b++) begin
      ir_n = 0; repeat (code[b] ? 2 * SLOT : SLOT) @(negedge clk); ir_n = 1; repeat (SLOT) @(negedge clk);
    end
  endtask
  int n_digits = 0;
  always @(posedge clk) if (live && dut.digit_valid) n_digits++;
  logic card_near = 0;
  initial forever begin
    repeat (CLK_HZ / 4000) @(negedge clk);
    if (card_near && $urandom_range(0, 1)) rfid_in = ~rfid_in;
  end

  initial begin
    repeat (20) @(negedge clk);
    check(dut.reset == 1'b1, "reset while unlocked");
    locked = 1;
    // the debounced button may power up pressed and then needs its 10 ms
    for (int t = 0; t < CLK_HZ / 50 && dut.reset; t++) @(negedge clk);
    check(dut.reset == 1'b0 && state == STATE_IDLE, "reset released after lock");
    live = 1;
    repeat (100) @(negedge clk);
    send_char(ASCII_ENTER);
    expect_text("\r\nUsername:", "username prompt");
    send_str("paige"); send_char(ASCII_ENTER);
    expect_text({"paige", "\r\nPassword:"}, "username echo and password prompt");
    send_str("joke6111"); send_char(ASCII_ENTER);
    expect_text({"********", "\r\nTap your ID card."}, "password echo and tap prompt");
    check(state == STATE_WAIT_ID_TAP, "waiting for the card");
    card_near = 1;
    for (int t = 0; t < CLK_HZ / 10 && state != STATE_ID_NUMBER; t++) @(negedge clk);
    card_near = 0;
    check(state == STATE_ID_NUMBER, "card tap detected");
    expect_text("\r\nEnter your ID number", "ID number prompt");
    for (int tries = 0; tries < 2 && n_digits == 0; tries++)
      for (int rep = 0; rep < 3; rep++) begin
        repeat ($urandom_range(0, SLOT - 1)) @(negedge clk);
        send_sirc(7'd8);  // key 9
        repeat (45 * (CLK_HZ / 1000) - 21 * SLOT * 1000 / 600) @(negedge clk);
      end
    check(n_digits == 1, "one digit per held key");
    check(dut.id_number[71:64] == "9", "first ID digit stored");
    check(!led[15], "remote locked out after a digit");
    send_char(ASCII_ESCAPE);
    check(state == STATE_IDLE && dut.username == "        ", "escape returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
