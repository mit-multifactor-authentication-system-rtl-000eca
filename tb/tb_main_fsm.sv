// Testbench for main_fsm with a 100-cycle second and the default buffer sizes.
// It plays the user: enter, a username with a backspace and an overflow (bell),
// a password (echoed as asterisks), a card tap, nine remote digits; a model
// identity check answers. It checks the buffers, the echoes, the prompt starts,
// the display enables, the authorized and unauthorized outcomes, escape, and
// the return to idle when a stage's timer runs out.
module tb_main_fsm;
  import mfa_pkg::*;
  logic clk = 0, reset = 1;
  logic sv = 0, dv = 0, done = 0, auth = 0;
  logic [7:0] sc = 0;
  logic [3:0] dg = 0;
  logic [31:0] card = 0;
  logic [63:0] user, pass, dpass;
  logic [71:0] idn;
  logic login_en, upe, ue, ppe, pe, itpe, ite, ine, ae, ue2;
  logic ups, pps, itps, inps, echo, bell, chk, joke;
  logic [7:0] echo_c;
  main_state_t state;
  int checks = 0, failures = 0;
  int n_echo = 0, n_bell = 0, n_prompt = 0, n_chk = 0, n_joke = 0;
  string echoed;
  always #5 clk = ~clk;
  main_fsm #(.CLK_HZ(100)) dut (
    .clk(clk), .reset(reset), .serial_valid(sv), .serial_char(sc), .sirc_valid(dv), .sirc_digit(dg), .card_data(card),
    .id_check_done(done), .id_authorized(auth),
    .username(user), .password(pass), .dummy_password(dpass), .id_number(idn),
    .login_en(login_en), .username_prompt_en(upe), .username_en(ue), .password_prompt_en(ppe), .password_en(pe),
    .id_tap_prompt_en(itpe), .id_tapped_en(ite), .id_number_en(ine), .authorized_en(ae), .unauthorized_en(ue2),
    .username_prompt_start(ups), .password_prompt_start(pps), .id_tap_prompt_start(itps), .id_number_prompt_start(inps),
    .echo_en(echo), .echo_char(echo_c), .bell_en(bell), .id_check_start(chk), .joke_read(joke), .state(state));
  always @(posedge clk) if (!reset) begin
    if (echo) begin n_echo++; echoed = {echoed, string'(echo_c)}; end
    n_bell += bell; n_prompt += ups + pps + itps + inps; n_chk += chk; n_joke += joke;
  end
  task automatic type_char(input logic [7:0] c);
    sc = c; sv = 1; @(negedge clk); sv = 0; repeat (3) @(negedge clk);
  endtask
  task automatic type_str(input string s);
    for (int i = 0; i < s.len(); i++) type_char(s[i]);
  endtask
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (state %s)", what, state.name()); end
  endtask
  task automatic login(input bit grant);
    int bells;
    echoed = "";
    bells = n_bell;
    type_char(ASCII_ENTER);
    repeat (3) @(negedge clk);
    check(state == STATE_ECHO_USERNAME_CHAR && upe && ue && !ppe, "username stage");
    type_str("paigX"); type_char(ASCII_BACKSPACE); type_str("e");
    check(user == "paige   ", "username with backspace");
    type_str("123"); type_char("4");  // 9th character rings the bell
    check(user == "paige123" && n_bell == bells + 1, "overflow rings bell");
    type_char(ASCII_BACKSPACE); type_char(ASCII_BACKSPACE); type_char(ASCII_BACKSPACE);
    check(user == "paige   ", "three backspaces");
    type_char(ASCII_ENTER); repeat (2) @(negedge clk);
    check(state == STATE_ECHO_PASSWORD_CHAR && ppe && pe, "password stage");
    type_str("joke6111");
    check(pass == "joke6111" && dpass == "********", "password stored and masked");
    check(echoed == "paigX123********" || echoed == "paigXe123********", "echo of username and asterisks");
    type_char(ASCII_ENTER); repeat (2) @(negedge clk);
    check(state == STATE_WAIT_ID_TAP && itpe && !ite, "waiting for tap");
    repeat (20) @(negedge clk);
    check(state == STATE_WAIT_ID_TAP, "no tap while card idle");
    card = 32'h0000_0001; @(negedge clk); card = 0; @(negedge clk);
    check(state == STATE_ID_NUMBER && ite && ine, "tapped");
    for (int i = 0; i < 9; i++) begin dg = 4'((9 - i) % 10); dv = 1; @(negedge clk); dv = 0; repeat (5) @(negedge clk); end
    check(idn == "987654321", "id digits as ASCII");
    check(state == STATE_WAIT_VALIDITY && n_chk > 0, "identity check started");
    repeat (20) @(negedge clk);
    auth = grant; done = 1; @(negedge clk); done = 0; auth = 0; @(negedge clk);
    if (grant) check(state == STATE_AUTHORIZED && ae && !login_en && n_joke > 0, "authorized");
    else check(state == STATE_UNAUTHORIZED && ue2 && !login_en, "unauthorized");
  endtask
  initial begin
    repeat (2) @(negedge clk); reset = 0; @(negedge clk);
    check(state == STATE_IDLE && user == "        " && idn == "         ", "idle with blank buffers");
    type_str("xy");
    check(state == STATE_IDLE, "idle until enter");
    login(1);
    repeat (500) @(negedge clk);
    check(state == STATE_AUTHORIZED, "authorized stays");
    type_char(ASCII_ESCAPE);
    check(state == STATE_IDLE && user == "        " && pass == "        ", "escape clears");
    login(0);
    repeat (1005) @(negedge clk);  // 10 s unauthorized timer at 100 cycles/s
    check(state == STATE_IDLE, "unauthorized times out");
    // username stage timeout (30 s)
    type_char(ASCII_ENTER); type_str("ab");
    repeat (2950) @(negedge clk);
    check(state == STATE_ECHO_USERNAME_CHAR, "still in username stage");
    repeat (70) @(negedge clk);
    check(state == STATE_IDLE && user == "        ", "username stage timeout");
    // escape in the middle of the password
    type_char(ASCII_ENTER); type_str("u"); type_char(ASCII_ENTER); type_str("pw"); type_char(ASCII_ESCAPE);
    check(state == STATE_IDLE && pass == "        ", "escape in password stage");
    check(n_prompt == 4 * 2 + 1 + 2, "prompt starts counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
