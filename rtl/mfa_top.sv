// Multifactor authentication system, top level. A user logs in with four
// factors: a username and a password typed on a serial terminal (RS-232 over
// the board's USB bridge), a tap of an RFID ID card on a home-made 125 kHz
// reader, and a 9-digit ID number keyed on a Sony-protocol IR remote. The main
// FSM collects the factors, the identity database checks them all at once
// (the password as an MD5 digest) and the XVGA display shows the login
// screens, then either a random joke (authorized, green) or "UNAUTHORIZED"
// (red, until a timeout). Every stage is timed, and escape restarts the login.
//
// Everything runs on the 65 MHz pixel clock. The clock generator (a vendor PLL)
// is outside this RTL: its 65 MHz clock and lock flag are inputs and the
// debounced reset button it needs is an output. The RFID analog front end, the
// IR receiver module and the USB-serial bridge are also external; their digital
// signals are ports. The hex display shows the card data and the LEDs show
// when the remote may be pressed (upper eight) and the FSM state (lower four).
// Prompt texts are this design's; the structure follows the source.
module mfa_top
  import mfa_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 65_000_000,
  parameter int unsigned BAUD           = 9600,
  parameter int unsigned DEBOUNCE_DELAY = 1_000_000
) (
  input  logic        clk_100mhz,
  input  logic        clk_65mhz,
  input  logic        clocks_locked,
  input  logic        btn_reset,
  output logic        clockgen_reset,
  input  logic        uart_rx,
  output logic        uart_tx,
  input  logic        ir_n,
  output logic        rfid_carrier,
  input  logic        rfid_in,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  output logic [7:0]  an_n,
  output logic [15:0] led
);
  localparam logic [11*8-1:0] USER_TEXT = "\r\nUsername:";
  localparam logic [11*8-1:0] PASS_TEXT = "\r\nPassword:";
  localparam logic [19*8-1:0] TAP_TEXT  = "\r\nTap your ID card.";
  localparam logic [22*8-1:0] ID_TEXT   = "\r\nEnter your ID number";

  logic clk, reset;
  assign clk = clk_65mhz;

  reset_controller #(.DEBOUNCE_DELAY(DEBOUNCE_DELAY)) u_reset (
    .clk_100mhz(clk_100mhz), .clk_65mhz(clk_65mhz), .btn_reset(btn_reset),
    .clocks_locked(clocks_locked), .btn_reset_clean(clockgen_reset), .reset(reset));

  // ---- inputs ----
  logic [7:0]  rx_char;
  logic        rx_valid;
  rs232_rx_pipeline #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk(clk), .reset(reset), .rx(uart_rx), .data(rx_char), .valid(rx_valid));

  logic [11:0] sirc_code;
  logic [3:0]  sirc_cmd, sirc_digit, digit;
  logic        sirc_valid, sirc_digit_valid, digit_valid, remote_ready;
  sirc_pipeline #(.CLK_HZ(CLK_HZ)) u_sirc (
    .clk(clk), .reset(reset), .ir_n(ir_n), .code(sirc_code), .cmd(sirc_cmd), .valid(sirc_valid));
  sirc_number_conversion u_conv (
    .clk(clk), .reset(reset), .cmd_in(sirc_cmd), .valid_in(sirc_valid),
    .digit(sirc_digit), .valid_out(sirc_digit_valid));
  deduplicator #(.CLK_HZ(CLK_HZ)) u_dedup (
    .clk(clk), .reset(reset), .cmd_in(sirc_digit), .valid_in(sirc_digit_valid),
    .cmd_out(digit), .valid_out(digit_valid), .ready(remote_ready));

  logic [31:0] card_data;
  id_card_pipeline #(.CLK_HZ(CLK_HZ)) u_card (
    .clk(clk), .reset(reset), .carrier(rfid_carrier), .rfid_in(rfid_in), .card_data(card_data));

  // ---- control ----
  logic [63:0]  username, password, dummy_password;
  logic [71:0]  id_number;
  logic login_en, username_prompt_en, username_en, password_prompt_en, password_en;
  logic id_tap_prompt_en, id_tapped_en, id_number_en, authorized_en, unauthorized_en;
  logic [3:0] prompt_start;
  logic echo_en, bell_en, id_check_start, id_check_done, id_authorized, joke_read;
  logic [7:0] echo_char;
  main_state_t state;

  main_fsm #(.CLK_HZ(CLK_HZ)) u_fsm (
    .clk(clk), .reset(reset),
    .serial_valid(rx_valid), .serial_char(rx_char),
    .sirc_valid(digit_valid), .sirc_digit(digit), .card_data(card_data),
    .id_check_done(id_check_done), .id_authorized(id_authorized),
    .username(username), .password(password), .dummy_password(dummy_password), .id_number(id_number),
    .login_en(login_en), .username_prompt_en(username_prompt_en), .username_en(username_en),
    .password_prompt_en(password_prompt_en), .password_en(password_en),
    .id_tap_prompt_en(id_tap_prompt_en), .id_tapped_en(id_tapped_en), .id_number_en(id_number_en),
    .authorized_en(authorized_en), .unauthorized_en(unauthorized_en),
    .username_prompt_start(prompt_start[0]), .password_prompt_start(prompt_start[1]),
    .id_tap_prompt_start(prompt_start[2]), .id_number_prompt_start(prompt_start[3]),
    .echo_en(echo_en), .echo_char(echo_char), .bell_en(bell_en),
    .id_check_start(id_check_start), .joke_read(joke_read), .state(state));

  identity_database u_iddb (
    .clk(clk), .reset(reset), .start(id_check_start), .username(username), .password(password),
    .id_number(id_number), .done(id_check_done), .authorized(id_authorized));

  logic [223:0] joke0, joke1, joke2;
  joke_database u_jokes (.clk(clk), .reset(reset), .read_en(joke_read), .line0(joke0), .line1(joke1), .line2(joke2));

  // ---- serial output ----
  logic [3:0]       prompt_send;
  logic [3:0][7:0]  prompt_char;
  logic [3:0]       prompt_busy;
  logic             tx_send, tx_busy, tx_done;
  logic [7:0]       tx_char;

  serial_prompt #(.LEN(11), .PROMPT(USER_TEXT)) u_prompt_user (.clk(clk), .reset(reset), .start(prompt_start[0]),
    .tx_done(tx_done), .send(prompt_send[0]), .char_out(prompt_char[0]), .busy(prompt_busy[0]));
  serial_prompt #(.LEN(11), .PROMPT(PASS_TEXT)) u_prompt_pass (.clk(clk), .reset(reset), .start(prompt_start[1]),
    .tx_done(tx_done), .send(prompt_send[1]), .char_out(prompt_char[1]), .busy(prompt_busy[1]));
  serial_prompt #(.LEN(19), .PROMPT(TAP_TEXT)) u_prompt_tap (.clk(clk), .reset(reset), .start(prompt_start[2]),
    .tx_done(tx_done), .send(prompt_send[2]), .char_out(prompt_char[2]), .busy(prompt_busy[2]));
  serial_prompt #(.LEN(22), .PROMPT(ID_TEXT)) u_prompt_id (.clk(clk), .reset(reset), .start(prompt_start[3]),
    .tx_done(tx_done), .send(prompt_send[3]), .char_out(prompt_char[3]), .busy(prompt_busy[3]));

  serial_output_selector #(.NPROMPTS(4)) u_select (
    .clk(clk), .reset(reset), .bell_en(bell_en), .echo_en(echo_en), .echo_char(echo_char),
    .prompt_send(prompt_send), .prompt_char(prompt_char), .send(tx_send), .char_out(tx_char));

  rs232_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk(clk), .reset(reset), .data(tx_char), .send(tx_send), .tx(uart_tx), .busy(tx_busy), .done(tx_done));

  // ---- display ----
  renderer u_render (
    .clk(clk), .reset(reset), .username(username), .dummy_password(dummy_password), .id_number(id_number),
    .joke_line0(joke0), .joke_line1(joke1), .joke_line2(joke2),
    .login_en(login_en), .username_prompt_en(username_prompt_en), .username_en(username_en),
    .password_prompt_en(password_prompt_en), .password_en(password_en),
    .id_tap_prompt_en(id_tap_prompt_en), .id_tapped_en(id_tapped_en), .id_number_en(id_number_en),
    .authorized_en(authorized_en), .unauthorized_en(unauthorized_en),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .vga_hs(vga_hs), .vga_vs(vga_vs));

  hex_display #(.CLK_HZ(CLK_HZ)) u_hex (.clk(clk), .reset(reset), .data(card_data), .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n));

  assign led = {{8{remote_ready}}, 4'b0000, state};
endmodule
