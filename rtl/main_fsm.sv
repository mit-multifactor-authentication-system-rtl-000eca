// Main login controller. It walks the user through the login flow and tells the
// serial side and the display what to do:
//   IDLE: wait for enter, which shows the user's terminal is connected;
//   username prompt and echo: collect up to USER_CHARS characters;
//   password prompt and echo: collect up to PASS_CHARS characters, echoed and
//     displayed as asterisks (a parallel "dummy" buffer holds the asterisks);
//   ID tap prompt and wait: wait until the card data leaves its idle value;
//   ID number: collect ID_CHARS digits from the remote as ASCII ('0' + digit);
//   wait for the identity check, then AUTHORIZED (until escape) or
//   UNAUTHORIZED (until its timer runs out).
// Typed characters are stored most significant byte first. Backspace (0x08 or
// 0x7F) clears the last character to a space and steps back, unless the buffer
// is empty; a character beyond the buffer's size rings the bell instead. Enter
// ends a field. Escape, at any time, and the expiry of the current stage's
// timer clear all buffers to spaces and return to IDLE. Each stage restarts a
// seconds timer on entry. Prompt, echo, bell, check-start and joke-read outputs
// are one-cycle pulses; display enables are levels decoded from the state.
// The states, buffers, echo rules and checks follow the source design; the
// timer lengths, the ASCII codes and the idle card value are this design's
// choices.
module main_fsm
  import mfa_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 65_000_000,
  parameter int unsigned USER_CHARS  = 8,
  parameter int unsigned PASS_CHARS  = 8,
  parameter int unsigned ID_CHARS    = 9,
  parameter logic [31:0] CARD_IDLE   = 32'h0000_0000,
  parameter int unsigned USERNAME_TIMEOUT_S     = 30,
  parameter int unsigned PASSWORD_TIMEOUT_S     = 30,
  parameter int unsigned ID_TAP_TIMEOUT_S       = 30,
  parameter int unsigned ID_NUMBER_TIMEOUT_S    = 60,
  parameter int unsigned UNAUTHORIZED_TIMEOUT_S = 10
) (
  input  logic                    clk,
  input  logic                    reset,
  // inputs
  input  logic                    serial_valid,
  input  logic [7:0]              serial_char,
  input  logic                    sirc_valid,
  input  logic [3:0]              sirc_digit,
  input  logic [31:0]             card_data,
  input  logic                    id_check_done,
  input  logic                    id_authorized,
  // stored inputs
  output logic [USER_CHARS*8-1:0] username,
  output logic [PASS_CHARS*8-1:0] password,
  output logic [PASS_CHARS*8-1:0] dummy_password,
  output logic [ID_CHARS*8-1:0]   id_number,
  // display enables
  output logic                    login_en,
  output logic                    username_prompt_en,
  output logic                    username_en,
  output logic                    password_prompt_en,
  output logic                    password_en,
  output logic                    id_tap_prompt_en,
  output logic                    id_tapped_en,
  output logic                    id_number_en,
  output logic                    authorized_en,
  output logic                    unauthorized_en,
  // serial side
  output logic                    username_prompt_start,
  output logic                    password_prompt_start,
  output logic                    id_tap_prompt_start,
  output logic                    id_number_prompt_start,
  output logic                    echo_en,
  output logic [7:0]              echo_char,
  output logic                    bell_en,
  // identity check and reward
  output logic                    id_check_start,
  output logic                    joke_read,
  output main_state_t             state
);
  localparam int unsigned PW = $clog2(ID_CHARS + USER_CHARS + PASS_CHARS + 1);

  logic [PW-1:0] user_pos, pass_pos, id_pos;
  logic          timer_start, timer_expired;
  logic [7:0]    timer_len;
  logic          is_backspace;

  timer #(.CLK_HZ(CLK_HZ)) u_timer (
    .clk(clk), .reset(reset), .start(timer_start), .length(timer_len), .expired(timer_expired));

  assign is_backspace = (serial_char == ASCII_BACKSPACE) || (serial_char == ASCII_DELETE);

  // The stage timer is (re)started in the same cycle the FSM enters a timed
  // state, so a stale expiry from the previous stage is never seen.
  always_comb begin
    timer_start = 1'b0;
    timer_len   = '0;
    unique case (state)
      STATE_SEND_USERNAME_PROMPT: begin timer_start = 1'b1; timer_len = 8'(USERNAME_TIMEOUT_S); end
      STATE_SEND_PASSWORD_PROMPT: begin timer_start = 1'b1; timer_len = 8'(PASSWORD_TIMEOUT_S); end
      STATE_SEND_ID_TAP_PROMPT:   begin timer_start = 1'b1; timer_len = 8'(ID_TAP_TIMEOUT_S); end
      STATE_WAIT_ID_TAP: if (card_data != CARD_IDLE) begin
        timer_start = 1'b1; timer_len = 8'(ID_NUMBER_TIMEOUT_S);
      end
      STATE_WAIT_VALIDITY: if (id_check_done && !id_authorized) begin
        timer_start = 1'b1; timer_len = 8'(UNAUTHORIZED_TIMEOUT_S);
      end
      default: ;
    endcase
  end

  // Display enables, decoded from the state.
  always_comb begin
    authorized_en      = (state == STATE_AUTHORIZED);
    unauthorized_en    = (state == STATE_UNAUTHORIZED);
    login_en           = !authorized_en && !unauthorized_en;
    username_prompt_en = login_en && (state >= STATE_SEND_USERNAME_PROMPT);
    username_en        = username_prompt_en;
    password_prompt_en = login_en && (state >= STATE_SEND_PASSWORD_PROMPT);
    password_en        = password_prompt_en;
    id_tap_prompt_en   = login_en && (state >= STATE_SEND_ID_TAP_PROMPT);
    id_tapped_en       = login_en && (state >= STATE_ID_NUMBER);
    id_number_en       = id_tapped_en;
  end

  always_ff @(posedge clk) begin
    // One-cycle outputs default low.
    username_prompt_start  <= 1'b0;
    password_prompt_start  <= 1'b0;
    id_tap_prompt_start    <= 1'b0;
    id_number_prompt_start <= 1'b0;
    echo_en                <= 1'b0;
    bell_en                <= 1'b0;
    id_check_start         <= 1'b0;
    joke_read              <= 1'b0;

    if (reset || (serial_valid && serial_char == ASCII_ESCAPE) ||
        (timer_expired && state inside {STATE_ECHO_USERNAME_CHAR, STATE_ECHO_PASSWORD_CHAR,
                                        STATE_WAIT_ID_TAP, STATE_ID_NUMBER, STATE_UNAUTHORIZED})) begin
      // Return to the start of the login with empty (all space) buffers.
      state          <= STATE_IDLE;
      username       <= {USER_CHARS{ASCII_SPACE}};
      password       <= {PASS_CHARS{ASCII_SPACE}};
      dummy_password <= {PASS_CHARS{ASCII_SPACE}};
      id_number      <= {ID_CHARS{ASCII_SPACE}};
      user_pos       <= '0;
      pass_pos       <= '0;
      id_pos         <= '0;
      echo_char      <= '0;
    end else begin
      unique case (state)
        STATE_IDLE:
          if (serial_valid && serial_char == ASCII_ENTER) state <= STATE_SEND_USERNAME_PROMPT;

        STATE_SEND_USERNAME_PROMPT: begin
          username_prompt_start <= 1'b1;
          state                 <= STATE_ECHO_USERNAME_CHAR;
        end

        STATE_ECHO_USERNAME_CHAR:
          if (serial_valid) begin
            if (serial_char == ASCII_ENTER) begin
              state <= STATE_SEND_PASSWORD_PROMPT;
            end else if (is_backspace) begin
              if (user_pos != 0) begin
                username[(USER_CHARS - int'(user_pos)) * 8 +: 8] <= ASCII_SPACE;
                user_pos <= user_pos - 1'b1;
              end
            end else if (user_pos == PW'(USER_CHARS)) begin
              bell_en <= 1'b1;
            end else begin
              username[(USER_CHARS - 1 - int'(user_pos)) * 8 +: 8] <= serial_char;
              user_pos  <= user_pos + 1'b1;
              echo_en   <= 1'b1;
              echo_char <= serial_char;
            end
          end

        STATE_SEND_PASSWORD_PROMPT: begin
          password_prompt_start <= 1'b1;
          state                 <= STATE_ECHO_PASSWORD_CHAR;
        end

        STATE_ECHO_PASSWORD_CHAR:
          if (serial_valid) begin
            if (serial_char == ASCII_ENTER) begin
              state <= STATE_SEND_ID_TAP_PROMPT;
            end else if (is_backspace) begin
              if (pass_pos != 0) begin
                password[(PASS_CHARS - int'(pass_pos)) * 8 +: 8]       <= ASCII_SPACE;
                dummy_password[(PASS_CHARS - int'(pass_pos)) * 8 +: 8] <= ASCII_SPACE;
                pass_pos <= pass_pos - 1'b1;
              end
            end else if (pass_pos == PW'(PASS_CHARS)) begin
              bell_en <= 1'b1;
            end else begin
              password[(PASS_CHARS - 1 - int'(pass_pos)) * 8 +: 8]       <= serial_char;
              dummy_password[(PASS_CHARS - 1 - int'(pass_pos)) * 8 +: 8] <= ASCII_ASTERISK;
              pass_pos  <= pass_pos + 1'b1;
              echo_en   <= 1'b1;
              echo_char <= ASCII_ASTERISK;
            end
          end

        STATE_SEND_ID_TAP_PROMPT: begin
          id_tap_prompt_start <= 1'b1;
          state               <= STATE_WAIT_ID_TAP;
        end

        STATE_WAIT_ID_TAP:
          if (card_data != CARD_IDLE) begin
            id_number_prompt_start <= 1'b1;
            state                  <= STATE_ID_NUMBER;
          end

        STATE_ID_NUMBER:
          if (id_pos == PW'(ID_CHARS)) begin
            id_check_start <= 1'b1;
            state          <= STATE_WAIT_VALIDITY;
          end else if (sirc_valid) begin
            id_number[(ID_CHARS - 1 - int'(id_pos)) * 8 +: 8] <= {4'b0011, sirc_digit};
            id_pos <= id_pos + 1'b1;
          end

        STATE_WAIT_VALIDITY:
          if (id_check_done) begin
            if (id_authorized) begin
              joke_read <= 1'b1;
              state     <= STATE_AUTHORIZED;
            end else begin
              state       <= STATE_UNAUTHORIZED;
            end
          end

        STATE_AUTHORIZED: ;  // stays until escape

        STATE_UNAUTHORIZED: ;  // leaves when its timer expires (above)

        default: state <= STATE_IDLE;
      endcase
    end
  end
endmodule
