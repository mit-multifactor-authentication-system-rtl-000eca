// Shared definitions for the multifactor authentication system.
// Holds the ASCII control codes the login flow reacts to,
// the states of the main login FSM and small bit-manipulation helpers (byte swap
// and left rotate) used by the MD5 core. The original design kept such helpers in
// a common include of macros; here they are package functions and $clog2 is used
// directly. The ASCII values of enter, backspace, escape and bell are the standard
// codes a serial terminal sends; they are this design's choice.
package mfa_pkg;


  localparam logic [7:0] ASCII_BELL      = 8'h07;
  localparam logic [7:0] ASCII_BACKSPACE = 8'h08;
  localparam logic [7:0] ASCII_ENTER     = 8'h0D;
  localparam logic [7:0] ASCII_ESCAPE    = 8'h1B;
  localparam logic [7:0] ASCII_SPACE     = 8'h20;
  localparam logic [7:0] ASCII_ASTERISK  = 8'h2A;
  localparam logic [7:0] ASCII_DELETE    = 8'h7F;

  typedef enum logic [3:0] {
    STATE_IDLE,
    STATE_SEND_USERNAME_PROMPT,
    STATE_ECHO_USERNAME_CHAR,
    STATE_SEND_PASSWORD_PROMPT,
    STATE_ECHO_PASSWORD_CHAR,
    STATE_SEND_ID_TAP_PROMPT,
    STATE_WAIT_ID_TAP,
    STATE_ID_NUMBER,
    STATE_WAIT_VALIDITY,
    STATE_AUTHORIZED,
    STATE_UNAUTHORIZED
  } main_state_t;

  typedef enum logic {POSEDGE, NEGEDGE} edge_t;

  // Reverse the byte order of a 32-bit word.
  function automatic logic [31:0] endian_swap_32(input logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

  // Rotate a 32-bit word left by n places.
  function automatic logic [31:0] leftrotate(input logic [31:0] w, input logic [4:0] n);
    logic [63:0] d;
    d = {w, w} << n;
    return d[63:32];
  endfunction

endpackage
