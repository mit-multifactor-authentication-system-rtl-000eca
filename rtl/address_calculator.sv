// Address calculator: decides which character, and which pixel of its 32x32
// sprite, belongs at the current screen position. The screen is a grid of
// 32x32 character boxes; text lines are 32 pixels tall and start every 64
// pixels from y = TOP, characters start at x = INDENT, up to 32 per line. For the
// current text line a 32-character line buffer is assembled from fixed prompt
// strings and the stored inputs, each part shown only when its enable is on:
//   login screens: "MIT LOGIN:", "USERNAME: " + username,
//                  "PASSWORD: " + asterisks, "TAP ID CARD" or "ID TAPPED",
//                  "ID NUMBER: " + ID digits;
//   authorized:    "AUTHORIZED", "WELCOME " + username, then the three joke
//                  lines on text lines 3 to 5;
//   unauthorized:  "UNAUTHORIZED".
// Outputs are registered: character code, sprite row and column, char_on (the
// pixel lies in a shown character box) and the sync and blank signals delayed
// by the same one cycle. Lines start with the first character in the most
// significant byte. "MIT LOGIN:", "AUTHORIZED" and "WELCOME " come from the
// source; the other prompt texts, the positions and the line-buffer method
// are this design's.
module address_calculator #(
  parameter int unsigned TOP    = 64,
  parameter int unsigned INDENT = 64
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [10:0]  hcount,
  input  logic [9:0]   vcount,
  input  logic         hsync_in,
  input  logic         vsync_in,
  input  logic         blank_in,
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
  output logic [6:0]   char_code,
  output logic [4:0]   char_row,
  output logic [4:0]   char_col,
  output logic         char_on,
  output logic         hsync_out,
  output logic         vsync_out,
  output logic         blank_out
);
  localparam int unsigned LINE_CHARS = 32;
  localparam logic [7:0] SP = 8'h20;

  // Prompt strings.
  localparam logic [79:0] MIT_LOGIN    = "MIT LOGIN:";
  localparam logic [79:0] USER_PROMPT  = "USERNAME: ";
  localparam logic [79:0] PASS_PROMPT  = "PASSWORD: ";
  localparam logic [87:0] TAP_PROMPT   = "TAP ID CARD";
  localparam logic [87:0] TAPPED       = "ID TAPPED  ";
  localparam logic [87:0] ID_PROMPT    = "ID NUMBER: ";
  localparam logic [79:0] AUTHORIZED   = "AUTHORIZED";
  localparam logic [63:0] WELCOME      = "WELCOME ";
  localparam logic [95:0] UNAUTHORIZED = "UNAUTHORIZED";

  logic [10:0] dx;
  logic [9:0]  dy;
  logic        in_box;
  logic [2:0]  text_line;
  logic [4:0]  col_idx;
  logic [LINE_CHARS*8-1:0] line;
  logic [7:0]  ch;

  function automatic logic [LINE_CHARS*8-1:0] blanks();
    return {LINE_CHARS{SP}};
  endfunction

  always_comb begin
    dx = hcount - 11'(INDENT);
    dy = vcount - 10'(TOP);
    // Inside the text area, on the upper half of a 64-pixel line pitch.
    in_box    = (hcount >= 11'(INDENT)) && (dx < 11'(LINE_CHARS * 32)) &&
                (vcount >= 10'(TOP)) && (dy < 10'(6 * 64)) && !dy[5] && !blank_in;
    text_line = dy[8:6];
    col_idx   = dx[9:5];

    line = blanks();
    if (authorized_en) begin
      unique case (text_line)
        3'd0: line = {AUTHORIZED, {22{SP}}};
        3'd1: line = {WELCOME, username, {16{SP}}};
        3'd3: line = {joke_line0, {4{SP}}};
        3'd4: line = {joke_line1, {4{SP}}};
        3'd5: line = {joke_line2, {4{SP}}};
        default: line = blanks();
      endcase
    end else if (unauthorized_en) begin
      if (text_line == 3'd0) line = {UNAUTHORIZED, {20{SP}}};
    end else if (login_en) begin
      unique case (text_line)
        3'd0: line = {MIT_LOGIN, {22{SP}}};
        3'd1: line = {username_prompt_en ? USER_PROMPT : {10{SP}},
                      username_en ? username : {8{SP}}, {14{SP}}};
        3'd2: line = {password_prompt_en ? PASS_PROMPT : {10{SP}},
                      password_en ? dummy_password : {8{SP}}, {14{SP}}};
        3'd3: line = {id_tapped_en ? TAPPED : (id_tap_prompt_en ? TAP_PROMPT : {11{SP}}), {21{SP}}};
        3'd4: line = {id_number_en ? ID_PROMPT : {11{SP}},
                      id_number_en ? id_number : {9{SP}}, {12{SP}}};
        default: line = blanks();
      endcase
    end
    ch = line[(LINE_CHARS - 1 - int'(col_idx)) * 8 +: 8];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      char_code <= '0;
      char_row  <= '0;
      char_col  <= '0;
      char_on   <= 1'b0;
      hsync_out <= 1'b1;
      vsync_out <= 1'b1;
      blank_out <= 1'b1;
    end else begin
      char_code <= in_box ? ch[6:0] : 7'h20;
      char_row  <= dy[4:0];
      char_col  <= dx[4:0];
      char_on   <= in_box;
      hsync_out <= hsync_in;
      vsync_out <= vsync_in;
      blank_out <= blank_in;
    end
  end
endmodule
