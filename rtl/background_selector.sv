// Character colour map: turns a 1-bit character pixel into 4-bit red, green and
// blue. Characters are green when the user is authorized, red when not
// authorized, and white on the login screens; the background is always black.
// Purely combinational. Follows the source design.
module background_selector (
  input  logic       authorized_en,
  input  logic       unauthorized_en,
  input  logic       pixel,
  output logic [3:0] red,
  output logic [3:0] green,
  output logic [3:0] blue
);
  always_comb begin
    if (authorized_en) begin
      red = 4'h0; green = {4{pixel}}; blue = 4'h0;
    end else if (unauthorized_en) begin
      red = {4{pixel}}; green = 4'h0; blue = 4'h0;
    end else begin
      red = {4{pixel}}; green = {4{pixel}}; blue = {4{pixel}};
    end
  end
endmodule
