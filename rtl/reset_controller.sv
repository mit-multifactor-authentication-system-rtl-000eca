// Start-up reset sequencing across the two clock domains. The reset button is
// debounced in the 100 MHz domain, ORed with "clock generator not yet locked",
// and passed through a synchronizer into the 65 MHz domain, where it becomes the
// global reset of everything else. Reset is therefore held until the 65 MHz
// clock is stable and for as long as the button is pressed, and is released
// synchronously to the 65 MHz clock (two cycles after the raw reset falls, plus
// the debounce time when the button is released). The structure follows the
// source design; the debounce delay (10 ms at 100 MHz) is this design's choice.
module reset_controller #(
  parameter int unsigned DEBOUNCE_DELAY = 1_000_000
) (
  input  logic clk_100mhz,
  input  logic clk_65mhz,
  input  logic btn_reset,       // raw reset button (BTNR)
  input  logic clocks_locked,   // lock flag of the 65 MHz clock generator
  output logic btn_reset_clean, // debounced button, 100 MHz domain (clock generator reset)
  output logic reset            // global reset, 65 MHz domain
);
  logic btn_sync;
  logic raw_reset;

  synchronizer u_btn_sync (.clk(clk_100mhz), .in(btn_reset), .out(btn_sync));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_debounce (
    .clk(clk_100mhz), .reset(1'b0), .noisy(btn_sync), .clean(btn_reset_clean));

  assign raw_reset = btn_reset_clean | ~clocks_locked;

  synchronizer u_reset_sync (.clk(clk_65mhz), .in(raw_reset), .out(reset));
endmodule
