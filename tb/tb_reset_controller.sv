// Testbench for reset_controller with separate 100 MHz and 65 MHz clocks and a
// 4-cycle debounce: reset must stay high until the clock generator locks, fall
// afterwards, rise again after a held button press (but not for a one-cycle
// glitch) and rise when lock is lost.
module tb_reset_controller;
  logic clk100 = 0, clk65 = 0, btn = 0, locked = 0, btn_clean, reset;
  int checks = 0, failures = 0;
  always #5 clk100 = ~clk100;
  always #7.692 clk65 = ~clk65;
  reset_controller #(.DEBOUNCE_DELAY(4)) dut (.clk_100mhz(clk100), .clk_65mhz(clk65), .btn_reset(btn),
    .clocks_locked(locked), .btn_reset_clean(btn_clean), .reset(reset));
  task automatic expect_reset(input logic v, input string what);
    checks++; if (reset !== v) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20) @(posedge clk65); expect_reset(1, "held before lock");
    locked = 1; repeat (6) @(posedge clk65); expect_reset(0, "released after lock");
    @(negedge clk100); btn = 1; @(negedge clk100); btn = 0;
    repeat (20) @(posedge clk65); expect_reset(0, "glitch ignored");
    btn = 1; repeat (20) @(posedge clk65); expect_reset(1, "button held");
    checks++; if (!btn_clean) failures++;
    btn = 0; repeat (20) @(posedge clk65); expect_reset(0, "button released");
    locked = 0; repeat (4) @(posedge clk65); expect_reset(1, "lock lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk65); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
