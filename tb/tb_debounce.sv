// Testbench for debounce (DELAY = 5): short glitches must not reach the output,
// a level held for five cycles must, and only after those five cycles.
module tb_debounce;
  logic clk = 0, reset = 1, noisy = 0, clean;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  debounce #(.DELAY(5)) dut (.clk(clk), .reset(reset), .noisy(noisy), .clean(clean));
  task automatic expect_clean(input logic v, input string what);
    checks++; if (clean !== v) begin failures++; $display("FAIL %s: clean=%b", what, clean); end
  endtask
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    // glitches of 1..4 cycles
    for (int w = 1; w <= 4; w++) begin
      noisy = 1; repeat (w) @(negedge clk); noisy = 0; repeat (3) @(negedge clk);
      expect_clean(0, "glitch ignored");
    end
    // held level: not yet after 4 cycles, yes after 6
    noisy = 1; repeat (4) @(negedge clk); expect_clean(0, "too early");
    repeat (2) @(negedge clk); expect_clean(1, "stable high");
    noisy = 0; repeat (2) @(negedge clk); noisy = 1; repeat (10) @(negedge clk); expect_clean(1, "dip ignored");
    noisy = 0; repeat (7) @(negedge clk); expect_clean(0, "stable low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
