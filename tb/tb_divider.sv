// Testbench for divider (PERIOD = 7): pulses must be one cycle wide and exactly
// seven cycles apart, the first seven cycles after reset.
module tb_divider;
  logic clk = 0, reset = 1, pulse;
  int checks = 0, failures = 0, cyc = 0, last = 0, n = 0;
  always #5 clk = ~clk;
  divider #(.PERIOD(7)) dut (.clk(clk), .reset(reset), .pulse(pulse));
  initial begin
    @(negedge clk); reset = 0;
    repeat (100) begin
      @(posedge clk); #1; cyc++;
      if (pulse) begin
        checks++; if (cyc - last != 7) begin failures++; $display("FAIL gap %0d", cyc - last); end
        last = cyc; n++;
      end
    end
    checks++; if (n != 14) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
