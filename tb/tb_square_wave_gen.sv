// Testbench for square_wave_gen (PERIOD = 10 and the 520-cycle carrier
// default): every high and low phase must last exactly half the period.
module tb_square_wave_gen;
  logic clk = 0, reset = 1, w10, w520;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  square_wave_gen #(.PERIOD(10)) dut10 (.clk(clk), .reset(reset), .wave(w10));
  square_wave_gen dut520 (.clk(clk), .reset(reset), .wave(w520));
  int run10 = 0, run520 = 0, n10 = 0, n520 = 0;
  logic p10, p520;
  initial begin
    repeat (2) @(negedge clk); reset = 0; p10 = w10; p520 = w520;
    repeat (5000) begin
      @(negedge clk);
      if (w10 != p10) begin if (n10 > 0) begin checks++; if (run10 != 5) failures++; end n10++; run10 = 1; end else run10++;
      if (w520 != p520) begin if (n520 > 0) begin checks++; if (run520 != 260) failures++; end n520++; run520 = 1; end else run520++;
      p10 = w10; p520 = w520;
    end
    checks++; if (n520 < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
