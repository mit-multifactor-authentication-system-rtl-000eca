// Testbench for timer with a 10-cycle "second": a length of N seconds must
// raise expired N*10 + 2 cycles after the cycle that captured start, stay expired, and a
// restart must clear it.
module tb_timer;
  logic clk = 0, reset = 1, start = 0, expired;
  logic [7:0] length = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  timer #(.CLK_HZ(10)) dut (.clk(clk), .reset(reset), .start(start), .length(length), .expired(expired));
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int len = 1; len <= 4; len++) begin
      int t;
      length = 8'(len); start = 1; @(negedge clk); start = 0; t = 1;
      while (!expired && t < 1000) begin @(negedge clk); t++; end
      checks++; if (t != len * 10 + 3) begin failures++; $display("FAIL len %0d took %0d", len, t); end
      repeat (5) @(negedge clk);
      checks++; if (!expired) failures++;
    end
    length = 3; start = 1; @(negedge clk); start = 0; @(negedge clk);
    checks++; if (expired) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
