// Testbench for deduplicator with a 20-cycle second (CLK_HZ = 20): a burst of
// repeated commands must pass only its first, ready must be low during the
// one-second hold and high again after it, and the next command is then passed.
module tb_deduplicator;
  logic clk = 0, reset = 1, vin = 0, vout, ready;
  logic [3:0] cin = 0, cout;
  int checks = 0, failures = 0, npass = 0;
  always #5 clk = ~clk;
  deduplicator #(.CLK_HZ(20)) dut (.clk(clk), .reset(reset), .cmd_in(cin), .valid_in(vin), .cmd_out(cout), .valid_out(vout), .ready(ready));
  always @(posedge clk) if (!reset && vout) npass++;
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int k = 0; k < 10; k++) begin
      int n; logic [3:0] c;
      c = 4'($urandom); n = npass;
      checks++; if (!ready) failures++;
      cin = c; vin = 1; @(negedge clk); vin = 0;
      checks += 2; if (!vout || cout !== c) failures++; if (ready) failures++;
      // repeats during the hold are ignored
      for (int t = 0; t < 18; t++) begin cin = ~c; vin = (t % 3 == 0); @(negedge clk); end
      vin = 0;
      checks += 2; if (npass != n + 1) failures++; if (cout !== c) failures++;
      repeat (8) @(negedge clk);
      checks++; if (!ready) begin failures++; $display("FAIL not ready after hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
