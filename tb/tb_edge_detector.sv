// Testbench for edge_detector: one rising and one falling detector see the same
// random input; each pulse is compared with the input history kept here.
module tb_edge_detector;
  import mfa_pkg::*;
  logic clk = 0, reset = 1, in = 0, rise, fall, prev = 0;
  int checks = 0, failures = 0, nrise = 0, nfall = 0;
  always #5 clk = ~clk;
  edge_detector #(.EDGE(POSEDGE)) dut_p (.clk(clk), .reset(reset), .in(in), .pulse(rise));
  edge_detector #(.EDGE(NEGEDGE)) dut_n (.clk(clk), .reset(reset), .in(in), .pulse(fall));
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int i = 0; i < 300; i++) begin
      in = $urandom_range(0, 1);
      @(posedge clk); #1;
      checks += 2;
      if (rise !== (in & ~prev)) failures++;
      if (fall !== (~in & prev)) failures++;
      nrise += rise; nfall += fall;
      prev = in;
    end
    checks++; if (nrise == 0 || nfall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
