// Testbench for synchronizer: drives a random level and checks that the output
// repeats it exactly two clock cycles later.
module tb_synchronizer;
  logic clk = 0, in = 0, out;
  int checks = 0, failures = 0;
  logic [2:0] hist = '0;
  always #5 clk = ~clk;
  synchronizer dut (.clk(clk), .in(in), .out(out));
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i >= 4) begin checks++; if (out !== hist[0]) begin failures++; if (failures < 4) $display("FAIL i=%0d out=%b hist=%b", i, out, hist); end end
      hist = {hist[1:0], in};
      in = $urandom_range(0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
