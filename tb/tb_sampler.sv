// Testbench for sampler (PERIOD = 4): valid strobes must come every four cycles
// and each sample must equal the input at the clock edge that raised valid.
module tb_sampler;
  logic clk = 0, reset = 1, in = 0, sample, sample_valid;
  int checks = 0, failures = 0, cyc = 0, last = 0;
  logic prev_in;
  always #5 clk = ~clk;
  sampler #(.PERIOD(4)) dut (.clk(clk), .reset(reset), .in(in), .sample(sample), .sample_valid(sample_valid));
  logic [1:0] hist;
  initial begin
    @(negedge clk); reset = 0;
    repeat (200) begin
      hist = {hist[0], in};
      in = $urandom_range(0, 1);
      @(posedge clk); #1; cyc++;
      if (sample_valid) begin
        checks++; if (last != 0 && cyc - last != 4) failures++;
        checks++; if (sample !== in) failures++;
        last = cyc;
      end
    end
    checks++; if (last == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
