// Testbench for downsampler (RATIO = 8): random windows of eight samples are fed
// with gaps between samples; each output must be the majority (more than four
// ones) of its window, one output per window.
module tb_downsampler;
  logic clk = 0, reset = 1, sample = 0, sample_valid = 0, out, out_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  downsampler #(.RATIO(8)) dut (.clk(clk), .reset(reset), .sample(sample), .sample_valid(sample_valid),
                                .out(out), .out_valid(out_valid));
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int w = 0; w < 60; w++) begin
      int ones; logic expect_v; logic [7:0] pat;
      ones = 0; pat = 8'($urandom);
      if (w % 10 == 0) pat = 8'hF0;  // tie gives 0
      if (w % 10 == 1) pat = 8'hF8;  // five ones gives 1
      for (int s = 0; s < 8; s++) begin
        sample = pat[s]; sample_valid = 1; ones += pat[s];
        @(negedge clk); sample_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      expect_v = (ones > 4);
      checks++; if (out !== expect_v) begin failures++; $display("FAIL window %0d pat %h", w, pat); end
    end
    checks++; if (nvalid != 60) begin failures++; $display("FAIL %0d outputs", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int nvalid = 0;
  always @(posedge clk) if (out_valid && !reset) nvalid++;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
