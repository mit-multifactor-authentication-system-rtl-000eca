// Testbench for psk_decoder: random samples with gaps; each output bit must be
// the XOR of the sample with the previous sample.
module tb_psk_decoder;
  logic clk = 0, reset = 1, in = 0, in_valid = 0, bit_out, bit_valid;
  int checks = 0, failures = 0, nvalid = 0;
  logic prev = 0;
  always #5 clk = ~clk;
  psk_decoder dut (.clk(clk), .reset(reset), .in(in), .in_valid(in_valid), .bit_out(bit_out), .bit_valid(bit_valid));
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int i = 0; i < 200; i++) begin
      in = $urandom_range(0, 1); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++; if (!bit_valid || bit_out !== (in ^ prev)) failures++;
      prev = in;
      in = ~in;  // ignored while not valid
      repeat ($urandom_range(1, 3)) begin @(negedge clk); checks++; if (bit_valid) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
