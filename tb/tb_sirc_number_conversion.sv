// Testbench for sirc_number_conversion: every 4-bit command. Commands 0-8 must
// become digits 1-9, command 9 digit 0, and the rest must give no strobe.
module tb_sirc_number_conversion;
  logic clk = 0, reset = 1, vin = 0, vout;
  logic [3:0] cin = 0, digit;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sirc_number_conversion dut (.clk(clk), .reset(reset), .cmd_in(cin), .valid_in(vin), .digit(digit), .valid_out(vout));
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 16; c++) begin
        cin = 4'(c); vin = 1; @(negedge clk); vin = 0;
        checks++;
        if (c <= 8) begin if (!vout || digit !== 4'(c + 1)) failures++; end
        else if (c == 9) begin if (!vout || digit !== 4'd0) failures++; end
        else if (vout) failures++;
        @(negedge clk); checks++; if (vout) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
