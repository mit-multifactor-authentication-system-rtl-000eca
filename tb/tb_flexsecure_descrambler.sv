// Testbench for flexsecure_descrambler. A default instance must present the
// last 32 received bits (newest at bit 0). A second instance with a key, a
// reversed bit order, a duplicated bit and one XORed position must match a
// reference transform computed here from the same window.
module tb_flexsecure_descrambler;
  localparam logic [31:0] KEY = 32'hA5C3_0F96;
  function automatic logic [159:0] perm_table();
    logic [159:0] p;
    for (int i = 0; i < 32; i++) p[i*5 +: 5] = 5'(31 - i);
    p[7*5 +: 5] = 5'd3;  // output bit 7 duplicates window bit 3
    return p;
  endfunction
  localparam logic [159:0] PERM = perm_table();
  logic clk = 0, reset = 1, bit_in = 0, bit_valid = 0;
  logic [31:0] d0, d1, window = '0, expect1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  flexsecure_descrambler dut0 (.clk(clk), .reset(reset), .bit_in(bit_in), .bit_valid(bit_valid), .card_data(d0));
  flexsecure_descrambler #(.KEY(KEY), .PERM(PERM), .XOR_POS(12), .XOR_SRC(30)) dut1 (
    .clk(clk), .reset(reset), .bit_in(bit_in), .bit_valid(bit_valid), .card_data(d1));
  initial begin
    repeat (2) @(negedge clk); reset = 0; @(negedge clk);
    checks++; if (d0 !== 32'h0) failures++;
    for (int i = 0; i < 100; i++) begin
      bit_in = $urandom_range(0, 1); bit_valid = 1;
      window = {window[30:0], bit_in};
      @(negedge clk); bit_valid = 0; @(negedge clk);
      for (int k = 0; k < 32; k++) expect1[k] = window[PERM[k*5 +: 5]];
      expect1[12] = window[PERM[12*5 +: 5]] ^ window[30];
      expect1 ^= KEY;
      checks += 2;
      if (d0 !== window) failures++;
      if (d1 !== expect1) begin failures++; $display("FAIL %h vs %h", d1, expect1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
