// Testbench for hex_display with a 2-cycle dwell (CLK_HZ = 1000, DIGIT_MS = 2):
// walks all eight digits of a random word, checking that exactly one anode is
// active, that each digit stays lit for two cycles and that its segments match a
// reference seven-segment table kept here.
module tb_hex_display;
  logic clk = 0, reset = 1;
  logic [31:0] data;
  logic [6:0] seg_n;
  logic dp_n;
  logic [7:0] an_n;
  int checks = 0, failures = 0;
  // segments {g,f,e,d,c,b,a} lit for 0..F
  logic [6:0] ref_seg [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                               7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  always #5 clk = ~clk;
  hex_display #(.CLK_HZ(1000), .DIGIT_MS(2)) dut (.clk(clk), .reset(reset), .data(data), .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n));
  initial begin
    data = $urandom;
    repeat (2) @(negedge clk); reset = 0;
    for (int c = 0; c < 64; c++) begin
      int d;
      @(negedge clk);
      d = -1;
      for (int k = 0; k < 8; k++) if (!an_n[k]) d = k;
      checks++; if ($countones(~an_n) != 1) failures++;
      checks++; if (d >= 0 && seg_n !== ~ref_seg[data[d*4 +: 4]]) begin failures++; $display("FAIL digit %0d seg %b", d, seg_n); end
      checks++; if (d != (c / 2) % 8) begin failures++; $display("FAIL cycle %0d digit %0d", c, d); end
      checks++; if (dp_n !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
