// Testbench for xvga: over two frames it checks the line length (1344), frame
// height (806 lines), the visible area (1024x768 unblanked pixels per frame),
// the sync pulse widths (136 pixels, 6 lines) and their positions.
module tb_xvga;
  logic clk = 0, reset = 1, hs, vs, blank;
  logic [10:0] hc;
  logic [9:0] vc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  xvga dut (.clk(clk), .reset(reset), .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs), .blank(blank));
  int visible = 0, hs_low = 0, vs_low_lines = 0, lines = 0, frames = 0;
  logic prev_hs = 1;
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    // align to the start of a frame
    while (!(hc == 0 && vc == 0)) @(negedge clk);
    repeat (2) begin
      visible = 0; hs_low = 0; vs_low_lines = 0; lines = 0;
      for (int i = 0; i < 1344 * 806; i++) begin
        logic exp_hs, exp_vs, exp_blank;
        exp_hs = !(hc >= 1048 && hc < 1184);
        exp_vs = !(vc >= 771 && vc < 777);
        exp_blank = (hc >= 1024) || (vc >= 768);
        if (hc == 0 || hc == 1050 || hc == 1200 || vc == 771) begin
          checks++;
          if (hs !== exp_hs || vs !== exp_vs || blank !== exp_blank) begin failures++; if (failures < 5) $display("FAIL at %0d,%0d", hc, vc); end
        end
        visible += !blank;
        hs_low += !hs;
        if (hc == 0) begin lines++; vs_low_lines += !vs; end
        @(negedge clk);
      end
      checks += 5;
      if (visible != 1024 * 768) begin failures++; $display("FAIL visible %0d", visible); end
      if (hs_low != 136 * 806) begin failures++; $display("FAIL hsync %0d", hs_low); end
      if (vs_low_lines != 6) begin failures++; $display("FAIL vsync lines %0d", vs_low_lines); end
      if (lines != 806) failures++;
      if (!(hc == 0 && vc == 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3_000_000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
