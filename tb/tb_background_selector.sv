// Testbench for background_selector: all eight input combinations; characters
// must be green when authorized, red when unauthorized, white otherwise, and
// the background black.
module tb_background_selector;
  logic a, u, p;
  logic [3:0] r, g, b;
  int checks = 0, failures = 0;
  background_selector dut (.authorized_en(a), .unauthorized_en(u), .pixel(p), .red(r), .green(g), .blue(b));
  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [11:0] e;
      {a, u, p} = 3'(i);
      #1;
      if (!p) e = 12'h000; else if (a) e = 12'h0F0; else if (u) e = 12'hF00; else e = 12'hFFF;
      checks++; if ({r, g, b} !== e) begin failures++; $display("FAIL %b%b%b -> %h", a, u, p, {r, g, b}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
