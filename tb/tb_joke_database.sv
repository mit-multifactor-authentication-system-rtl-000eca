// Testbench for joke_database: the read enable is raised a random number of
// cycles after reset; the joke chosen must be the counter value (cycles since
// reset, modulo 8), checked on the joke whose text is known and on the other
// jokes' line 2 starting with "A: ". Lines must hold between reads.
module tb_joke_database;
  logic clk = 0, reset = 1, rd = 0;
  logic [223:0] l0, l1, l2, h0;
  int checks = 0, failures = 0, cyc = 0, sodium = 0;
  always #5 clk = ~clk;
  joke_database dut (.clk(clk), .reset(reset), .read_en(rd), .line0(l0), .line1(l1), .line2(l2));
  always @(posedge clk) cyc <= reset ? 0 : cyc + 1;
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int i = 0; i < 64; i++) begin
      int k;
      repeat ($urandom_range(0, 9)) @(negedge clk);
      k = cyc % 8;
      rd = 1; @(negedge clk); rd = 0;
      checks++;
      if (k == 0) begin
        sodium++;
        if (l0 !== "Q: Anyone know any jokes    " || l1 !== "about sodium?               " || l2 !== "A: Na                       ") begin
          failures++; $display("FAIL joke 0: %s", l0);
        end
      end else if (l2[223 -: 24] !== "A: " || l0[223 -: 24] !== "Q: ") begin failures++; $display("FAIL joke %0d: %s", k, l2); end
      h0 = l0; repeat (3) @(negedge clk);
      checks++; if (l0 !== h0) failures++;
    end
    checks++; if (sodium == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
