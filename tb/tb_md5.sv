// Testbench for md5: five instances hash messages of 1, 3, 55, 56 and 80 bytes,
// covering one chunk, a padding that exactly fills one chunk, a padding that
// spills into a second chunk and a two-chunk message. Digests are compared with
// the published MD5 values of those messages, and the start-to-done latency
// with 3 + 66 cycles per chunk.
module tb_md5;
  logic clk = 0, reset = 1, start = 0;
  logic [4:0] busy, done;
  logic [127:0] dg [5];
  int checks = 0, failures = 0;
  int lat [5];
  localparam logic [127:0] EXPECT [5] = '{128'h0cc175b9c0f1b6a831c399e269772661, 128'h900150983cd24fb0d6963f7d28e17f72,
                                          128'hef1772b6dff9a122358552954ad0df65, 128'h3b0c8ac703f828b04c6c197006d17218,
                                          128'h57edf4a22be3c955ac49da2e2107b67a};
  localparam int EXPECT_LAT [5] = '{69, 69, 69, 135, 135};
  always #5 clk = ~clk;
  md5 #(.IN_BYTES(1))  d0 (.clk(clk), .reset(reset), .start(start), .message("a"), .busy(busy[0]), .done(done[0]), .digest(dg[0]));
  md5 #(.IN_BYTES(3))  d1 (.clk(clk), .reset(reset), .start(start), .message("abc"), .busy(busy[1]), .done(done[1]), .digest(dg[1]));
  md5 #(.IN_BYTES(55)) d2 (.clk(clk), .reset(reset), .start(start), .message({55{8'h61}}), .busy(busy[2]), .done(done[2]), .digest(dg[2]));
  md5 #(.IN_BYTES(56)) d3 (.clk(clk), .reset(reset), .start(start), .message({56{8'h61}}), .busy(busy[3]), .done(done[3]), .digest(dg[3]));
  md5 #(.IN_BYTES(80)) d4 (.clk(clk), .reset(reset), .start(start), .message({8{"1234567890"}}), .busy(busy[4]), .done(done[4]), .digest(dg[4]));
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 5; i++) lat[i] = -1;
      start = 1; @(negedge clk); start = 0;
      for (int t = 1; t < 300; t++) begin
        for (int i = 0; i < 5; i++) if (done[i]) lat[i] = t;
        @(negedge clk);
      end
      for (int i = 0; i < 5; i++) begin
        checks += 2;
        if (dg[i] !== EXPECT[i]) begin failures++; $display("FAIL md5 %0d: %h", i, dg[i]); end
        if (lat[i] != EXPECT_LAT[i]) begin failures++; $display("FAIL md5 %0d latency %0d", i, lat[i]); end
      end
      checks++; if (busy != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
