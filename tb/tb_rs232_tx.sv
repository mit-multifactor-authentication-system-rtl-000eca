// Testbench for rs232_tx at 10 cycles per bit (CLK_HZ = 100, BAUD = 10), 8N1 and
// 8E2: the line is sampled in the middle of every bit and decoded here; the
// character, parity and stop bits must match, done must come exactly one frame
// time plus one cycle after the send, and a send while busy must be ignored.
module tb_rs232_tx;
  logic clk = 0, reset = 1, send = 0;
  logic [7:0] data = 0;
  logic tx0, busy0, done0, tx1, busy1, done1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs232_tx #(.CLK_HZ(100), .BAUD(10)) dut0 (.clk(clk), .reset(reset), .data(data), .send(send), .tx(tx0), .busy(busy0), .done(done0));
  rs232_tx #(.CLK_HZ(100), .BAUD(10), .PARITY_BITS(1), .STOP_BITS(2)) dut1 (
    .clk(clk), .reset(reset), .data(data), .send(send), .tx(tx1), .busy(busy1), .done(done1));
  initial begin
    repeat (2) @(negedge clk); reset = 0; @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      logic [11:0] f0, f1; int t0, t1; logic [7:0] c;
      c = 8'($urandom); data = c; send = 1; @(negedge clk); send = 0;
      data = ~c;  // the sender must have latched the character
      t0 = -1; t1 = -1;
      for (int t = 1; t <= 130; t++) begin
        if (t == 30) begin send = 1; end  // ignored: busy
        if (t % 10 == 5) begin f0[t / 10] = tx0; f1[t / 10] = tx1; end
        @(negedge clk); send = 0;
        if (done0) t0 = t;
        if (done1) t1 = t;
      end
      checks += 6;
      if (f0[0] !== 1'b0 || f0[8:1] !== c || f0[9] !== 1'b1) begin failures++; $display("FAIL 8N1 frame %b", f0[9:0]); end
      if (f1[0] !== 1'b0 || f1[8:1] !== c || f1[9] !== ^c || f1[11:10] !== 2'b11) begin failures++; $display("FAIL 8E2 frame %b", f1); end
      if (t0 != 101) begin failures++; $display("FAIL 8N1 done at %0d", t0); end
      if (t1 != 121) begin failures++; $display("FAIL 8E2 done at %0d", t1); end
      if (busy0 || busy1) failures++;
      if (tx0 !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
