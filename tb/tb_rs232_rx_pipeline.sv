// Testbench for rs232_rx_pipeline at a reduced clock: 64 kHz clock and 1000
// baud give 8 cycles per sample and 64 cycles per bit. Random characters are
// sent as 8N1 frames with random idle gaps (not a whole number of bits), so the
// start-bit realignment of the downsampler is needed. Each character must be
// received once and in order, within 1.5 bit times after its stop bit ends.
module tb_rs232_rx_pipeline;
  localparam int BIT = 64;
  logic clk = 0, reset = 1, rx = 1, valid;
  logic [7:0] data;
  int checks = 0, failures = 0, nrx = 0;
  logic [7:0] sent [$];
  always #5 clk = ~clk;
  rs232_rx_pipeline #(.CLK_HZ(64_000), .BAUD(1000)) dut (.clk(clk), .reset(reset), .rx(rx), .data(data), .valid(valid));
  always @(posedge clk) if (!reset && valid) begin
    nrx++;
    checks++;
    if (sent.size() == 0 || data !== sent[0]) begin failures++; $display("FAIL got %h", data); end
    if (sent.size() != 0) void'(sent.pop_front());
  end
  initial begin
    repeat (3) @(negedge clk); reset = 0;
    repeat (200) @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      logic [9:0] frame;
      logic [7:0] c;
      c = 8'($urandom);
      frame = {1'b1, c, 1'b0};
      sent.push_back(c);
      for (int k = 0; k < 10; k++) begin rx = frame[k]; repeat (BIT) @(negedge clk); end
      repeat (BIT * 3 / 2) @(negedge clk);
      checks++; if (sent.size() != 0) begin failures++; $display("FAIL char %0d not received", i); void'(sent.pop_front()); end
      repeat ($urandom_range(0, 150)) @(negedge clk);
    end
    checks++; if (nrx != 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
