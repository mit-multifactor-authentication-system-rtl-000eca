// Testbench for id_card_pipeline at a reduced clock (256 kHz, so 8 cycles per
// 32 kHz sample and 64 cycles per 4 kHz data bit; carrier period 2 cycles).
// The reader output is driven as a sequence of random levels, one per data bit,
// aligned to the pipeline's sample windows. card_data must become the last 32
// phase changes (level XOR previous level) and the carrier must toggle every
// cycle.
module tb_id_card_pipeline;
  logic clk = 0, reset = 1, rfid_in = 0, carrier;
  logic [31:0] card_data, expect_w = '0;
  int checks = 0, failures = 0, toggles = 0;
  logic prev_level = 0, prev_carrier = 0;
  always #5 clk = ~clk;
  id_card_pipeline #(.CLK_HZ(256_000)) dut (.clk(clk), .reset(reset), .carrier(carrier), .rfid_in(rfid_in), .card_data(card_data));
  always @(posedge clk) if (!reset) begin toggles += (carrier != prev_carrier); prev_carrier <= carrier; end
  logic levels [80];
  initial begin
    for (int b = 0; b < 80; b++) levels[b] = 1'($urandom_range(0, 1));
    repeat (2) @(negedge clk); reset = 0;
    // The first sample is taken 8 cycles after reset, two cycles behind the pin:
    // start each bit two cycles early so a window of 8 samples covers it.
    fork
      begin
        for (int b = 0; b < 80; b++) begin rfid_in = levels[b]; repeat (64) @(negedge clk); end
      end
      begin
        repeat (64 + 8) @(negedge clk);  // bit 0 fully sampled and through the pipeline
        for (int b = 0; b < 80; b++) begin
          expect_w = {expect_w[30:0], levels[b] ^ prev_level};
          prev_level = levels[b];
          checks++;
          if (card_data !== expect_w) begin failures++; if (failures < 5) $display("FAIL bit %0d: %h vs %h", b, card_data, expect_w); end
          repeat (64) @(negedge clk);
        end
      end
    join
    checks++; if (toggles < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
