// Testbench for rs232_rx at the bit level: 8N1 and 8E1-with-two-stop-bits
// receivers are fed random frames, one line bit per valid strobe with idle gaps.
// Good frames must be delivered once with a one-cycle valid; frames with a bad
// stop bit or a bad parity bit must be dropped; busy must be high inside frames.
module tb_rs232_rx;
  logic clk = 0, reset = 1, lb = 1, lv = 0;
  logic [7:0] d0, d1;
  logic v0, v1, b0, b1;
  int checks = 0, failures = 0, got0 = 0, got1 = 0;
  logic [7:0] last0, last1;
  always #5 clk = ~clk;
  rs232_rx dut0 (.clk(clk), .reset(reset), .line_bit(lb), .line_valid(lv), .data(d0), .valid(v0), .busy(b0));
  rs232_rx #(.DATA_BITS(8), .PARITY_BITS(1), .STOP_BITS(2)) dut1 (
    .clk(clk), .reset(reset), .line_bit(lb), .line_valid(lv), .data(d1), .valid(v1), .busy(b1));
  always @(posedge clk) if (!reset) begin
    if (v0) begin got0++; last0 <= d0; end
    if (v1) begin got1++; last1 <= d1; end
  end
  task automatic send_bits(input logic [15:0] bits, input int n);
    for (int i = 0; i < n; i++) begin
      lb = bits[i]; lv = 1; @(negedge clk); lv = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] c; int g0, g1;
      c = 8'($urandom); g0 = got0; g1 = got1;
      // 8N1 frame: start, data, stop
      send_bits({6'h3F, 1'b1, c, 1'b0}, 10);
      send_bits(16'hFFFF, 2);
      checks += 2;
      if (got0 != g0 + 1 || last0 !== c) begin failures++; $display("FAIL 8N1 %h", c); end
      if (b0) failures++;
      // 8E2 frame with the right parity
      reset = 1; @(negedge clk); reset = 0;
      g1 = got1;
      send_bits({4'hF, 2'b11, ^c, c, 1'b0}, 12);
      repeat (2) @(negedge clk);
      checks++; if (got1 != g1 + 1 || last1 !== c) begin failures++; $display("FAIL 8E2 %h", c); end
      // 8E2 frame with a wrong parity bit: dropped
      g1 = got1;
      send_bits({4'hF, 2'b11, ~^c, c, 1'b0}, 12);
      repeat (2) @(negedge clk);
      checks++; if (got1 != g1) failures++;
      // 8N1 frame with a bad stop bit: dropped
      g0 = got0;
      reset = 1; @(negedge clk); reset = 0;
      send_bits({6'h3F, 1'b0, c, 1'b0}, 10);
      send_bits(16'hFFFF, 2);
      checks++; if (got0 != g0) failures++;
      // busy is high in the middle of a frame
      send_bits({6'h3F, 1'b1, c, 1'b0}, 4);
      checks++; if (!b0) failures++;
      send_bits({6'h3F, 1'b1, c, 1'b0} >> 4, 8);
      reset = 1; @(negedge clk); reset = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
