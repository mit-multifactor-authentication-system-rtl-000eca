// Testbench for serial_prompt with the prompt "Login:": a model sender answers
// each send with done a few cycles later. The characters must come out in order,
// one per done, and busy must fall after the last; a start while busy is
// ignored and a second start replays the prompt.
module tb_serial_prompt;
  localparam logic [47:0] TEXT = "Login:";
  logic clk = 0, reset = 1, start = 0, tx_done = 0, send, busy;
  logic [7:0] ch;
  int checks = 0, failures = 0;
  string got;
  always #5 clk = ~clk;
  serial_prompt #(.LEN(6), .PROMPT(TEXT)) dut (.clk(clk), .reset(reset), .start(start), .tx_done(tx_done), .send(send), .char_out(ch), .busy(busy));
  // model sender
  always @(posedge clk) begin
    if (send) begin
      got = {got, string'(ch)};
      fork begin repeat (3) @(negedge clk); tx_done = 1; @(negedge clk); tx_done = 0; end join_none
    end
  end
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int r = 0; r < 2; r++) begin
      got = "";
      start = 1; @(negedge clk); start = 0;
      repeat (6) @(negedge clk); start = 1; @(negedge clk); start = 0;
      repeat (60) @(negedge clk);
      checks += 2;
      if (got != "Login:") begin failures++; $display("FAIL got '%s'", got); end
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
