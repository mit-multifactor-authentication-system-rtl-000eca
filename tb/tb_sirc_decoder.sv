// Testbench for sirc_decoder at the slot level: random 12-bit codes are sent as
// a 4-slot start mark, a space, then 1,0 for a 0 bit and 1,1,0 for a 1 bit,
// least significant bit first. Each must be decoded once; a command broken by
// an invalid pattern (three marks in a row) or a start mark only three slots
// long must give no output.
module tb_sirc_decoder;
  logic clk = 0, reset = 1, slot = 0, slot_valid = 0, valid;
  logic [11:0] code;
  int checks = 0, failures = 0, nvalid = 0;
  always #5 clk = ~clk;
  sirc_decoder dut (.clk(clk), .reset(reset), .slot(slot), .slot_valid(slot_valid), .code(code), .valid(valid));
  always @(posedge clk) if (!reset && valid) nvalid++;
  task automatic put(input logic v);
    slot = v; slot_valid = 1; @(negedge clk); slot_valid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask
  task automatic send_code(input logic [11:0] c, input bit corrupt, input int start = 4);
    repeat (start) put(1); put(0);
    for (int i = 0; i < 12; i++) begin
      if (corrupt && i == 5) begin put(1); put(1); put(1); put(0); end
      else if (c[i]) begin put(1); put(1); put(0); end
      else begin put(1); put(0); end
    end
    repeat (6) put(0);
  endtask
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    repeat (3) put(0);
    for (int i = 0; i < 40; i++) begin
      logic [11:0] c; int n;
      c = 12'($urandom); n = nvalid;
      send_code(c, 0);
      checks += 2;
      if (nvalid != n + 1) failures++;
      if (code !== c) begin failures++; $display("FAIL %h vs %h", code, c); end
      n = nvalid;
      send_code(12'($urandom), 1);
      checks++; if (nvalid != n) begin failures++; $display("FAIL corrupt command decoded"); end
      n = nvalid;
      send_code(12'($urandom), 0, 3);
      checks++; if (nvalid != n) begin failures++; $display("FAIL short start accepted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
