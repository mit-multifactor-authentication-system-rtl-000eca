// Testbench for sirc_pipeline at a 1 MHz clock (75-cycle samples, 600-cycle
// protocol slots). An active-low IR receiver is modelled: a 2400-cycle start
// burst, a 600-cycle gap, then 600 or 1200 cycles of burst for a 0 or 1 bit, each
// followed by a 600-cycle gap, least significant bit first. Bursts start at
// random offsets from the sampling grid. Like a held key on a real remote, each
// code is sent three times; a frame whose edges fall mid-window can be lost, so
// each code must be decoded at least once and never wrongly.
module tb_sirc_pipeline;
  localparam int T = 600;
  logic clk = 0, reset = 1, ir_n = 1, valid;
  logic [11:0] code;
  logic [3:0] cmd;
  int checks = 0, failures = 0, nvalid = 0;
  always #5 clk = ~clk;
  sirc_pipeline #(.CLK_HZ(1_000_000)) dut (.clk(clk), .reset(reset), .ir_n(ir_n), .code(code), .cmd(cmd), .valid(valid));
  always @(posedge clk) if (!reset && valid) nvalid++;
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    repeat (5000) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      logic [11:0] c; int n;
      c = 12'($urandom); n = nvalid;
      for (int rep = 0; rep < 3; rep++) begin
        int m;
        m = nvalid;
        repeat ($urandom_range(0, 599)) @(negedge clk);
        ir_n = 0; repeat (4 * T) @(negedge clk); ir_n = 1; repeat (T) @(negedge clk);
        for (int b = 0; b < 12; b++) begin
          ir_n = 0; repeat (c[b] ? 2 * T : T) @(negedge clk); ir_n = 1; repeat (T) @(negedge clk);
        end
        repeat (10 * T) @(negedge clk);
        if (nvalid != m) begin
          checks += 2;
          if (code !== c) begin failures++; $display("FAIL %h vs %h", code, c); end
          if (cmd !== c[3:0]) failures++;
        end
      end
      checks++;
      if (nvalid == n) begin failures++; $display("FAIL no decode of %h", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5_000_000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
