// Testbench for serial_output_selector: random request patterns; the registered
// output must be the bell if requested, else the echo, else the lowest-numbered
// prompt, else nothing.
module tb_serial_output_selector;
  logic clk = 0, reset = 1, bell = 0, echo = 0, send;
  logic [7:0] echo_c = 0, out;
  logic [3:0] ps = 0;
  logic [3:0][7:0] pc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  serial_output_selector #(.NPROMPTS(4)) dut (.clk(clk), .reset(reset), .bell_en(bell), .echo_en(echo), .echo_char(echo_c),
    .prompt_send(ps), .prompt_char(pc), .send(send), .char_out(out));
  initial begin
    pc = '0;
    repeat (2) @(negedge clk); reset = 0;
    for (int i = 0; i < 300; i++) begin
      logic es; logic [7:0] ec;
      bell = ($urandom_range(0, 5) == 0); echo = $urandom_range(0, 1); echo_c = 8'($urandom);
      ps = 4'($urandom); pc = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      es = bell | echo | (ps != 0);
      if (bell) ec = 8'h07; else if (echo) ec = echo_c;
      else if (ps[0]) ec = pc[0]; else if (ps[1]) ec = pc[1]; else if (ps[2]) ec = pc[2]; else if (ps[3]) ec = pc[3];
      else ec = 8'h00;
      @(negedge clk);
      checks++; if (send !== es || (es && out !== ec)) begin failures++; $display("FAIL %b %b %b", bell, echo, ps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
