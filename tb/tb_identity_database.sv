// Testbench for identity_database with the sample records. Every record's
// username, password and ID must be authorized; a wrong password, a wrong ID or
// an unknown user must not be. The start-to-done latency is checked: hashing
// (69 cycles) plus one cycle per record searched.
module tb_identity_database;
  logic clk = 0, reset = 1, start = 0, done, authorized;
  logic [63:0] user, pass;
  logic [71:0] id;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  identity_database dut (.clk(clk), .reset(reset), .start(start), .username(user), .password(pass), .id_number(id),
                         .done(done), .authorized(authorized));
  task automatic try_login(input logic [63:0] u, input logic [63:0] p, input logic [71:0] i, input bit ok, input int lat);
    int t; logic a;
    user = u; pass = p; id = i;
    start = 1; @(negedge clk); start = 0; t = 1;
    while (!done && t < 500) begin @(negedge clk); t++; end
    a = authorized;
    checks += 2;
    if (a !== ok) begin failures++; $display("FAIL %s/%s: authorized=%b", u, p, a); end
    if (t != lat) begin failures++; $display("FAIL %s latency %0d, expected %0d", u, t, lat); end
    repeat (3) @(negedge clk);
  endtask
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    // record k matches after k + 1 search cycles
    try_login("aneesh  ", "wildcat ", "912345678", 1, 71);
    try_login("paige   ", "joke6111", "923456789", 1, 72);
    try_login("alex    ", "mentor  ", "934567890", 1, 73);
    try_login("gim     ", "fpga    ", "945678901", 1, 74);
    try_login("student ", "password", "956789012", 1, 75);
    // failures search all five records
    try_login("paige   ", "joke6112", "923456789", 0, 76);
    try_login("paige   ", "joke6111", "923456788", 0, 76);
    try_login("mallory ", "password", "956789012", 0, 76);
    try_login("aneesh  ", "joke6111", "923456789", 0, 76);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
