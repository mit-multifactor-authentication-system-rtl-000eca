// Synchronizer: brings an asynchronous level into the clk domain through a chain
// of STAGES flip-flops. Output lags the input by STAGES clock cycles. The chain
// depth of two is this design's choice.
module synchronizer #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic in,
  output logic out
);
  logic [STAGES-1:0] chain;
  always_ff @(posedge clk) chain <= {chain[STAGES-2:0], in};
  assign out = chain[STAGES-1];
endmodule
