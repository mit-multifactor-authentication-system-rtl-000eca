// SIRC receiving pipeline. The IR receiver module's output is active low, so it
// is inverted, then synchronized, sampled every 75 us and reduced by a majority
// of 8 samples to one value per 600 us protocol slot, which the SIRC decoder
// turns into 12-bit codes. cmd is the low four bits of the command, which is
// what the digit keys need. Rates follow the source.
module sirc_pipeline #(
  parameter int unsigned CLK_HZ    = 65_000_000,
  parameter int unsigned SAMPLE_US = 75,
  parameter int unsigned RATIO     = 8
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        ir_n,     // IR receiver output, low while a burst is seen
  output logic [11:0] code,
  output logic [3:0]  cmd,
  output logic        valid
);
  logic ir_sync, smp, smp_valid, slot, slot_valid;

  synchronizer u_sync (.clk(clk), .in(~ir_n), .out(ir_sync));
  sampler #(.PERIOD((CLK_HZ / 1_000_000) * SAMPLE_US)) u_sampler (
    .clk(clk), .reset(reset), .in(ir_sync), .sample(smp), .sample_valid(smp_valid));
  downsampler #(.RATIO(RATIO)) u_down (
    .clk(clk), .reset(reset), .sample(smp), .sample_valid(smp_valid), .out(slot), .out_valid(slot_valid));
  sirc_decoder u_dec (.clk(clk), .reset(reset), .slot(slot), .slot_valid(slot_valid), .code(code), .valid(valid));

  assign cmd = code[3:0];
endmodule
