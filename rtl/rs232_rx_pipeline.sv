// RS-232 input pipeline. The receive line is synchronized, sampled at OVERSAMPLE
// times the baud rate and reduced back to one bit per bit time by majority vote,
// then framed by the receiver FSM. Because the sample windows run freely, a
// falling edge seen while the receiver is idle (a possible start bit) restarts
// the downsampler so its windows line up with the bit boundaries; edges inside a
// frame (busy) are ignored. A received character appears with a one-cycle valid
// pulse about one bit time after the end of its first stop bit. Structure and
// rates (9600 baud, 8x) follow the source; frame format 8N1 is this design's
// default.
module rs232_rx_pipeline #(
  parameter int unsigned CLK_HZ      = 65_000_000,
  parameter int unsigned BAUD        = 9600,
  parameter int unsigned OVERSAMPLE  = 8,
  parameter int unsigned DATA_BITS   = 8,
  parameter int unsigned PARITY_BITS = 0,
  parameter int unsigned STOP_BITS   = 1
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 rx,
  output logic [DATA_BITS-1:0] data,
  output logic                 valid
);
  import mfa_pkg::*;
  logic rx_sync, smp, smp_valid, fall, bit_val, bit_valid, busy;

  synchronizer u_sync (.clk(clk), .in(rx), .out(rx_sync));
  sampler #(.PERIOD(CLK_HZ / (BAUD * OVERSAMPLE))) u_sampler (
    .clk(clk), .reset(reset), .in(rx_sync), .sample(smp), .sample_valid(smp_valid));
  edge_detector #(.EDGE(NEGEDGE)) u_start_edge (.clk(clk), .reset(reset), .in(rx_sync), .pulse(fall));
  downsampler #(.RATIO(OVERSAMPLE)) u_down (
    .clk(clk), .reset(reset | (fall & ~busy)), .sample(smp), .sample_valid(smp_valid),
    .out(bit_val), .out_valid(bit_valid));
  rs232_rx #(.DATA_BITS(DATA_BITS), .PARITY_BITS(PARITY_BITS), .STOP_BITS(STOP_BITS)) u_rx (
    .clk(clk), .reset(reset), .line_bit(bit_val), .line_valid(bit_valid), .data(data), .valid(valid), .busy(busy));
endmodule
