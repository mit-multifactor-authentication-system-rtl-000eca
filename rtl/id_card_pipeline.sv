// ID card reading pipeline. Generates the 125 kHz carrier for the external
// reader circuit and turns the reader's Schmitt-trigger output into card data:
// synchronize, oversample at 8x the 4 kHz data rate (32 kHz), take the majority
// of every 8 samples, PSK-decode (1 on each phase change) and descramble over a
// 32-bit window. Data flows one way with no feedback; card_data differs from the
// idle value (0 with the default descrambler) once a card has produced
// transitions. Rates follow the source; rounding of the sample period to whole
// clock cycles is this design's.
module id_card_pipeline #(
  parameter int unsigned CLK_HZ     = 65_000_000,
  parameter int unsigned CARRIER_HZ = 125_000,
  parameter int unsigned SAMPLE_HZ  = 32_000,
  parameter int unsigned RATIO      = 8
) (
  input  logic        clk,
  input  logic        reset,
  output logic        carrier,     // to the level shifter and coil driver
  input  logic        rfid_in,     // Schmitt trigger output of the reader
  output logic [31:0] card_data
);
  logic in_sync, smp, smp_valid, ds, ds_valid, psk_bit, psk_valid;

  square_wave_gen #(.PERIOD(CLK_HZ / CARRIER_HZ)) u_carrier (.clk(clk), .reset(reset), .wave(carrier));
  synchronizer u_sync (.clk(clk), .in(rfid_in), .out(in_sync));
  sampler #(.PERIOD(CLK_HZ / SAMPLE_HZ)) u_sampler (
    .clk(clk), .reset(reset), .in(in_sync), .sample(smp), .sample_valid(smp_valid));
  downsampler #(.RATIO(RATIO)) u_down (
    .clk(clk), .reset(reset), .sample(smp), .sample_valid(smp_valid), .out(ds), .out_valid(ds_valid));
  psk_decoder u_psk (.clk(clk), .reset(reset), .in(ds), .in_valid(ds_valid), .bit_out(psk_bit), .bit_valid(psk_valid));
  flexsecure_descrambler u_descr (.clk(clk), .reset(reset), .bit_in(psk_bit), .bit_valid(psk_valid), .card_data(card_data));
endmodule
