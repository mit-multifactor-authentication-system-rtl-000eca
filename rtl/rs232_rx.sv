// RS-232 frame receiver. Works on a stream of line bits, one valid strobe per
// bit time (from the downsampler). In idle a 0 bit is taken as the start bit;
// then DATA_BITS data bits are collected least significant first, PARITY_BITS
// parity bits are checked (each must equal the even parity of the data) and
// STOP_BITS stop bits must be 1. A well-formed frame puts its character on
// data, which holds until the next good frame, with a one-cycle valid pulse;
// a malformed frame is dropped without any output. busy is high from the start
// bit to the last stop bit, so a caller can ignore line edges inside a frame.
// Even parity is this design's choice; the frame checks follow the source.
module rs232_rx #(
  parameter int unsigned DATA_BITS   = 8,
  parameter int unsigned PARITY_BITS = 0,
  parameter int unsigned STOP_BITS   = 1
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 line_bit,
  input  logic                 line_valid,
  output logic [DATA_BITS-1:0] data,
  output logic                 valid,
  output logic                 busy
);
  typedef enum logic [1:0] {RX_IDLE, RX_DATA, RX_PARITY, RX_STOP} rx_state_t;
  rx_state_t state;
  logic [DATA_BITS-1:0] shift;
  logic [7:0]           count;
  logic                 bad;

  assign busy = (state != RX_IDLE);

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= RX_IDLE;
      shift <= '0;
      count <= '0;
      bad   <= 1'b0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (line_valid) begin
        unique case (state)
          RX_IDLE: if (!line_bit) begin
            state <= RX_DATA;
            count <= '0;
            bad   <= 1'b0;
          end
          RX_DATA: begin
            shift <= {line_bit, shift[DATA_BITS-1:1]};
            if (count == 8'(DATA_BITS - 1)) begin
              count <= '0;
              state <= (PARITY_BITS != 0) ? RX_PARITY : RX_STOP;
            end else count <= count + 1'b1;
          end
          RX_PARITY: begin
            if (line_bit != ^shift) bad <= 1'b1;
            if (count == 8'(PARITY_BITS - 1)) begin
              count <= '0;
              state <= RX_STOP;
            end else count <= count + 1'b1;
          end
          RX_STOP: begin
            if (count == 8'(STOP_BITS - 1)) begin
              state <= RX_IDLE;
              if (line_bit && !bad) begin
                data  <= shift;
                valid <= 1'b1;
              end
            end else begin
              count <= count + 1'b1;
              if (!line_bit) bad <= 1'b1;
            end
          end
        endcase
      end
    end
  end
endmodule
