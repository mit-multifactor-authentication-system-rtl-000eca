// RS-232 character sender. A send request while idle latches the character and
// transmits one frame at BAUD: a start bit (0), DATA_BITS data bits least
// significant first, PARITY_BITS even-parity bits and STOP_BITS stop bits (1).
// Bit timing comes from an internal divider restarted at each send, so the
// frame lasts exactly (1 + DATA_BITS + PARITY_BITS + STOP_BITS) * (CLK_HZ/BAUD)
// + 1 cycles (the start bit is one cycle longer than the others), after which
// done is high for one cycle. Requests while busy are
// ignored. The line idles high. Frame order follows RS-232; even parity and
// dropping requests while busy are this design's choices.
module rs232_tx #(
  parameter int unsigned CLK_HZ      = 65_000_000,
  parameter int unsigned BAUD        = 9600,
  parameter int unsigned DATA_BITS   = 8,
  parameter int unsigned PARITY_BITS = 0,
  parameter int unsigned STOP_BITS   = 1
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [DATA_BITS-1:0] data,
  input  logic                 send,
  output logic                 tx,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned NBITS = 1 + DATA_BITS + PARITY_BITS + STOP_BITS;
  logic [NBITS-1:0] frame;
  logic [7:0]       left;
  logic             tick;

  divider #(.PERIOD(CLK_HZ / BAUD)) u_baud (.clk(clk), .reset(reset | (send & ~busy)), .pulse(tick));

  always_ff @(posedge clk) begin
    if (reset) begin
      frame <= '1;
      left  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      tx    <= 1'b1;
    end else begin
      done <= 1'b0;
      if (send && !busy) begin
        // Frame, first bit out at position 0: start, data, parity, stop.
        frame <= {{STOP_BITS{1'b1}}, {PARITY_BITS{^data}}, data, 1'b0};
        left  <= 8'(NBITS);
        busy  <= 1'b1;
        tx    <= 1'b0;
      end else if (busy && tick) begin
        frame <= {1'b1, frame[NBITS-1:1]};
        tx    <= frame[1];
        left  <= left - 1'b1;
        if (left == 8'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
          tx   <= 1'b1;
        end
      end
    end
  end
endmodule
