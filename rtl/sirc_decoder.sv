// SIRC (Sony infrared remote) command decoder. Works on a stream of 600 us
// slots (one valid strobe per slot, 1 = IR burst present). It waits for a start
// pulse of at least four 1 slots (2.4 ms) ended by a 0 slot, then reads 12 bits,
// least significant first: 1,0 is a 0 and 1,1,0 is a 1. Any other pattern
// abandons the command and the decoder looks for a new start pulse. After the
// twelfth bit the code (command in code[6:0], device address in code[11:7]) is
// output with a one-cycle valid pulse, in the cycle after that bit's closing 0
// slot. Accepting longer start pulses than four slots is this design's choice.
module sirc_decoder #(
  parameter int unsigned NBITS = 12
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             slot,
  input  logic             slot_valid,
  output logic [NBITS-1:0] code,
  output logic             valid
);
  typedef enum logic {SIRC_START, SIRC_DATA} sirc_state_t;
  sirc_state_t      state;
  logic [2:0]       ones;
  logic [NBITS-1:0] shift;
  logic [4:0]       nbits;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= SIRC_START;
      ones  <= '0;
      shift <= '0;
      nbits <= '0;
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (slot_valid) begin
        unique case (state)
          SIRC_START: begin
            if (slot) begin
              if (ones != 3'd7) ones <= ones + 1'b1;
            end else begin
              if (ones >= 3'd4) begin
                state <= SIRC_DATA;
                nbits <= '0;
              end
              ones <= '0;
            end
          end
          SIRC_DATA: begin
            if (slot) begin
              if (ones == 3'd2) begin        // 1,1,1: not a bit
                state <= SIRC_START;
                ones  <= 3'd3;
              end else ones <= ones + 1'b1;
            end else begin
              ones <= '0;
              if (ones == 3'd0) begin        // 0 with no mark: not a bit
                state <= SIRC_START;
              end else begin
                shift <= {(ones == 3'd2), shift[NBITS-1:1]};
                if (nbits == 5'(NBITS - 1)) begin
                  code  <= {(ones == 3'd2), shift[NBITS-1:1]};
                  valid <= 1'b1;
                  state <= SIRC_START;
                end
                nbits <= nbits + 1'b1;
              end
            end
          end
        endcase
      end
    end
  end
endmodule
