// MD5 hash of a fixed-size message, computed over several cycles.
// The whole message (IN_BYTES bytes, first byte in the most significant bits)
// is presented at once and held while busy. Its padding (a 0x80 byte, zeros and
// the 64-bit little-endian bit length) is fixed by IN_BYTES, so the padded
// message is just wiring. A start pulse runs a state machine: one setup cycle,
// then per 512-bit chunk one chunk-setup cycle, 64 round cycles (one MD5 step
// each) and one finalization cycle, then one cycle to form the digest. done
// pulses with the 128-bit digest, which holds until the next start; the digest
// is in the usual printed order (first digest byte in the most significant
// bits). Latency from start to done is 3 + 66 * NCHUNKS cycles. The round
// constants K[i] = floor(2^32 * |sin(i + 1)|) and the per-round shift amounts
// are small constant tables. Byte order is swapped where MD5 reads its words
// little endian. The structure follows the source design.
module md5
  import mfa_pkg::*;
#(
  parameter int unsigned IN_BYTES = 8
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  start,
  input  logic [IN_BYTES*8-1:0] message,
  output logic                  busy,
  output logic                  done,
  output logic [127:0]          digest
);
  localparam int unsigned NCHUNKS   = (IN_BYTES + 8) / 64 + 1;
  localparam int unsigned PAD_BYTES = NCHUNKS * 64;
  localparam int unsigned ZERO_BYTES = PAD_BYTES - IN_BYTES - 9;
  localparam logic [63:0] BIT_LEN   = 64'(IN_BYTES) * 64'd8;

  typedef enum logic [2:0] {MD5_IDLE, MD5_SETUP, MD5_CHUNK_SETUP, MD5_ROUNDS, MD5_CHUNK_FINAL, MD5_FINAL} md5_state_t;

  md5_state_t state;
  logic [PAD_BYTES*8-1:0] padded;
  logic [511:0]           chunk;
  logic [31:0]            a0, b0, c0, d0, ra, rb, rc, rd;
  logic [5:0]             round;
  logic [$clog2(NCHUNKS+1)-1:0] chunk_idx;

  // Padded message, byte 0 in the most significant bits.
  if (ZERO_BYTES > 0) begin : g_zeros
    assign padded = {message, 8'h80, {ZERO_BYTES{8'h00}},
                     BIT_LEN[7:0], BIT_LEN[15:8], BIT_LEN[23:16], BIT_LEN[31:24],
                     BIT_LEN[39:32], BIT_LEN[47:40], BIT_LEN[55:48], BIT_LEN[63:56]};
  end else begin : g_nozeros
    assign padded = {message, 8'h80,
                     BIT_LEN[7:0], BIT_LEN[15:8], BIT_LEN[23:16], BIT_LEN[31:24],
                     BIT_LEN[39:32], BIT_LEN[47:40], BIT_LEN[55:48], BIT_LEN[63:56]};
  end

  assign chunk = padded[(PAD_BYTES - 64 * chunk_idx) * 8 - 1 -: 512];

  // Round constant table.
  function automatic logic [31:0] k_rom(input logic [5:0] i);
    logic [31:0] k;
    unique case (i)
      0: k = 32'hd76aa478; 1: k = 32'he8c7b756; 2: k = 32'h242070db; 3: k = 32'hc1bdceee;
      4: k = 32'hf57c0faf; 5: k = 32'h4787c62a; 6: k = 32'ha8304613; 7: k = 32'hfd469501;
      8: k = 32'h698098d8; 9: k = 32'h8b44f7af; 10: k = 32'hffff5bb1; 11: k = 32'h895cd7be;
      12: k = 32'h6b901122; 13: k = 32'hfd987193; 14: k = 32'ha679438e; 15: k = 32'h49b40821;
      16: k = 32'hf61e2562; 17: k = 32'hc040b340; 18: k = 32'h265e5a51; 19: k = 32'he9b6c7aa;
      20: k = 32'hd62f105d; 21: k = 32'h02441453; 22: k = 32'hd8a1e681; 23: k = 32'he7d3fbc8;
      24: k = 32'h21e1cde6; 25: k = 32'hc33707d6; 26: k = 32'hf4d50d87; 27: k = 32'h455a14ed;
      28: k = 32'ha9e3e905; 29: k = 32'hfcefa3f8; 30: k = 32'h676f02d9; 31: k = 32'h8d2a4c8a;
      32: k = 32'hfffa3942; 33: k = 32'h8771f681; 34: k = 32'h6d9d6122; 35: k = 32'hfde5380c;
      36: k = 32'ha4beea44; 37: k = 32'h4bdecfa9; 38: k = 32'hf6bb4b60; 39: k = 32'hbebfbc70;
      40: k = 32'h289b7ec6; 41: k = 32'heaa127fa; 42: k = 32'hd4ef3085; 43: k = 32'h04881d05;
      44: k = 32'hd9d4d039; 45: k = 32'he6db99e5; 46: k = 32'h1fa27cf8; 47: k = 32'hc4ac5665;
      48: k = 32'hf4292244; 49: k = 32'h432aff97; 50: k = 32'hab9423a7; 51: k = 32'hfc93a039;
      52: k = 32'h655b59c3; 53: k = 32'h8f0ccc92; 54: k = 32'hffeff47d; 55: k = 32'h85845dd1;
      56: k = 32'h6fa87e4f; 57: k = 32'hfe2ce6e0; 58: k = 32'ha3014314; 59: k = 32'h4e0811a1;
      60: k = 32'hf7537e82; 61: k = 32'hbd3af235; 62: k = 32'h2ad7d2bb; 63: k = 32'heb86d391;
      default: k = '0;
    endcase
    return k;
  endfunction

  // Shift amount table: four amounts per group of 16 rounds, used in rotation.
  function automatic logic [5:0] s_rom(input logic [5:0] i);
    logic [5:0] s;
    unique case ({i[5:4], i[1:0]})
      4'b00_00: s = 6'd7;  4'b00_01: s = 6'd12; 4'b00_10: s = 6'd17; 4'b00_11: s = 6'd22;
      4'b01_00: s = 6'd5;  4'b01_01: s = 6'd9;  4'b01_10: s = 6'd14; 4'b01_11: s = 6'd20;
      4'b10_00: s = 6'd4;  4'b10_01: s = 6'd11; 4'b10_10: s = 6'd16; 4'b10_11: s = 6'd23;
      default:  case (i[1:0]) 2'd0: s = 6'd6; 2'd1: s = 6'd10; 2'd2: s = 6'd15; default: s = 6'd21; endcase
    endcase
    return s;
  endfunction

  // One MD5 step.
  logic [31:0] f, m_word, f_sum;
  logic [3:0]  g;
  always_comb begin
    unique case (round[5:4])
      2'd0: begin f = (rb & rc) | (~rb & rd); g = round[3:0]; end
      2'd1: begin f = (rd & rb) | (~rd & rc); g = 4'(5 * round + 1); end
      2'd2: begin f = rb ^ rc ^ rd;           g = 4'(3 * round + 5); end
      default: begin f = rc ^ (rb | ~rd);     g = 4'(7 * round); end
    endcase
    m_word = endian_swap_32(chunk[511 - 32 * g -: 32]);
    f_sum  = f + ra + k_rom(round) + m_word;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= MD5_IDLE;
      done      <= 1'b0;
      digest    <= '0;
      round     <= '0;
      chunk_idx <= '0;
      {a0, b0, c0, d0} <= '0;
      {ra, rb, rc, rd} <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        MD5_IDLE: if (start) state <= MD5_SETUP;
        MD5_SETUP: begin
          a0 <= 32'h67452301;
          b0 <= 32'hefcdab89;
          c0 <= 32'h98badcfe;
          d0 <= 32'h10325476;
          chunk_idx <= '0;
          state <= MD5_CHUNK_SETUP;
        end
        MD5_CHUNK_SETUP: begin
          {ra, rb, rc, rd} <= {a0, b0, c0, d0};
          round <= '0;
          state <= MD5_ROUNDS;
        end
        MD5_ROUNDS: begin
          ra <= rd;
          rd <= rc;
          rc <= rb;
          rb <= rb + leftrotate(f_sum, 5'(s_rom(round)));
          round <= round + 1'b1;
          if (round == 6'd63) state <= MD5_CHUNK_FINAL;
        end
        MD5_CHUNK_FINAL: begin
          a0 <= a0 + ra;
          b0 <= b0 + rb;
          c0 <= c0 + rc;
          d0 <= d0 + rd;
          if (int'(chunk_idx) == NCHUNKS - 1) state <= MD5_FINAL;
          else begin
            chunk_idx <= chunk_idx + 1'b1;
            state <= MD5_CHUNK_SETUP;
          end
        end
        MD5_FINAL: begin
          digest <= {endian_swap_32(a0), endian_swap_32(b0), endian_swap_32(c0), endian_swap_32(d0)};
          done   <= 1'b1;
          state  <= MD5_IDLE;
        end
        default: state <= MD5_IDLE;
      endcase
    end
  end

  assign busy = (state != MD5_IDLE);
endmodule
