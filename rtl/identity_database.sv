// Identity database: decides whether a login is authorized. Each of the ENTRIES
// records in a ROM holds an 8-character username (space padded), the MD5 digest
// of the 8-character space-padded password and the 9-digit ID number, all as
// ASCII, packed {username, digest, id} in 264 bits; the ROM is loaded from
// DB_FILE, one record of 66 hex digits per line. Storing only the password
// digest means the plain passwords are never in the bitstream.
// A start pulse hashes the submitted password with the MD5 core, then compares
// the submitted username, digest and ID number with one record per cycle. On a
// match done and authorized pulse together; when all records have been checked
// without a match done pulses alone. Inputs must hold from start to done.
// Latency: 69 cycles of hashing plus one cycle per record searched. The flow
// (idle, hashing, searching) follows the source design; the record layout and
// the sample records are this design's choices.
module identity_database #(
  parameter int unsigned ENTRIES = 5,
  parameter string       DB_FILE = "rtl/identity_db.hex"
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic [63:0] username,
  input  logic [63:0] password,
  input  logic [71:0] id_number,
  output logic        done,
  output logic        authorized
);
  localparam int unsigned AW = $clog2(ENTRIES + 1);
  typedef enum logic [1:0] {DB_IDLE, DB_HASHING, DB_SEARCHING} db_state_t;

  logic [263:0] rom [ENTRIES];
  initial $readmemh(DB_FILE, rom);

  db_state_t    state;
  logic [AW-1:0] addr;
  logic         md5_start, md5_done, md5_busy;
  logic [127:0] digest;
  logic [263:0] record;

  md5 #(.IN_BYTES(8)) u_md5 (
    .clk(clk), .reset(reset), .start(md5_start), .message(password),
    .busy(md5_busy), .done(md5_done), .digest(digest));

  assign md5_start = (state == DB_IDLE) && start;
  assign record    = (addr < AW'(ENTRIES)) ? rom[addr] : '0;

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= DB_IDLE;
      addr       <= '0;
      done       <= 1'b0;
      authorized <= 1'b0;
    end else begin
      done       <= 1'b0;
      authorized <= 1'b0;
      unique case (state)
        DB_IDLE: if (start) state <= DB_HASHING;
        DB_HASHING: if (md5_done) begin
          addr  <= '0;
          state <= DB_SEARCHING;
        end
        DB_SEARCHING: begin
          if (addr == AW'(ENTRIES)) begin
            done  <= 1'b1;
            state <= DB_IDLE;
          end else if (record == {username, digest, id_number}) begin
            done       <= 1'b1;
            authorized <= 1'b1;
            state      <= DB_IDLE;
          end else begin
            addr <= addr + 1'b1;
          end
        end
        default: state <= DB_IDLE;
      endcase
    end
  end
endmodule
