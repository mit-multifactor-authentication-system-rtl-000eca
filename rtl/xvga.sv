// XVGA timing generator: 1024x768 pixels at 60 Hz from a 65 MHz pixel clock.
// hcount runs 0..1343 along a line and vcount 0..805 down the frame; pixels
// with hcount < 1024 and vcount < 768 are visible and blank is high elsewhere.
// hsync is low for hcount 1048..1183 and vsync low for vcount 771..776
// (negative polarity). All outputs are registered and mutually aligned. The
// timing numbers are the standard VESA 1024x768@60 ones.
module xvga (
  input  logic        clk,
  input  logic        reset,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int unsigned H_VISIBLE = 1024, H_SYNC_START = 1048, H_SYNC_END = 1184, H_TOTAL = 1344;
  localparam int unsigned V_VISIBLE = 768,  V_SYNC_START = 771,  V_SYNC_END = 777,  V_TOTAL = 806;

  logic        h_end, v_end;
  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_end  = (hcount == 11'(H_TOTAL - 1));
    v_end  = (vcount == 10'(V_TOTAL - 1));
    h_next = h_end ? '0 : hcount + 1'b1;
    v_next = h_end ? (v_end ? '0 : vcount + 1'b1) : vcount;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !((h_next >= 11'(H_SYNC_START)) && (h_next < 11'(H_SYNC_END)));
      vsync  <= !((v_next >= 10'(V_SYNC_START)) && (v_next < 10'(V_SYNC_END)));
      blank  <= (h_next >= 11'(H_VISIBLE)) || (v_next >= 10'(V_VISIBLE));
    end
  end
endmodule
