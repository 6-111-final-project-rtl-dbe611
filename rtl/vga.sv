// vga: 640x480 VGA timing generator on the 25 MHz pixel clock.
//
// hcount runs over 640 visible pixels, then the front porch (16), sync pulse
// (96) and back porch (48): 800 clocks per line. vcount runs over 480
// visible lines, front porch (11), sync (2) and back porch (31): 524 lines
// per frame. These numbers are the document's. hsync and vsync are active
// high here (high during the pulse); the board output inverts them. blank is
// high outside the visible 640x480 area. All outputs are registered and
// consistent with each other in the same clock.
module vga #(
  parameter int H_DISPLAY = 640,
  parameter int H_FP      = 16,
  parameter int H_SYNC    = 96,
  parameter int H_BP      = 48,
  parameter int V_DISPLAY = 480,
  parameter int V_FP      = 11,
  parameter int V_SYNC    = 2,
  parameter int V_BP      = 31
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);

  localparam int H_TOTAL = H_DISPLAY + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_DISPLAY + V_FP + V_SYNC + V_BP;

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (hcount == 11'(H_TOTAL - 1)) ? '0 : hcount + 11'd1;
    v_next = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      v_next = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b0;
      vsync  <= 1'b0;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= (h_next >= 11'(H_DISPLAY + H_FP)) && (h_next < 11'(H_DISPLAY + H_FP + H_SYNC));
      vsync  <= (v_next >= 10'(V_DISPLAY + V_FP)) && (v_next < 10'(V_DISPLAY + V_FP + V_SYNC));
      blank  <= (h_next >= 11'(H_DISPLAY)) || (v_next >= 10'(V_DISPLAY));
    end
  end

endmodule
