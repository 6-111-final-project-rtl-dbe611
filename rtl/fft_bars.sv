// fft_bars: draws the spectrum as coloured vertical bars in the top part of
// the screen.
//
// Inside the bar area (x 26..619, y 21..264, the document's placement) the
// magnitude memory is addressed with hcount / 32, so each of the lowest
// frequency bins fills a 32-pixel-wide column. The returned magnitude,
// divided by 2^AMP_SHIFT and limited to the area height, is the bar height:
// pixels from the bottom of the area up to that height are coloured, the
// rest is black. The colour depends on the x position, in 32-pixel bands
// cycling red, orange, yellow, green, teal, blue, purple, pink (band edges
// offset by 4 pixels, as in the document). The fixed scale shift is this
// design's choice for "the largest magnitude gives the tallest bar".
// Timing: addr is combinational from hcount; the magnitude arrives one clock
// later, so pixel and in_area are registered and refer to the previous
// clock's hcount/vcount.
module fft_bars #(
  parameter int AMP_SHIFT = 7,
  parameter int X_MIN = 26,  parameter int X_MAX = 619,
  parameter int Y_MIN = 21,  parameter int Y_MAX = 264
) (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [9:0]  addr,
  input  logic [31:0] amp_in,
  output logic [11:0] pixel,
  output logic        in_area
);

  localparam int HEIGHT = Y_MAX - Y_MIN + 1;

  logic [10:0] h_q;
  logic [9:0]  v_q;
  logic        area_q;
  logic [31:0] height;
  logic [2:0]  band;
  logic [11:0] colour;

  assign addr = 10'(hcount >> 5);

  always_ff @(posedge clk) begin
    h_q    <= hcount;
    v_q    <= vcount;
    area_q <= (hcount >= 11'(X_MIN)) && (hcount <= 11'(X_MAX)) &&
              (vcount >= 10'(Y_MIN)) && (vcount <= 10'(Y_MAX));
  end

  always_comb begin
    height = amp_in >> AMP_SHIFT;
    if (height > 32'(HEIGHT)) height = 32'(HEIGHT);
    band = 3'((h_q - 11'd4) >> 5);
    if (h_q < 11'd36) band = 3'd0;
    unique case (band)
      3'd0: colour = 12'hF00;  // red
      3'd1: colour = 12'hE60;  // orange
      3'd2: colour = 12'hFC0;  // yellow
      3'd3: colour = 12'h7C0;  // green
      3'd4: colour = 12'h0F8;  // teal
      3'd5: colour = 12'h0FF;  // blue
      3'd6: colour = 12'h80F;  // purple
      default: colour = 12'hF77; // pink
    endcase
  end

  // lit when the pixel lies within 'height' rows of the area's bottom row
  always_comb begin
    in_area = area_q;
    pixel   = (area_q && (32'(Y_MAX) - 32'(v_q) < height)) ? colour : 12'h000;
  end

endmodule
