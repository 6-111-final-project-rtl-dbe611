// display: the music player's display subsystem on the 25 MHz pixel clock.
//
// The vga timing generator produces hcount/vcount and the sync and blank
// signals; music_player_display turns them into the screen picture, reading
// spectrum magnitudes through amp_addr/amp_in. The outputs are the board's
// VGA pins: 4 bits per colour, zero while blanking, and active-low sync
// pulses (the 640x480 mode's negative polarity).
// Timing: colour and sync leave two clocks after the timing generator.
module display
  import gmp_pkg::*;
#(
  parameter int unsigned TICKS_PER_SEC = 25_000_000,
  parameter int unsigned BAR_K         = 48_828
) (
  input  logic         clk,
  input  logic         rst,
  input  ctrl_pulses_t ctrl,
  input  logic [1:0]   speed_sel,
  input  logic [31:0]  amp_in,
  output logic [9:0]   amp_addr,
  output logic [3:0]   vga_r,
  output logic [3:0]   vga_g,
  output logic [3:0]   vga_b,
  output logic         vga_hs,
  output logic         vga_vs,
  // state, for observation
  output logic [10:0]  hcount,
  output logic [9:0]   vcount,
  output logic [1:0]   song_idx,
  output logic         show_pause,
  output logic         song_ended,
  output logic [11:0]  time_digits,
  output logic [9:0]   bar_fill
);

  logic   hsync, vsync, blank, hs_out, vs_out, blank_out;
  pixel_t pixel;

  vga u_vga (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  music_player_display #(.TICKS_PER_SEC(TICKS_PER_SEC), .BAR_K(BAR_K)) u_screen (
    .clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank,
    .ctrl, .speed_sel, .amp_in, .amp_addr,
    .pixel_out(pixel), .hsync_out(hs_out), .vsync_out(vs_out), .blank_out(blank_out),
    .song_idx, .show_pause, .song_ended, .time_digits, .bar_fill);

  assign vga_r  = blank_out ? 4'h0 : pixel[11:8];
  assign vga_g  = blank_out ? 4'h0 : pixel[7:4];
  assign vga_b  = blank_out ? 4'h0 : pixel[3:0];
  assign vga_hs = ~hs_out;
  assign vga_vs = ~vs_out;

endmodule
