// music_player_display: composes the music player screen, pixel by pixel.
//
// Layers and their places on the 640x480 screen (positions are the
// document's unless noted):
//  * spectrum bars in the top part (fft_bars, reading the magnitude memory);
//  * play/pause button at (20,300), 48x48 (play_pause_button FSM);
//  * elapsed time m:ss with 16x16 digits at x = 87, 110, 126, y = 335 and
//    the colon dots at (105,339) and (105,345) (time_elapsed);
//  * progress bar at (64,360), 512x5, white up to the filled length and grey
//    after it (music_bar);
//  * speed digits at (555,450) and (575,450) with the point at (572,462)
//    (speed_display);
//  * volume digits at x = 540, 556, 572, y = 405 (volume_display; the
//    document leaves this place open, these x positions are this design's).
// The digits are read from one digit_rom: for the pixel being drawn the
// field that contains it is found and the ROM address is digit*256 +
// row*16 + column. The pictures of the title, gesture instructions and
// labels, and the exact button art, are not reproduced: the play button is
// drawn as a triangle and the pause button as two bars, computed from the
// pixel position. song_select keeps the current song and its length.
// Timing: pixel_out and the delayed sync/blank outputs are two clocks after
// hcount/vcount (one for the ROM and memory reads, one output register).
module music_player_display
  import gmp_pkg::*;
#(
  parameter int unsigned TICKS_PER_SEC = 25_000_000,  // clocks per second
  parameter int unsigned BAR_K         = 48_828       // TICKS_PER_SEC / 512
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [10:0]  hcount,
  input  logic [9:0]   vcount,
  input  logic         hsync,
  input  logic         vsync,
  input  logic         blank,
  input  ctrl_pulses_t ctrl,
  input  logic [1:0]   speed_sel,
  input  logic [31:0]  amp_in,
  output logic [9:0]   amp_addr,
  output pixel_t       pixel_out,
  output logic         hsync_out,
  output logic         vsync_out,
  output logic         blank_out,
  // state, for observation
  output logic [1:0]   song_idx,
  output logic         show_pause,
  output logic         song_ended,
  output logic [11:0]  time_digits,   // {minutes, tens, ones}
  output logic [9:0]   bar_fill
);

  localparam int NF = 8;  // digit fields

  // ---- state machines
  logic       skip;
  logic [8:0] song_len;
  logic [3:0] minutes, sec_tens, sec_ones, spd_int, spd_frac, vol_h, vol_t, vol_o;
  logic [2:0] vol_shown;

  song_select u_song (.clk, .rst, .skip_fwd(ctrl.skip_fwd), .skip_back(ctrl.skip_back),
                      .song_idx, .song_len, .skip_out(skip));

  play_pause_button u_button (.clk, .rst, .play(ctrl.play), .pause(ctrl.pause),
                              .skip(ctrl.skip_fwd | ctrl.skip_back), .show_pause);

  time_elapsed #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_time (.clk, .rst, .play(ctrl.play), .pause(ctrl.pause), .skip,
                       .speed_sel, .song_len, .minutes, .sec_tens, .sec_ones, .ended(song_ended));

  music_bar #(.BAR_LEN(512), .K(BAR_K)) u_bar (.clk, .rst, .play(ctrl.play), .pause(ctrl.pause), .skip,
                   .speed_sel, .song_len, .fill(bar_fill));

  speed_display u_speed (.clk, .rst, .speed_sel, .int_digit(spd_int), .frac_digit(spd_frac));

  volume_display u_volume (.clk, .rst, .vol_up(ctrl.vol_up), .vol_down(ctrl.vol_down),
                           .hundreds(vol_h), .tens(vol_t), .ones(vol_o), .shown(vol_shown));

  assign time_digits = {minutes, sec_tens, sec_ones};

  // ---- digit fields: position, value, visibility
  logic [10:0] fx [NF];
  logic [9:0]  fy [NF];
  logic [3:0]  fv [NF];
  logic        fs [NF];

  always_comb begin
    fx[0] = 11'd87;  fy[0] = 10'd335; fv[0] = minutes;  fs[0] = 1'b1;
    fx[1] = 11'd110; fy[1] = 10'd335; fv[1] = sec_tens; fs[1] = 1'b1;
    fx[2] = 11'd126; fy[2] = 10'd335; fv[2] = sec_ones; fs[2] = 1'b1;
    fx[3] = 11'd555; fy[3] = 10'd450; fv[3] = spd_int;  fs[3] = 1'b1;
    fx[4] = 11'd575; fy[4] = 10'd450; fv[4] = spd_frac; fs[4] = 1'b1;
    fx[5] = 11'd540; fy[5] = 10'd405; fv[5] = vol_h;    fs[5] = vol_shown[2];
    fx[6] = 11'd556; fy[6] = 10'd405; fv[6] = vol_t;    fs[6] = vol_shown[1];
    fx[7] = 11'd572; fy[7] = 10'd405; fv[7] = vol_o;    fs[7] = vol_shown[0];
  end

  logic [11:0] rom_addr;
  logic        digit_hit, rom_pixel;

  always_comb begin
    rom_addr  = '0;
    digit_hit = 1'b0;
    for (int i = 0; i < NF; i++) begin
      if (fs[i] && hcount >= fx[i] && hcount < fx[i] + 11'd16 &&
          vcount >= fy[i] && vcount < fy[i] + 10'd16) begin
        digit_hit = 1'b1;
        rom_addr  = {fv[i], 4'(vcount - fy[i]), 4'(hcount - fx[i])};
      end
    end
  end

  digit_rom u_digits (.clk, .addr(rom_addr), .pixel(rom_pixel));

  // ---- simple shapes, registered to line up with the ROM output
  function automatic logic in_box(input logic [10:0] h, input logic [9:0] v,
                                  input int x, input int y, input int w, input int ht);
    return (32'(h) >= x) && (32'(h) < x + w) && (32'(v) >= y) && (32'(v) < y + ht);
  endfunction

  logic        digit_hit_q, dot_q, bar_q, bar_white_q, button_q;
  logic [10:0] bh;
  logic [9:0]  bv;

  assign bh = hcount - 11'd20;   // button picture coordinates
  assign bv = vcount - 10'd300;

  always_ff @(posedge clk) begin
    digit_hit_q <= digit_hit;
    dot_q       <= in_box(hcount, vcount, 105, 339, 4, 4) ||
                   in_box(hcount, vcount, 105, 345, 4, 4) ||
                   in_box(hcount, vcount, 572, 462, 3, 4);
    bar_q       <= in_box(hcount, vcount, 64, 360, 512, 5);
    bar_white_q <= (hcount < 11'd64 + 11'(bar_fill));
    if (in_box(hcount, vcount, 20, 300, 48, 48)) begin
      if (show_pause)   // two vertical bars
        button_q <= (bv >= 10'd8 && bv < 10'd40) &&
                    ((bh >= 11'd12 && bh < 11'd20) || (bh >= 11'd28 && bh < 11'd36));
      else              // right-pointing triangle
        button_q <= (bh >= 11'd12) && (bv >= 10'd4) && (bv < 10'd44) &&
                    ((bh - 11'd12) < 11'((bv < 10'd24) ? bv - 10'd4 : 10'd43 - bv));
    end else button_q <= 1'b0;
  end

  // ---- FT bars
  pixel_t fft_pixel;
  logic   fft_area;

  fft_bars u_fft_bars (.clk, .hcount, .vcount, .addr(amp_addr), .amp_in,
                       .pixel(fft_pixel), .in_area(fft_area));

  // ---- compose and output
  logic [1:0] hs_d, vs_d, bl_d;
  pixel_t     layer;

  always_comb begin
    layer = 12'h000;
    if (fft_area)                      layer = fft_pixel;
    else begin
      if (digit_hit_q && rom_pixel)    layer |= 12'hFFF;
      if (dot_q || button_q)           layer |= 12'hFFF;
      if (bar_q)                       layer |= bar_white_q ? 12'hFFF : 12'h888;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d      <= '0;
      vs_d      <= '0;
      bl_d      <= '1;
      pixel_out <= '0;
    end else begin
      hs_d      <= {hs_d[0], hsync};
      vs_d      <= {vs_d[0], vsync};
      bl_d      <= {bl_d[0], blank};
      pixel_out <= bl_d[0] ? 12'h000 : layer;
    end
  end

  assign hsync_out = hs_d[1];
  assign vsync_out = vs_d[1];
  assign blank_out = bl_d[1];

endmodule
