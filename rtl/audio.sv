// audio: the music player's audio subsystem.
//
// Wires together the blocks of the document's audio diagram: the playlist
// controller (song addresses, skip), the playback speed (sample tick), the
// SD card reader with its 1024-byte FIFO, the volume control and the PWM
// speaker output. The SD card controller itself sits outside; its read
// interface (rd, address, ready, dout, byte_available) is this module's SD
// port. The music bytes read from the card are also brought out for the
// Fourier-transform display path.
// Timing: everything runs on the 25 MHz system clock; a sample popped from
// the FIFO reaches the PWM comparator two clocks later.
// Lint notes: the reader's sample_valid, song_done and fifo_count outputs
// are not used inside this module (the player stops at the end of a song
// and waits for a command); they remain as named internal signals so that
// a test can watch the sample rate and the FIFO level, and lint reports
// them as unused.
module audio
  import gmp_pkg::*;
#(
  parameter int FIFO_DEPTH  = 1024,
  parameter int BLOCK_BYTES = 512,
  parameter int BASE_PERIOD = 520
) (
  input  logic         clk,
  input  logic         rst,
  input  ctrl_pulses_t ctrl,
  input  logic [1:0]   speed_sel,
  // SD card controller
  input  logic         sd_ready,
  input  logic [7:0]   sd_dout,
  input  logic         sd_byte_available,
  output logic         sd_rd,
  output logic [31:0]  sd_addr,
  // speaker
  output logic         aud_pwm,
  output logic         aud_sd,
  // to the Fourier-transform path and for observation
  output logic         byte_available_out,
  output logic [7:0]   music_byte,
  output logic [7:0]   level,
  output volume_t      volume,
  output speed_t       speed,
  output logic [1:0]   song_idx,
  output logic         playing,
  output logic         sample_tick
);

  logic        skip, sample_valid, song_done;
  logic [31:0] start_addr, next_addr;
  logic [7:0]  sample;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  playlist_controller u_playlist (
    .clk, .rst, .skip_fwd(ctrl.skip_fwd), .skip_back(ctrl.skip_back),
    .skip_out(skip), .song_idx, .start_addr, .next_addr);

  playback_speed #(.BASE_PERIOD(BASE_PERIOD)) u_speed (
    .clk, .rst, .speed_sel, .speed, .sample_tick);

  sd_card_reader #(.FIFO_DEPTH(FIFO_DEPTH), .BLOCK_BYTES(BLOCK_BYTES)) u_reader (
    .clk, .rst, .play(ctrl.play), .pause(ctrl.pause), .skip,
    .start_addr, .next_addr, .sample_tick,
    .sd_ready, .sd_dout, .sd_byte_available, .sd_rd, .sd_addr,
    .sample_out(sample), .sample_valid, .byte_available_out, .music_byte,
    .playing, .song_done, .fifo_count);

  volume_control u_volume (
    .clk, .rst, .vol_up(ctrl.vol_up), .vol_down(ctrl.vol_down),
    .signal_in(sample), .signal_out(level), .volume);

  pwm u_pwm (.clk, .rst, .level_in(level), .pwm_out(aud_pwm));

  assign aud_sd = 1'b1;   // keep the board's audio amplifier enabled

endmodule
