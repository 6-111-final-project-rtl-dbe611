// gesture_music_player: a music player controlled by tilting the wrist.
//
// Two boards make up the system and both are in this top:
//  * Transmitter (gesture) side, on clk_25: accel_conditioner filters the
//    accelerometer samples, gestures recognises a tilt and packs it into a
//    control byte, serial_tx sends the byte on bt_tx (38400 baud).
//  * Receiver (player) side: uart_receiver takes the byte from bt_rx,
//    command_decoder makes one-cycle control pulses, audio plays the song
//    from the SD card through a FIFO to the PWM speaker output, ft_engine
//    (on clk_100) computes the spectrum of the music bytes, and display
//    draws the screen on VGA.
// Outside this top (their signals are ports): the accelerometer's SPI
// controller (accel_* inputs), the Bluetooth modules that carry bt_tx to
// bt_rx, the SD card controller (sd_* ports), the clock generator (clk_25,
// clk_100) and the speed switches (speed_sel). The gesture byte carries no
// speed, so speed_sel is a separate input, as on the document's board.
// Resets are synchronous and active high, one per board.
// Status outputs of the subsystems (playing, volume, current song, elapsed
// time, transform frame done, serial busy) drive no pin and are left open
// here, which lint reports as empty pin connections; tests reach them
// inside the instances.
module gesture_music_player
  import gmp_pkg::*;
#(
  parameter int UART_DIV    = UART_DIVISOR,
  parameter int FIFO_DEPTH  = 1024,
  parameter int BLOCK_BYTES = 512,
  parameter int BASE_PERIOD = 520,
  parameter int FT_POINTS   = 1024,
  parameter int unsigned TICKS_PER_SEC = SYS_CLK_HZ,  // clocks per second of song time
  parameter int unsigned BAR_K         = SYS_CLK_HZ / 512
) (
  input  logic        clk_25,
  input  logic        clk_100,
  input  logic        tx_rst,
  input  logic        rx_rst,
  // accelerometer controller
  input  logic        accel_data_ready,
  input  logic [11:0] accel_x,
  input  logic [11:0] accel_y,
  input  logic [11:0] accel_z,
  output logic [2:0]  gesture_light,
  // serial link through the Bluetooth modules
  output logic        bt_tx,
  input  logic        bt_rx,
  // user speed switches
  input  logic [1:0]  speed_sel,
  // SD card controller
  input  logic        sd_ready,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  output logic        sd_rd,
  output logic [31:0] sd_addr,
  // speaker
  output logic        aud_pwm,
  output logic        aud_sd,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs
);

  // ---------------- transmitter board
  logic [11:0] x_mag, y_mag, z_mag;
  logic        x_sign, y_sign, z_sign, done;
  ctrl_byte_t  gesture_byte;

  accel_conditioner u_accel (
    .clk(clk_25), .rst(tx_rst), .data_ready(accel_data_ready),
    .accel_x, .accel_y, .accel_z,
    .x_mag_filtered(x_mag), .y_mag_filtered(y_mag), .z_mag_filtered(z_mag),
    .x_sign, .y_sign, .z_sign);

  gestures u_gestures (
    .clk(clk_25), .rst(tx_rst),
    .x_mag_filtered(x_mag), .y_mag_filtered(y_mag), .z_mag_filtered(z_mag),
    .x_sign, .y_sign, .z_sign,
    .val_out(gesture_byte), .done, .axis_light(gesture_light));

  serial_tx #(.DIVISOR(UART_DIV)) u_tx (
    .clk(clk_25), .rst(tx_rst), .trigger_in(done), .val_in(gesture_byte),
    .data_out(bt_tx), .busy());

  // ---------------- receiver board
  logic [7:0]   rx_byte;
  logic         rx_valid;
  ctrl_pulses_t ctrl;

  uart_receiver #(.DIVISOR(UART_DIV)) u_rx (
    .clk(clk_25), .rst(rx_rst), .rx_in(bt_rx), .byte_out(rx_byte), .byte_available(rx_valid));

  command_decoder u_decode (
    .clk(clk_25), .rst(rx_rst), .byte_available(rx_valid), .byte_in(rx_byte), .ctrl);

  logic        music_valid;
  logic [7:0]  music_byte;

  audio #(.FIFO_DEPTH(FIFO_DEPTH), .BLOCK_BYTES(BLOCK_BYTES), .BASE_PERIOD(BASE_PERIOD)) u_audio (
    .clk(clk_25), .rst(rx_rst), .ctrl, .speed_sel,
    .sd_ready, .sd_dout, .sd_byte_available, .sd_rd, .sd_addr,
    .aud_pwm, .aud_sd,
    .byte_available_out(music_valid), .music_byte, .level(), .volume(), .speed(),
    .song_idx(), .playing(), .sample_tick());

  logic [9:0]  amp_addr;
  logic [31:0] amp;

  ft_engine #(.N(FT_POINTS)) u_ft (
    .clk_25, .rst_25(rx_rst), .clk_100,
    .byte_available(music_valid), .music_byte,
    .addr($clog2(FT_POINTS)'(amp_addr)), .amp_out(amp), .frame_done());

  display #(.TICKS_PER_SEC(TICKS_PER_SEC), .BAR_K(BAR_K)) u_display (
    .clk(clk_25), .rst(rx_rst), .ctrl, .speed_sel, .amp_in(amp), .amp_addr,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs,
    .hcount(), .vcount(), .song_idx(), .show_pause(), .song_ended(), .time_digits(), .bar_fill());

endmodule
