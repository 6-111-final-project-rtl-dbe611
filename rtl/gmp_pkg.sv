// gmp_pkg: types and constants shared by the gesture controlled music player.
//
// The transmitter board packs one recognised gesture into a control byte and
// sends it over a UART link (carried by a pair of Bluetooth serial modules).
// The byte layout, from MSB to LSB, is {2'b00, play, pause, next song,
// previous song, volume up, volume down}; it follows the transmitter's own
// packing of the controls. The receiver turns each byte into one-cycle pulses
// (ctrl_pulses_t). Playback speed is a 2-bit code; its encoding (00 = 1.0x,
// 01 = 2.0x, 10 = 0.5x) follows the sample-period table of the design.
// When a module that imports this package is linked on its own, lint reports
// the constants that module does not use (UART_DIVISOR, for example).
package gmp_pkg;

  // One received gesture command, as it travels on the serial link.
  typedef struct packed {
    logic [1:0] unused;
    logic       play;
    logic       pause;
    logic       next_song;
    logic       prev_song;
    logic       vol_up;
    logic       vol_down;
  } ctrl_byte_t;

  // One-cycle control pulses inside the receiver.
  typedef struct packed {
    logic play;
    logic pause;
    logic skip_fwd;
    logic skip_back;
    logic vol_up;
    logic vol_down;
  } ctrl_pulses_t;

  // Playback speed code.
  typedef enum logic [1:0] {
    SPEED_1X   = 2'b00,
    SPEED_2X   = 2'b01,
    SPEED_HALF = 2'b10
  } speed_t;

  // Volume steps of the five-level volume control (0 = mute, 4 = full).
  typedef enum logic [2:0] {
    VOL_ZERO    = 3'd0,
    VOL_QUARTER = 3'd1,
    VOL_HALF    = 3'd2,
    VOL_3QUART  = 3'd3,
    VOL_FULL    = 3'd4
  } volume_t;

  // 12-bit VGA colour, {red[3:0], green[3:0], blue[3:0]}.
  typedef logic [11:0] pixel_t;

  localparam int unsigned SYS_CLK_HZ   = 25_000_000; // display/audio/UART clock
  localparam int unsigned UART_BAUD    = 38_400;     // Bluetooth module baud rate
  localparam int unsigned UART_DIVISOR = (SYS_CLK_HZ + UART_BAUD / 2) / UART_BAUD; // 651

endpackage
