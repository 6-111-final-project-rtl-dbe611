// music_bar: progress bar of the current song, BAR_LEN (512) pixels long.
//
// The document's division-free method: K = clock rate / BAR_LEN clocks
// (48,828 at 25 MHz for 512 pixels) is the time to fill one pixel of a one
// second song, so for a song of L seconds one more pixel is filled every
// K * L clocks, and the whole bar is filled after L seconds. No divider is
// needed. FSM RESET -> PAUSE <-> PLAY -> END_SONG as in the document; the
// bar fills only while playing, stops when full, and a skip empties it. A
// song length of 0 is treated as one second.
// The bar follows song time: speed_sel (same code as the audio side) makes
// each clock count 2 at 2.0x, 1 at 1.0x and 1 on every other clock at 0.5x.
// The document's display diagram routes the playback speed into this
// block; how it is used is this design's choice.
// Output: fill = number of filled (white) pixels, 0..BAR_LEN, registered.
module music_bar #(
  parameter int unsigned BAR_LEN = 512,
  parameter int unsigned K       = 48_828
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       play,
  input  logic                       pause,
  input  logic                       skip,
  input  logic [1:0]                 speed_sel,  // 00 1.0x, 01 2.0x, 10 0.5x
  input  logic [8:0]                 song_len,
  output logic [$clog2(BAR_LEN):0]   fill
);

  typedef enum logic [1:0] {RESET, PAUSE, PLAY, END_SONG} state_t;

  localparam int FW = $clog2(BAR_LEN) + 1;

  state_t      state;
  logic [31:0] k_song, k_cnt;

  logic [1:0]  step;
  logic        half_phase, pixel_done;

  assign k_song = (song_len == '0) ? K : K * song_len;

  always_comb begin
    unique case (speed_sel)
      2'b01:   step = 2'd2;
      2'b10:   step = {1'b0, half_phase};
      default: step = 2'd1;
    endcase
  end

  assign pixel_done = (k_cnt + 32'(step) >= k_song);

  always_ff @(posedge clk) begin
    if (rst) half_phase <= 1'b0;
    else     half_phase <= ~half_phase;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= RESET;
      k_cnt <= '0;
      fill  <= '0;
    end else begin
      unique case (state)
        RESET: begin
          k_cnt <= '0;
          fill  <= '0;
          state <= PAUSE;
        end
        PAUSE: begin
          if (skip)      state <= RESET;
          else if (play) state <= PLAY;
        end
        PLAY: begin
          if (pixel_done) begin
            k_cnt <= k_cnt + 32'(step) - k_song;
            fill  <= fill + 1'b1;
          end else k_cnt <= k_cnt + 32'(step);
          if (skip)                             state <= RESET;
          else if (fill == FW'(BAR_LEN - 1) && pixel_done) state <= END_SONG;
          else if (pause)                       state <= PAUSE;
        end
        default: if (skip) state <= RESET;    // END_SONG: bar full
      endcase
    end
  end

endmodule
