// time_elapsed: m:ss counter of how long the current song has played.
//
// FSM RESET -> PAUSE <-> PLAY -> END_SONG, as in the document. While
// playing, a cycle counter counts TICKS_PER_SEC clocks (25,000,000 at
// 25 MHz, one second); the seconds ones digit then advances 0..9, the tens
// digit advances when the ones digit wraps (0..5), and the minutes digit
// when the tens digit wraps (0..9; every song is shorter than ten minutes).
// When the elapsed seconds reach the song length the counter stops in
// END_SONG. A skip returns to RESET (all zero) and then PAUSE.
// The counter measures song time, not wall time: the playback speed
// switches (speed_sel, same code as the audio side) make each clock count 2
// at 2.0x, 1 at 1.0x and 1 on every other clock at 0.5x. The document's
// display diagram routes the playback speed into this block; how it is used
// is this design's choice.
// Outputs are registered digits.
module time_elapsed #(
  parameter int unsigned TICKS_PER_SEC = 25_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       play,
  input  logic       pause,
  input  logic       skip,
  input  logic [1:0] speed_sel,   // 00 1.0x, 01 2.0x, 10 0.5x
  input  logic [8:0] song_len,    // seconds
  output logic [3:0] minutes,
  output logic [3:0] sec_tens,
  output logic [3:0] sec_ones,
  output logic       ended
);

  typedef enum logic [1:0] {RESET, PAUSE, PLAY, END_SONG} state_t;

  state_t      state;
  logic [31:0] tick_cnt;
  logic [8:0]  elapsed;
  logic        second;

  logic [1:0]  step;
  logic        half_phase;

  always_comb begin
    unique case (speed_sel)
      2'b01:   step = 2'd2;
      2'b10:   step = {1'b0, half_phase};
      default: step = 2'd1;
    endcase
  end

  assign second = (tick_cnt + 32'(step) >= TICKS_PER_SEC);
  assign ended  = (state == END_SONG);

  always_ff @(posedge clk) begin
    if (rst) half_phase <= 1'b0;
    else     half_phase <= ~half_phase;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= RESET;
      tick_cnt <= '0;
      elapsed  <= '0;
      minutes  <= '0;
      sec_tens <= '0;
      sec_ones <= '0;
    end else begin
      unique case (state)
        RESET: begin
          tick_cnt <= '0;
          elapsed  <= '0;
          minutes  <= '0;
          sec_tens <= '0;
          sec_ones <= '0;
          state    <= PAUSE;
        end
        PAUSE: begin
          if (skip)      state <= RESET;
          else if (play) state <= PLAY;
        end
        PLAY: begin
          tick_cnt <= second ? tick_cnt + 32'(step) - TICKS_PER_SEC : tick_cnt + 32'(step);
          if (second) begin
            elapsed <= elapsed + 9'd1;
            if (sec_ones == 4'd9) begin
              sec_ones <= '0;
              if (sec_tens == 4'd5) begin
                sec_tens <= '0;
                minutes  <= (minutes == 4'd9) ? 4'd0 : minutes + 4'd1;
              end else sec_tens <= sec_tens + 4'd1;
            end else sec_ones <= sec_ones + 4'd1;
          end
          if (skip)                      state <= RESET;
          else if (elapsed >= song_len)  state <= END_SONG;
          else if (pause)                state <= PAUSE;
        end
        default: if (skip) state <= RESET;   // END_SONG
      endcase
    end
  end

endmodule
