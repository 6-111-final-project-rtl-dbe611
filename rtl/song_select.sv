// song_select: the display's record of the song being played, used for the
// song title and for the song length that drives the time and progress bar.
//
// Same state sequence as the audio playlist controller (one state per song,
// skip forward/backward saturating at the ends of the list, change committed
// when the skip request has ended), so both sides agree on the song. The
// song lengths in seconds, 255, 137 and 292, are the document's. skip_out
// pulses when the committed song changes (also when a skip at the end of the
// list restarts the same song).
module song_select #(
  parameter int         NUM_SONGS = 3,
  parameter logic [8:0] SONG_LEN [NUM_SONGS] = '{9'd255, 9'd137, 9'd292}
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         skip_fwd,
  input  logic                         skip_back,
  output logic [$clog2(NUM_SONGS)-1:0] song_idx,
  output logic [8:0]                   song_len,
  output logic                         skip_out
);

  localparam int IW = $clog2(NUM_SONGS);
  typedef enum logic {SHOW_SONG, TRANSITION} state_t;

  state_t        state;
  logic [IW-1:0] target;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= SHOW_SONG;
      song_idx <= '0;
      target   <= '0;
      skip_out <= 1'b0;
    end else begin
      skip_out <= 1'b0;
      unique case (state)
        SHOW_SONG: begin
          if (skip_back) begin
            target <= (song_idx == '0) ? song_idx : song_idx - 1'b1;
            state  <= TRANSITION;
          end else if (skip_fwd) begin
            target <= (song_idx == IW'(NUM_SONGS - 1)) ? song_idx : song_idx + 1'b1;
            state  <= TRANSITION;
          end
        end
        default: if (!skip_fwd && !skip_back) begin
          song_idx <= target;
          skip_out <= 1'b1;
          state    <= SHOW_SONG;
        end
      endcase
    end
  end

  assign song_len = SONG_LEN[song_idx];

endmodule
