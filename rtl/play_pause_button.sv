// play_pause_button: FSM choosing which button picture the screen shows.
//
// Two states, as in the document: after reset the play button is shown;
// a play command switches to showing the pause button, and a pause command
// switches back. A song change also shows the play button again, because
// the player pauses on a skip. show_pause is registered.
module play_pause_button (
  input  logic clk,
  input  logic rst,
  input  logic play,
  input  logic pause,
  input  logic skip,
  output logic show_pause
);

  typedef enum logic {SHOW_PLAY, SHOW_PAUSE} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= SHOW_PLAY;
    else unique case (state)
      SHOW_PLAY:  if (play && !skip)   state <= SHOW_PAUSE;
      default:    if (pause || skip)   state <= SHOW_PLAY;
    endcase
  end

  assign show_pause = (state == SHOW_PAUSE);

endmodule
