// playlist_controller: keeps track of the song being played and of where it
// lies on the SD card.
//
// One state per song holds the song's start address and the start address
// of the song after it (which marks the end of the current one). A skip
// forward moves to the next song's state, a skip backward to the previous
// one; at the ends of the list the current song is kept (and restarted).
// As in the document, the change passes through a transition state that
// waits until both skip inputs are low, then loads the new addresses and
// raises skip_out for one clock so the SD card reader flushes its FIFO and
// restarts at start_addr. The song addresses are the document's.
// Interface: skip inputs are pulses or levels; song_idx, start_addr and
// next_addr are registered and change in the same clock that skip_out is
// high.
module playlist_controller #(
  parameter int          NUM_SONGS = 3,
  // start address of each song, then the end of the last song
  parameter logic [31:0] SONG_ADDR [NUM_SONGS+1] =
    '{32'h0000_0200, 32'h00BB_8200, 32'h011F_EC00, 32'h01F6_8200}
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         skip_fwd,
  input  logic                         skip_back,
  output logic                         skip_out,
  output logic [$clog2(NUM_SONGS)-1:0] song_idx,
  output logic [31:0]                  start_addr,
  output logic [31:0]                  next_addr
);

  localparam int IW = $clog2(NUM_SONGS);
  typedef enum logic {PLAYING_SONG, TRANSITION} state_t;

  state_t        state;
  logic [IW-1:0] target;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= PLAYING_SONG;
      song_idx   <= '0;
      target     <= '0;
      start_addr <= SONG_ADDR[0];
      next_addr  <= SONG_ADDR[1];
      skip_out   <= 1'b0;
    end else begin
      skip_out <= 1'b0;
      unique case (state)
        PLAYING_SONG: begin
          if (skip_back) begin
            target <= (song_idx == '0) ? song_idx : song_idx - 1'b1;
            state  <= TRANSITION;
          end else if (skip_fwd) begin
            target <= (song_idx == IW'(NUM_SONGS - 1)) ? song_idx : song_idx + 1'b1;
            state  <= TRANSITION;
          end
        end
        default: begin // TRANSITION: wait for the skip request to end
          if (!skip_fwd && !skip_back) begin
            song_idx   <= target;
            start_addr <= SONG_ADDR[target];
            next_addr  <= SONG_ADDR[32'(target) + 1];
            skip_out   <= 1'b1;
            state      <= PLAYING_SONG;
          end
        end
      endcase
    end
  end

endmodule
