// command_decoder: turns each received control byte into one-cycle control
// pulses for the audio and display subsystems.
//
// When byte_available is high the bits of the byte (gmp_pkg::ctrl_byte_t)
// are copied to the pulse outputs; in every other cycle all pulses are low,
// so each received gesture produces exactly one pulse, one clock long. The
// bit mapping is the document's; registering the pulses (one clock of
// latency) is this design's choice.
// Bits 7:6 of the byte are always zero in the document's packing and are
// ignored; lint reports them as unused.
module command_decoder
  import gmp_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         byte_available,
  input  logic [7:0]   byte_in,
  output ctrl_pulses_t ctrl
);

  ctrl_byte_t cmd;
  assign cmd = ctrl_byte_t'(byte_in);

  always_ff @(posedge clk) begin
    if (rst || !byte_available) ctrl <= '0;
    else begin
      ctrl.play      <= cmd.play;
      ctrl.pause     <= cmd.pause;
      ctrl.skip_fwd  <= cmd.next_song;
      ctrl.skip_back <= cmd.prev_song;
      ctrl.vol_up    <= cmd.vol_up;
      ctrl.vol_down  <= cmd.vol_down;
    end
  end

endmodule
