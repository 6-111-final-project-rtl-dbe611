// volume_control: five-step volume FSM that attenuates the 8-bit unsigned
// music samples by logical right shifts.
//
// States FULL, 3/4, 1/2, 1/4 and ZERO, stepped up by vol_up and down by
// vol_down pulses, saturating at both ends; reset selects FULL. The shift per
// state (0, 1, 3, 5 and 7 bits) is the document's; the shift is unsigned,
// as the document stresses, because the samples are unsigned. The state
// names are the document's and are nominal: a one-bit shift halves the
// amplitude.
// Interface: signal_out is registered, one clock after signal_in; volume is
// the current step (gmp_pkg::volume_t, 0..4).
module volume_control
  import gmp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       vol_up,
  input  logic       vol_down,
  input  logic [7:0] signal_in,
  output logic [7:0] signal_out,
  output volume_t    volume
);

  logic [2:0] shift;

  always_comb begin
    unique case (volume)
      VOL_FULL:    shift = 3'd0;
      VOL_3QUART:  shift = 3'd1;
      VOL_HALF:    shift = 3'd3;
      VOL_QUARTER: shift = 3'd5;
      default:     shift = 3'd7;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      volume     <= VOL_FULL;
      signal_out <= '0;
    end else begin
      signal_out <= signal_in >> shift;
      if (vol_up && volume != VOL_FULL)         volume <= volume_t'(volume + 3'd1);
      else if (vol_down && volume != VOL_ZERO)  volume <= volume_t'(volume - 3'd1);
    end
  end

endmodule
