// volume_display: FSM giving the digits of the volume shown on screen.
//
// Five states, 100%, 75%, 50%, 25% and 0%, stepped by the same volume up and
// down commands as the audio volume control (saturating, reset = 100%), so
// the two stay in step. The document lists these five percentages (while
// calling them four states); this design follows the list. Outputs are the
// three digits and which of them are shown (leading zeros are blank); the
// "%" sign is a fixed picture. Registered.
module volume_display
  import gmp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       vol_up,
  input  logic       vol_down,
  output logic [3:0] hundreds,
  output logic [3:0] tens,
  output logic [3:0] ones,
  output logic [2:0] shown       // {hundreds, tens, ones} visible
);

  volume_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= VOL_FULL;
    else if (vol_up && state != VOL_FULL)        state <= volume_t'(state + 3'd1);
    else if (vol_down && state != VOL_ZERO)      state <= volume_t'(state - 3'd1);
  end

  always_comb begin
    unique case (state)
      VOL_FULL:    begin hundreds = 4'd1; tens = 4'd0; ones = 4'd0; shown = 3'b111; end
      VOL_3QUART:  begin hundreds = 4'd0; tens = 4'd7; ones = 4'd5; shown = 3'b011; end
      VOL_HALF:    begin hundreds = 4'd0; tens = 4'd5; ones = 4'd0; shown = 3'b011; end
      VOL_QUARTER: begin hundreds = 4'd0; tens = 4'd2; ones = 4'd5; shown = 3'b011; end
      default:     begin hundreds = 4'd0; tens = 4'd0; ones = 4'd0; shown = 3'b001; end
    endcase
  end

endmodule
