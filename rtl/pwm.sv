// pwm: 8-bit pulse-width modulator driving the speaker.
//
// A free-running 8-bit counter is compared with the sample level: the output
// is high while the counter is below the level, so the duty cycle is
// level/256 and the period is 256 clocks (about 98 kHz at 25 MHz). This is
// the document's scheme.
module pwm (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] level_in,
  output logic       pwm_out
);

  logic [7:0] count;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 8'd1;
  end

  assign pwm_out = (count < level_in);

endmodule
