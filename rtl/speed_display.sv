// speed_display: FSM giving the digits of the speed shown on screen.
//
// Three states, as in the document: 1.0x (normal), 2.0x (double) and 0.5x
// (half), following the playback speed code (gmp_pkg::speed_t; the unused
// code shows 1.0x, as it plays at normal speed). Outputs are the digit
// before and the digit after the decimal point; the point and the "x" are
// fixed parts of the picture. Registered: one clock after speed_sel.
module speed_display
  import gmp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] speed_sel,
  output logic [3:0] int_digit,
  output logic [3:0] frac_digit
);

  speed_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= SPEED_1X;
    else unique case (speed_sel)
      2'b01:   state <= SPEED_2X;
      2'b10:   state <= SPEED_HALF;
      default: state <= SPEED_1X;
    endcase
  end

  always_comb begin
    unique case (state)
      SPEED_2X:   begin int_digit = 4'd2; frac_digit = 4'd0; end
      SPEED_HALF: begin int_digit = 4'd0; frac_digit = 4'd5; end
      default:    begin int_digit = 4'd1; frac_digit = 4'd0; end
    endcase
  end

endmodule
