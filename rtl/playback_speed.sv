// playback_speed: holds the playback speed and produces the audio sample
// tick.
//
// The speed code (gmp_pkg::speed_t) selects how many clocks pass between two
// samples read from the FIFO: BASE_PERIOD (520 clocks, about 48 kHz at
// 25 MHz) for 1.0x, half of it (about 96 kHz) for 2.0x and twice it (about
// 24 kHz) for 0.5x; the unused code plays at 1.0x. These periods are the
// document's. The speed input is registered into the speed state, and a
// free-running counter raises sample_tick for one clock every period.
// Interface: speed follows speed_sel one clock later; a new period takes
// effect at once (a counter already past it wraps on the next clock).
module playback_speed
  import gmp_pkg::*;
#(
  parameter int BASE_PERIOD = 520
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] speed_sel,
  output speed_t     speed,
  output logic       sample_tick
);

  localparam int CW = $clog2(2 * BASE_PERIOD + 1);

  logic [CW-1:0] period, count;

  always_comb begin
    unique case (speed)
      SPEED_2X:   period = CW'(BASE_PERIOD / 2);
      SPEED_HALF: period = CW'(BASE_PERIOD * 2);
      default:    period = CW'(BASE_PERIOD);
    endcase
  end

  assign sample_tick = (count >= period - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      speed <= SPEED_1X;
      count <= '0;
    end else begin
      unique case (speed_sel)
        2'b01:   speed <= SPEED_2X;
        2'b10:   speed <= SPEED_HALF;
        default: speed <= SPEED_1X;
      endcase
      count <= sample_tick ? '0 : count + 1'b1;
    end
  end

endmodule
