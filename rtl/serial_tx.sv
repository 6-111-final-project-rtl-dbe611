// serial_tx: UART transmitter for the control byte (8 data bits, no parity,
// one stop bit, LSB first), idle line high.
//
// A trigger_in pulse while idle loads the byte and starts the frame: start
// bit (0), eight data bits, stop bit (1), each held DIVISOR clocks. DIVISOR
// is the document's 651, i.e. 25 MHz / 38400 baud. A trigger while busy is
// ignored (the gesture FSM cannot produce bytes that fast). The frame format
// and divisor follow the document; the busy flag is this design's.
// Timing: data_out goes low the clock after the trigger; the frame lasts
// 10 * DIVISOR clocks, after which busy falls.
module serial_tx #(
  parameter int DIVISOR = 651
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       trigger_in,
  input  logic [7:0] val_in,
  output logic       data_out,
  output logic       busy
);

  logic [8:0]                   shreg;    // data bits then the stop bit
  logic [3:0]                   bit_num;  // 0 = start bit ... 9 = stop bit
  logic [$clog2(DIVISOR+1)-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= 1'b1;
      busy     <= 1'b0;
      shreg    <= '1;
      bit_num  <= '0;
      count    <= '0;
    end else if (!busy) begin
      if (trigger_in) begin
        shreg    <= {1'b1, val_in};
        data_out <= 1'b0;            // start bit
        busy     <= 1'b1;
        bit_num  <= '0;
        count    <= '0;
      end
    end else if (count == ($bits(count))'(DIVISOR - 1)) begin
      count <= '0;
      if (bit_num == 4'd9) begin
        busy <= 1'b0;                // stop bit finished, line stays high
      end else begin
        data_out <= shreg[0];
        shreg    <= {1'b1, shreg[8:1]};
        bit_num  <= bit_num + 4'd1;
      end
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
