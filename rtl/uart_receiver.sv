// uart_receiver: UART receiver recovering the control byte sent by
// serial_tx (8N1, LSB first, DIVISOR clocks per bit).
//
// FSM IDLE -> START -> DATA -> STOP, as in the document. A low level in IDLE
// starts the search; START checks that the line is still low half a bit
// later (the middle of the start bit), DATA then samples each of the eight
// bits one bit time apart, in the middle of the bit, and STOP samples the
// stop bit. A valid stop bit (high) presents the byte on byte_out and raises
// byte_available for exactly one clock; a low stop bit drops the byte. The
// two-flop input synchroniser and the stop-bit check are this design's.
// Timing: byte_available rises about 9.5 bit times after the start edge.
module uart_receiver #(
  parameter int DIVISOR = 651
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_in,
  output logic [7:0] byte_out,
  output logic       byte_available
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t                       state;
  logic [1:0]                   rx_sync;
  logic                         rx;
  logic [$clog2(DIVISOR+1)-1:0] count;
  logic [2:0]                   bit_idx;
  logic [7:0]                   shreg;

  assign rx = rx_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_sync        <= 2'b11;
      state          <= IDLE;
      count          <= '0;
      bit_idx        <= '0;
      shreg          <= '0;
      byte_out       <= '0;
      byte_available <= 1'b0;
    end else begin
      rx_sync        <= {rx_sync[0], rx_in};
      byte_available <= 1'b0;
      unique case (state)
        IDLE: begin
          count <= '0;
          if (!rx) state <= START;
        end
        START: begin
          if (rx) state <= IDLE;            // glitch, not a start bit
          else if (count == ($bits(count))'(DIVISOR / 2 - 1)) begin
            count   <= '0;
            bit_idx <= '0;
            state   <= DATA;
          end else count <= count + 1'b1;
        end
        DATA: begin
          if (count == ($bits(count))'(DIVISOR - 1)) begin
            count          <= '0;
            shreg[bit_idx] <= rx;
            bit_idx        <= bit_idx + 3'd1;
            if (bit_idx == 3'd7) state <= STOP;
          end else count <= count + 1'b1;
        end
        default: begin // STOP
          if (count == ($bits(count))'(DIVISOR - 1)) begin
            count <= '0;
            state <= IDLE;
            if (rx) begin
              byte_out       <= shreg;
              byte_available <= 1'b1;
            end
          end else count <= count + 1'b1;
        end
      endcase
    end
  end

endmodule
