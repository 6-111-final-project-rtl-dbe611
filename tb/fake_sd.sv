// fake_sd: behavioural model of the SD card controller's read interface,
// for simulation only.
//
// While idle, ready is high. rd while ready starts a block read at address:
// ready falls, and after START_DELAY clocks BLOCK bytes are presented on
// dout, one every BYTE_GAP clocks, each with a one-clock byte_available
// pulse. Byte i of a block is (i + address/BLOCK) mod 256, so the bytes
// count up and each block starts one higher than the block before it. After
// the block, CRC_DELAY clocks pass before ready rises again. reads counts
// the blocks started and last_addr is the address of the latest one.
module fake_sd #(
  parameter int BLOCK       = 512,
  parameter int BYTE_GAP    = 4,
  parameter int START_DELAY = 10,
  parameter int CRC_DELAY   = 6
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        rd,
  input  logic [31:0] address,
  output logic        ready,
  output logic [7:0]  dout,
  output logic        byte_available,
  output int          reads,
  output logic [31:0] last_addr
);
  int   state;     // 0 idle, 1 start delay, 2 data, 3 crc
  int   cnt, idx;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= 0; cnt <= 0; idx <= 0; ready <= 1'b0;
      byte_available <= 1'b0; dout <= '0; reads <= 0; last_addr <= '0;
    end else begin
      byte_available <= 1'b0;
      case (state)
        0: begin
          ready <= 1'b1;
          if (rd && ready) begin
            ready <= 1'b0; state <= 1; cnt <= 0; idx <= 0;
            reads <= reads + 1; last_addr <= address;
          end
        end
        1: if (cnt == START_DELAY) begin state <= 2; cnt <= 0; end else cnt <= cnt + 1;
        2: begin
          if (cnt == BYTE_GAP - 1) begin
            cnt            <= 0;
            dout           <= 8'(idx + int'(last_addr / BLOCK));
            byte_available <= 1'b1;
            idx            <= idx + 1;
            if (idx == BLOCK - 1) state <= 3;
          end else cnt <= cnt + 1;
        end
        default: if (cnt == CRC_DELAY) begin state <= 0; cnt <= 0; end else cnt <= cnt + 1;
      endcase
    end
  end
endmodule
