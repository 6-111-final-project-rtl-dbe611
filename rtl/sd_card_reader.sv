// sd_card_reader: streams a song from the SD card through a FIFO to the
// speaker path at the playback sample rate.
//
// Reading. The SD card controller reads 512-byte blocks. A block read (rd)
// is requested whenever the controller is ready and the 1024-byte FIFO has
// room for a whole block (at least 512 free places), which is the document's
// condition. Each byte the controller presents (rising edge of its
// byte_available) is written into the FIFO and also passed on to the
// Fourier-transform path (byte_available_out, music_byte). After every 512
// bytes the address moves to the next block, as long as that block still
// lies before next_addr, the start of the next song.
//
// Playing. A PLAY/PAUSE FSM (reset and skip enter PAUSE): while playing,
// each sample_tick pops one byte from the FIFO and presents it on
// sample_out, where it stays until the next one.
//
// Skipping. skip flushes the FIFO, loads start_addr and pauses, as in the
// document. This design's additions: bytes still arriving from a block that
// was in flight when skip came are dropped rather than written to the new
// song's FIFO, and reading stops at the end of a song instead of repeating
// its last block.
module sd_card_reader #(
  parameter int FIFO_DEPTH  = 1024,
  parameter int BLOCK_BYTES = 512
) (
  input  logic        clk,
  input  logic        rst,
  // commands (one-clock pulses)
  input  logic        play,
  input  logic        pause,
  input  logic        skip,
  input  logic [31:0] start_addr,
  input  logic [31:0] next_addr,
  input  logic        sample_tick,
  // SD card controller
  input  logic        sd_ready,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  output logic        sd_rd,
  output logic [31:0] sd_addr,
  // outputs
  output logic [7:0]  sample_out,
  output logic        sample_valid,      // one clock per new sample_out
  output logic        byte_available_out,
  output logic [7:0]  music_byte,
  output logic        playing,
  output logic        song_done,         // last block of the song was read
  output logic [$clog2(FIFO_DEPTH):0] fifo_count
);

  localparam int BW = $clog2(BLOCK_BYTES);

  typedef enum logic {PAUSED, PLAY} play_state_t;

  play_state_t   state;
  logic          byte_q, byte_edge;
  logic          in_block, discard;
  logic [BW-1:0] byte_cnt;
  logic          fifo_wr, fifo_rd, fifo_full, fifo_empty;
  logic [7:0]    fifo_dout;

  assign byte_edge = sd_byte_available & ~byte_q;
  assign fifo_rd   = (state == PLAY) && sample_tick && !fifo_empty && !skip;
  assign fifo_wr   = byte_edge && !discard && !skip;
  assign sd_rd     = sd_ready && !in_block && !song_done && !skip &&
                     (fifo_count <= ($bits(fifo_count))'(FIFO_DEPTH - BLOCK_BYTES));
  assign playing   = (state == PLAY);

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .clear(skip),
    .wr_en(fifo_wr), .din(sd_dout),
    .rd_en(fifo_rd), .dout(fifo_dout),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count));

  // block bookkeeping and address
  always_ff @(posedge clk) begin
    if (rst) begin
      byte_q    <= 1'b0;
      in_block  <= 1'b0;
      discard   <= 1'b0;
      byte_cnt  <= '0;
      sd_addr   <= start_addr;
      song_done <= 1'b0;
    end else begin
      byte_q <= sd_byte_available;
      if (sd_rd) in_block <= 1'b1;
      if (byte_edge) begin
        byte_cnt <= byte_cnt + 1'b1;
        if (byte_cnt == BW'(BLOCK_BYTES - 1)) begin
          in_block <= 1'b0;
          discard  <= 1'b0;
          if (!discard) begin
            if (sd_addr + 32'(BLOCK_BYTES) < next_addr) sd_addr <= sd_addr + 32'(BLOCK_BYTES);
            else                                       song_done <= 1'b1;
          end
        end
      end
      if (skip) begin
        sd_addr   <= start_addr;
        song_done <= 1'b0;
        // a block already requested keeps arriving: drop its bytes
        if (in_block || sd_rd) discard <= 1'b1;
      end
    end
  end

  // play / pause and sample output
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= PAUSED;
      sample_out   <= 8'd0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= fifo_rd;
      if (fifo_rd) sample_out <= fifo_dout;
      if (skip) state <= PAUSED;
      else unique case (state)
        PLAY:    if (pause) state <= PAUSED;
        default: if (play)  state <= PLAY;
      endcase
    end
  end

  // the music bytes also feed the Fourier-transform path
  always_ff @(posedge clk) begin
    if (rst) begin
      byte_available_out <= 1'b0;
      music_byte         <= '0;
    end else begin
      byte_available_out <= fifo_wr;
      if (fifo_wr) music_byte <= sd_dout;
    end
  end

  a_room_for_block: assert property (@(posedge clk) disable iff (rst) fifo_wr |-> !fifo_full);

endmodule
