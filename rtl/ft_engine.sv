// ft_engine: Fourier-transform path from the music bytes to the magnitude
// memory read by the display ("FT of Music Data").
//
// Pipeline, following the document's diagram:
//   music bytes -> dft_engine -> square_and_sum -> sync_fifo -> sqrt_unit
//   -> magnitude_bram (write side)
// The transform runs on the 100 MHz clock; the music bytes arrive on the
// 25 MHz clock and the display reads the magnitudes on the 25 MHz clock.
//
// Byte crossing (this design's): on each byte_available pulse the byte is
// held in a 25 MHz register and a toggle flag flips; the flag is
// synchronised into the 100 MHz domain by two flip-flops and each change
// captures the held byte. This is safe because the SD card delivers bytes
// far slower than one per four 100 MHz clocks. The 100 MHz reset is the
// 25 MHz reset passed through a two-flop synchroniser.
// Magnitudes are written at the bin index: the write address restarts at 0
// after the bin flagged last. amp_out is one 25 MHz clock after addr.
module ft_engine #(
  parameter int N          = 1024,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic                 clk_25,
  input  logic                 rst_25,
  input  logic                 clk_100,
  input  logic                 byte_available,
  input  logic [7:0]           music_byte,
  input  logic [$clog2(N)-1:0] addr,
  output logic [31:0]          amp_out,
  output logic                 frame_done    // 100 MHz pulse: all bins written
);

  localparam int AW = $clog2(N);

  // ---- 25 MHz side: hold the byte and flip a flag
  logic [7:0] held_byte;
  logic       toggle_25;

  always_ff @(posedge clk_25) begin
    if (rst_25) begin
      held_byte <= '0;
      toggle_25 <= 1'b0;
    end else if (byte_available) begin
      held_byte <= music_byte;
      toggle_25 <= ~toggle_25;
    end
  end

  // ---- 100 MHz side
  logic [1:0] rst_sync;
  logic       rst_100;
  logic [2:0] toggle_sync;
  logic       sample_valid;
  logic [7:0] sample;

  always_ff @(posedge clk_100) begin
    rst_sync    <= {rst_sync[0], rst_25};
    toggle_sync <= {toggle_sync[1:0], toggle_25};
  end
  assign rst_100 = rst_sync[1];

  always_ff @(posedge clk_100) begin
    if (rst_100) begin
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      sample_valid <= toggle_sync[2] ^ toggle_sync[1];
      if (toggle_sync[2] ^ toggle_sync[1]) sample <= held_byte;
    end
  end

  logic          dft_valid, dft_ready, dft_last;
  logic [31:0]   dft_data;
  logic          sq_valid, sq_last, sq_in_ready;
  logic [31:0]   sq_data;
  logic          fifo_full, fifo_empty, fifo_rd;
  logic [32:0]   fifo_dout;
  logic          sqrt_ready, sqrt_valid, sqrt_last;
  logic [23:0]   sqrt_data;
  logic [AW-1:0] wr_addr;

  dft_engine #(.N(N)) u_dft (
    .clk(clk_100), .rst(rst_100), .sample_valid, .sample,
    .out_valid(dft_valid), .out_ready(dft_ready), .out_data(dft_data),
    .out_last(dft_last), .out_bin(), .busy());

  square_and_sum u_sqsum (
    .clk(clk_100), .rst(rst_100),
    .in_valid(dft_valid), .in_ready(sq_in_ready), .in_data(dft_data), .in_last(dft_last),
    .out_valid(sq_valid), .out_ready(!fifo_full), .out_data(sq_data), .out_last(sq_last));

  // the transform holds each bin until it is taken; one bin per handshake
  assign dft_ready = sq_in_ready;

  sync_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk_100), .rst(rst_100), .clear(1'b0),
    .wr_en(sq_valid && !fifo_full), .din({sq_last, sq_data}),
    .rd_en(fifo_rd), .dout(fifo_dout),
    .full(fifo_full), .empty(fifo_empty), .count());

  assign fifo_rd = !fifo_empty && sqrt_ready;

  sqrt_unit u_sqrt (
    .clk(clk_100), .rst(rst_100),
    .in_valid(!fifo_empty), .in_ready(sqrt_ready),
    .in_data(fifo_dout[31:0]), .in_last(fifo_dout[32]),
    .out_valid(sqrt_valid), .out_data(sqrt_data), .out_last(sqrt_last));

  always_ff @(posedge clk_100) begin
    if (rst_100) begin
      wr_addr    <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= sqrt_valid && sqrt_last;
      if (sqrt_valid) wr_addr <= sqrt_last ? '0 : wr_addr + 1'b1;
    end
  end

  magnitude_bram #(.WIDTH(32), .DEPTH(N)) u_bram (
    .clk_a(clk_100), .we_a(sqrt_valid), .addr_a(wr_addr), .din_a({8'd0, sqrt_data}),
    .clk_b(clk_25), .addr_b(addr), .dout_b(amp_out));

endmodule
