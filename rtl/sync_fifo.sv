// sync_fifo: single-clock first-in first-out buffer with an occupancy count.
//
// A memory array of DEPTH words with read and write pointers. The head of
// the queue is always visible on dout (show-ahead); rd_en removes it.
// A write when full and a read when empty are ignored (and flagged by
// assertions). clear empties the FIFO in one clock; the music player uses it
// when the song changes. Used twice in the design: 1024 x 8 bits for the
// music samples read from the SD card, and in front of the square root of
// the Fourier-transform path. The depths are the document's; the show-ahead
// read is this design's choice.
// Timing: a written word is visible on dout the clock after the write.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         din,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst || clear) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst || clear) !(rd_en && empty));

endmodule
