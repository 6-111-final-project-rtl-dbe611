// square_and_sum: power of one Fourier coefficient, re^2 + im^2.
//
// Input words carry the real part in bits 31:16 and the imaginary part in
// bits 15:0, both signed, as in the document. Two pipeline stages: the two
// squares, then their sum (an unsigned 32-bit power). valid and last travel
// with the data. The whole pipeline advances only when out_ready is high,
// and in_ready equals out_ready, so a stalled consumer stalls the producer;
// this flow control is this design's simplification of the stream
// handshake. Latency: two clocks.
module square_and_sum (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last
);

  logic signed [15:0] re, im;
  logic        [31:0] sq_re, sq_im;
  logic               v1, l1;

  assign re       = in_data[31:16];
  assign im       = in_data[15:0];
  assign in_ready = out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= 1'b0;
      l1        <= 1'b0;
      sq_re     <= '0;
      sq_im     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else if (out_ready) begin
      v1        <= in_valid;
      l1        <= in_last;
      sq_re     <= 32'(re * re);
      sq_im     <= 32'(im * im);
      out_valid <= v1;
      out_last  <= l1;
      out_data  <= sq_re + sq_im;
    end
  end

endmodule
