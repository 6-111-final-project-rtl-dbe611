// dft_engine: N-point discrete Fourier transform of the music bytes, one
// frequency bin at a time.
//
// The design asks for the Fourier transform of the music in N = 1024 bins,
// delivered bin by bin as {real, imaginary} 16-bit pairs to the magnitude
// pipeline. This engine computes exactly that with the simplest hardware: a
// single multiply-accumulate pair working through the direct sum
//   X[k] = sum_n x[n] * (cos(2 pi k n / N) - j sin(2 pi k n / N)).
// It is not an FFT: a frame takes N*N clocks (about 10.5 ms at 100 MHz for
// N = 1024), which is still faster than the screen refresh.
//
// FILL: each sample_valid writes one byte (unsigned, re-centred to signed by
//       subtracting 128) into the frame buffer; after N bytes the engine
//       starts computing. Bytes arriving while it computes are not used.
// COMPUTE: for each bin k, n runs 0..N-1 and the twiddle index k*n mod N is
//       kept as a running sum. The cosine table (Q1.15) is computed at
//       elaboration; the sine is read from it a quarter turn earlier. After
//       the last n the bin is output, scaled by 2^-OUT_SHIFT and saturated
//       to 16 bits, with out_last on bin N-1.
// Handshake: out_valid is held until out_ready; the engine stalls meanwhile.
module dft_engine #(
  parameter int N         = 1024,
  parameter int OUT_SHIFT = $clog2(N) + 7
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sample_valid,
  input  logic [7:0]           sample,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [31:0]          out_data,   // {real[15:0], imag[15:0]}
  output logic                 out_last,
  output logic [$clog2(N)-1:0] out_bin,
  output logic                 busy        // computing a frame
);

  localparam int AW   = $clog2(N);
  localparam int ACCW = 24 + AW + 1;

  typedef logic signed [15:0] table_t [N];

  function automatic table_t make_cos_table();
    table_t t;
    for (int i = 0; i < N; i++)
      t[i] = 16'(int'($floor(32767.0 * $cos(2.0 * 3.14159265358979 * i / N) + 0.5)));
    return t;
  endfunction

  localparam table_t COS_TAB = make_cos_table();

  typedef enum logic [1:0] {FILL, COMPUTE, OUTPUT} state_t;

  state_t                  state;
  logic signed [8:0]       frame [N];
  logic [AW-1:0]           wr_idx, k, n, tw_idx;
  logic signed [ACCW-1:0]  acc_re, acc_im, sum_re, sum_im;
  logic signed [15:0]      cos_v, sin_v;
  logic signed [24:0]      prod_re, prod_im;

  assign cos_v   = COS_TAB[tw_idx];
  assign sin_v   = COS_TAB[tw_idx - AW'(N / 4)];
  assign prod_re = frame[n] * cos_v;
  assign prod_im = frame[n] * sin_v;
  assign sum_re  = acc_re + ACCW'(prod_re);
  assign sum_im  = acc_im - ACCW'(prod_im);
  assign busy    = (state != FILL);

  function automatic logic [15:0] scale_sat(input logic signed [ACCW-1:0] v);
    logic signed [ACCW-1:0] s;
    s = v >>> OUT_SHIFT;
    if (s > ACCW'(32767))       return 16'sh7FFF;
    else if (s < -ACCW'(32768)) return 16'sh8000;
    else                        return s[15:0];
  endfunction

  always_ff @(posedge clk) begin
    if (sample_valid && state == FILL) frame[wr_idx] <= $signed({1'b0, sample}) - 9'sd128;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= FILL;
      wr_idx    <= '0;
      k         <= '0;
      n         <= '0;
      tw_idx    <= '0;
      acc_re    <= '0;
      acc_im    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      out_bin   <= '0;
    end else begin
      unique case (state)
        FILL: begin
          if (sample_valid) begin
            wr_idx <= wr_idx + 1'b1;
            if (wr_idx == AW'(N - 1)) begin
              state  <= COMPUTE;
              k      <= '0;
              n      <= '0;
              tw_idx <= '0;
              acc_re <= '0;
              acc_im <= '0;
            end
          end
        end
        COMPUTE: begin
          if (n == AW'(N - 1)) begin
            out_data  <= {scale_sat(sum_re), scale_sat(sum_im)};
            out_bin   <= k;
            out_last  <= (k == AW'(N - 1));
            out_valid <= 1'b1;
            state     <= OUTPUT;
          end else begin
            acc_re <= sum_re;
            acc_im <= sum_im;
            n      <= n + 1'b1;
            tw_idx <= tw_idx + k;
          end
        end
        default: begin // OUTPUT: wait for the bin to be taken
          if (out_ready) begin
            out_valid <= 1'b0;
            acc_re    <= '0;
            acc_im    <= '0;
            n         <= '0;
            tw_idx    <= '0;
            if (out_last) begin
              state  <= FILL;
              wr_idx <= '0;
            end else begin
              k     <= k + 1'b1;
              state <= COMPUTE;
            end
          end
        end
      endcase
    end
  end

endmodule
