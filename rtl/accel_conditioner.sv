// accel_conditioner: turns raw accelerometer samples into filtered
// magnitudes and direction signs for the gesture recogniser.
//
// The accelerometer controller delivers three 12-bit two's complement
// accelerations and a data_ready flag. On the rising edge of data_ready the
// three samples are latched; each is split into its magnitude (absolute
// value) and its sign (1 = negative), and the next cycle the magnitudes are
// fed to three iir_filter instances. Signs follow the latched sample
// directly. This structure (latch, magnitude and sign, one IIR filter per
// axis) is the document's; the edge detection on data_ready is this design's.
// Latency: signs one clock after the data_ready edge, filtered magnitudes two.
module accel_conditioner (
  input  logic        clk,
  input  logic        rst,
  input  logic        data_ready,
  input  logic [11:0] accel_x,
  input  logic [11:0] accel_y,
  input  logic [11:0] accel_z,
  output logic [11:0] x_mag_filtered,
  output logic [11:0] y_mag_filtered,
  output logic [11:0] z_mag_filtered,
  output logic        x_sign,
  output logic        y_sign,
  output logic        z_sign
);

  logic        ready_q, filt_update;
  logic [11:0] x_latch, y_latch, z_latch;
  logic [11:0] x_mag, y_mag, z_mag;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_q     <= 1'b0;
      filt_update <= 1'b0;
      x_latch     <= '0;
      y_latch     <= '0;
      z_latch     <= '0;
    end else begin
      ready_q     <= data_ready;
      filt_update <= data_ready & ~ready_q;
      if (data_ready & ~ready_q) begin
        x_latch <= accel_x;
        y_latch <= accel_y;
        z_latch <= accel_z;
      end
    end
  end

  // absolute value of a two's complement sample
  function automatic logic [11:0] magnitude(input logic [11:0] v);
    return v[11] ? (~v + 12'd1) : v;
  endfunction

  assign x_mag  = magnitude(x_latch);
  assign y_mag  = magnitude(y_latch);
  assign z_mag  = magnitude(z_latch);
  assign x_sign = x_latch[11];
  assign y_sign = y_latch[11];
  assign z_sign = z_latch[11];

  iir_filter #(.WIDTH(12)) u_x_filter (.clk, .rst, .sample_valid(filt_update),
                                       .data_in(x_mag), .data_filtered(x_mag_filtered));
  iir_filter #(.WIDTH(12)) u_y_filter (.clk, .rst, .sample_valid(filt_update),
                                       .data_in(y_mag), .data_filtered(y_mag_filtered));
  iir_filter #(.WIDTH(12)) u_z_filter (.clk, .rst, .sample_valid(filt_update),
                                       .data_in(z_mag), .data_filtered(z_mag_filtered));

endmodule
