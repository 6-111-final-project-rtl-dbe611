// sqrt_unit: integer square root of the 32-bit power, giving the magnitude
// of a Fourier coefficient.
//
// Bit-serial restoring algorithm, one result bit per clock: each step brings
// down the next two bits of the radicand into the remainder and subtracts
// the trial value 4*root + 1 when it fits. A 32-bit input gives a 16-bit
// root (truncated), returned zero-extended in the 24-bit result word, the
// width the document's square root produces. The document names only the
// function; the serial algorithm is this design's choice.
// Handshake: in_ready is high when idle; a word is accepted when in_valid
// and in_ready are both high. out_valid is high for one clock, 17 clocks
// after the input was accepted; out_last copies in_last.
module sqrt_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_last,
  output logic        out_valid,
  output logic [23:0] out_data,
  output logic        out_last
);

  logic        active, last_q;
  logic [4:0]  step;
  logic [31:0] radicand;
  logic [17:0] rem;      // remainder, below 2*root + 1
  logic [19:0] rem_next, trial;
  logic [15:0] root;

  assign in_ready = !active;
  assign rem_next = {rem, radicand[31:30]};
  assign trial    = {2'b00, root, 2'b01};

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      last_q    <= 1'b0;
      step      <= '0;
      radicand  <= '0;
      rem       <= '0;
      root      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!active) begin
        if (in_valid) begin
          active   <= 1'b1;
          radicand <= in_data;
          last_q   <= in_last;
          rem      <= '0;
          root     <= '0;
          step     <= '0;
        end
      end else begin
        radicand <= radicand << 2;
        if (rem_next >= trial) begin
          rem  <= 18'(rem_next - trial);
          root <= {root[14:0], 1'b1};
        end else begin
          rem  <= 18'(rem_next);
          root <= {root[14:0], 1'b0};
        end
        step <= step + 5'd1;
        if (step == 5'd15) begin
          active    <= 1'b0;
          out_valid <= 1'b1;
          out_last  <= last_q;
          out_data  <= {8'd0, root[14:0], (rem_next >= trial)};
        end
      end
    end
  end

endmodule
