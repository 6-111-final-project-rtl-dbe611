// magnitude_bram: simple dual-port RAM holding one magnitude per frequency
// bin, written by the Fourier-transform pipeline and read by the display.
//
// Port A writes on its own clock (the 100 MHz transform clock), port B reads
// on another (the 25 MHz pixel clock). Reading on the pixel clock returns
// the data in step with the display, so no other clock-domain crossing is
// needed; this arrangement and the 1024 x 32 size are the document's. A read
// of a word being written at the same time may return old or new data.
// Timing: dout_b is registered, one port-B clock after addr_b.
module magnitude_bram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1024
) (
  input  logic                     clk_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         din_a,
  input  logic                     clk_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  output logic [WIDTH-1:0]         dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk_b) begin
    dout_b <= mem[addr_b];
  end

endmodule
