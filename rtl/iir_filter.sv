// iir_filter: first-order low-pass (exponential average) for one acceleration
// magnitude.
//
// On every sample_valid the running sum is updated as
//   sum <= sum - sum/8 + data_in,
// so sum settles at 8 * data_in and each new sample moves the average one
// eighth of the way toward it (the document's 1/8 new, 7/8 old weighting).
// The output is the average divided by two, the same scaling the design
// uses, which is what the gesture thresholds are expressed in.
// Updating only on a new sample is this design's choice; the document's
// filter updates on a slightly different condition.
// Interface: data_in is an unsigned magnitude; data_filtered changes one
// clock after a sample_valid cycle. Synchronous active-high reset clears it.
module iir_filter #(
  parameter int WIDTH = 12,  // magnitude width
  parameter int SHIFT = 3    // weight of a new sample is 2^-SHIFT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample_valid,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_filtered
);

  logic [WIDTH+SHIFT-1:0] sum;

  always_ff @(posedge clk) begin
    if (rst) sum <= '0;
    else if (sample_valid)
      sum <= sum - (sum >> SHIFT) + (WIDTH+SHIFT)'(data_in);
  end

  // average = sum >> SHIFT; the output is half of it
  assign data_filtered = {1'b0, sum[WIDTH+SHIFT-1:SHIFT+1]};

endmodule
