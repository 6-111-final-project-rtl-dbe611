// tb_iir_filter: step response of the IIR filter against a reference
// computed in real numbers (y += (x - y)/8, output y/2), and hold while no
// sample is valid.
module tb_iir_filter;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, valid = 0;
  logic [11:0] din = 0, dout;
  always #5 clk = ~clk;

  iir_filter dut (.clk, .rst, .sample_valid(valid), .data_in(din), .data_filtered(dout));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  real y;
  initial begin
    y = 0.0;
    repeat (3) @(negedge clk);
    rst = 0;
    din = 12'd1600;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk) valid = 1;
      @(negedge clk) valid = 0;
      y = y + (1600.0 - y) / 8.0;
      // fixed-point truncation keeps the filter within a few counts of the ideal
      check(($itor(dout) - y / 2.0) < 2.0 && (y / 2.0 - $itor(dout)) < 3.0,
            $sformatf("step %0d: out %0d, ideal %f", i, dout, y / 2.0));
    end
    check(dout >= 12'd797 && dout <= 12'd800, $sformatf("settled value %0d", dout));
    // no valid: output holds
    din = 12'd0;
    repeat (20) @(negedge clk);
    check(dout >= 12'd797, "output held without sample_valid");
    // first step down: one eighth removed
    @(negedge clk) valid = 1;
    @(negedge clk) valid = 0;
    check(dout >= 12'd696 && dout <= 12'd701, $sformatf("first step down %0d", dout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
