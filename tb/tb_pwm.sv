// tb_pwm: over each 256-clock period the output is high for exactly 'level'
// clocks, for fixed edge levels and then for random levels.
module tb_pwm;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, out;
  logic [7:0] level = 0;
  always #5 clk = ~clk;

  pwm dut (.clk, .rst, .level_in(level), .pwm_out(out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int high;
    int levels [6] = '{0, 1, 64, 128, 200, 255};
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (levels[i]) begin
      level = 8'(levels[i]);
      high = 0;
      repeat (256) begin @(negedge clk); if (out) high++; end
      check(high == levels[i], $sformatf("level %0d: high %0d clocks", levels[i], high));
    end
    repeat (60) begin
      int lv;
      lv = int'($urandom % 256);
      level = 8'(lv);
      repeat (2) @(negedge clk);
      high = 0;
      repeat (256) begin @(negedge clk); if (out) high++; end
      check(high == lv, $sformatf("level %0d: high %0d clocks", lv, high));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
