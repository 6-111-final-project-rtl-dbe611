// tb_speed_display: each switch setting must show 1.0, 2.0 or 0.5 one clock
// after it is applied; the unused code 11 shows 1.0.
module tb_speed_display;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1;
  logic [1:0] speed_sel = 2'b01;
  logic [3:0] int_digit, frac_digit;
  always #5 clk = ~clk;

  speed_display dut (.clk, .rst, .speed_sel, .int_digit, .frac_digit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    check(int_digit == 1 && frac_digit == 0, "1.0 in reset");
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      speed_sel = 2'($urandom);
      @(negedge clk);
      case (speed_sel)
        2'b01:   check(int_digit == 2 && frac_digit == 0, "2.0x");
        2'b10:   check(int_digit == 0 && frac_digit == 5, "0.5x");
        default: check(int_digit == 1 && frac_digit == 0, "1.0x");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
