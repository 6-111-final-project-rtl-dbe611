// tb_volume_control: the five volume steps apply right shifts of 0, 1, 3,
// 5 and 7 bits to unsigned samples, saturating at both ends.
module tb_volume_control;
  import gmp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, up = 0, down = 0;
  logic [7:0] sin = 0, sout;
  volume_t vol;
  always #5 clk = ~clk;

  volume_control dut (.clk, .rst, .vol_up(up), .vol_down(down), .signal_in(sin), .signal_out(sout), .volume(vol));

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int shift_of [5] = '{7, 5, 3, 1, 0};

  task automatic check_level(input int lvl);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) sin = 8'($urandom);
      @(negedge clk);
      check(sout == (sin >> shift_of[lvl]) && int'(vol) == lvl,
            $sformatf("level %0d: %0d -> %0d", lvl, sin, sout));
    end
  endtask

  task automatic pulse(input bit is_up);
    @(negedge clk) if (is_up) up = 1; else down = 1;
    @(negedge clk) begin up = 0; down = 0; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check_level(4);
    pulse(1); check_level(4);           // saturates at full
    for (int l = 3; l >= 0; l--) begin pulse(0); check_level(l); end
    pulse(0); check_level(0);           // saturates at zero
    for (int l = 1; l <= 4; l++) begin pulse(1); check_level(l); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
