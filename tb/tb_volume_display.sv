// tb_volume_display: random volume pulses against a five-level model; the
// digits must read 100, 75, 50, 25 or 0 with leading zeros hidden, and the
// level must stop at both ends.
module tb_volume_display;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, vol_up = 0, vol_down = 0;
  logic [3:0] hundreds, tens, ones;
  logic [2:0] shown;
  always #5 clk = ~clk;

  volume_display dut (.clk, .rst, .vol_up, .vol_down, .hundreds, .tens, .ones, .shown);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lvl = 4, pct;
    int pcts [5] = '{0, 25, 50, 75, 100};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      vol_up = ($urandom % 3) == 0;
      vol_down = !vol_up && ($urandom % 2);
      if (vol_up && lvl < 4) lvl++;
      else if (vol_down && lvl > 0) lvl--;
      @(negedge clk);
      vol_up = 0; vol_down = 0;
      pct = pcts[lvl];
      check(hundreds * 100 + tens * 10 + ones == pct, $sformatf("shows %0d%0d%0d for %0d", hundreds, tens, ones, pct));
      check(shown == (pct == 100 ? 3'b111 : pct == 0 ? 3'b001 : 3'b011), "leading zero blanking");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
