// tb_playback_speed: the sample tick comes every BASE_PERIOD clocks at 1.0x,
// every BASE_PERIOD/2 at 2.0x and every 2*BASE_PERIOD at 0.5x (and at 1.0x
// for the unused code). A random run of codes follows the fixed ones.
module tb_playback_speed;
  import gmp_pkg::*;
  localparam int BASE = 20;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, tick;
  logic [1:0] sel = 0;
  speed_t spd;
  always #5 clk = ~clk;

  playback_speed #(.BASE_PERIOD(BASE)) dut (.clk, .rst, .speed_sel(sel), .speed(spd), .sample_tick(tick));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input logic [1:0] s, input int expect_period);
    int t0, t1;
    @(negedge clk) sel = s;
    // skip the first two ticks after the change
    repeat (2) begin @(posedge clk); while (!tick) @(posedge clk); end
    t0 = 0;
    @(posedge clk);
    while (!tick) begin @(posedge clk); t0++; end
    t1 = t0 + 1;
    check(t1 == expect_period, $sformatf("code %0d: period %0d expected %0d", s, t1, expect_period));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    measure(2'b00, BASE);
    measure(2'b01, BASE / 2);
    measure(2'b10, BASE * 2);
    measure(2'b11, BASE);
    measure(2'b01, BASE / 2);
    repeat (40) begin
      logic [1:0] s;
      s = 2'($urandom % 4);
      measure(s, s == 2'b01 ? BASE / 2 : s == 2'b10 ? BASE * 2 : BASE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
