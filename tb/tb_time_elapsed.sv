// tb_time_elapsed: with a 5-clock second, plays a 70-second song and checks
// the digits at each second, that pause stops the count, that the counter
// stops at the song length with 'ended' set, that skip clears to 0:00,
// and that song time runs twice as fast at 2.0x and half as fast at 0.5x.
module tb_time_elapsed;
  localparam int TPS = 5;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, play = 0, pause = 0, skip = 0, ended;
  logic [8:0] song_len = 70;
  logic [1:0] speed_sel = 0;
  logic [3:0] minutes, sec_tens, sec_ones;
  always #5 clk = ~clk;

  time_elapsed #(.TICKS_PER_SEC(TPS)) dut (.clk, .rst, .play, .pause, .skip, .speed_sel, .song_len, .minutes,
    .sec_tens, .sec_ones, .ended);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int shown();
    return minutes * 60 + sec_tens * 10 + sec_ones;
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(shown() == 0 && !ended, "0:00 after reset");
    repeat (20) @(negedge clk);
    check(shown() == 0, "no count while paused");
    pulse(play);
    for (int s = 1; s <= 30; s++) begin
      repeat (TPS) @(negedge clk);
      t = shown();
      check(t == s || t == s - 1, $sformatf("second %0d shows %0d", s, t));
      check(sec_ones <= 9 && sec_tens <= 5, "digit ranges");
    end
    pulse(pause);
    t = shown();
    repeat (50) @(negedge clk);
    check(shown() == t, "pause holds the time");
    pulse(play);
    repeat (TPS * 60) @(negedge clk);
    check(ended && shown() == 70, $sformatf("stopped at 1:10 (%0d:%0d%0d)", minutes, sec_tens, sec_ones));
    check(minutes == 1 && sec_tens == 1 && sec_ones == 0, "digits 1:10");
    pulse(skip);
    repeat (2) @(negedge clk);
    check(shown() == 0 && !ended, "skip clears");
    speed_sel = 2'b01;
    pulse(play);
    repeat (TPS * 10) @(negedge clk);
    t = shown();
    check(t == 19 || t == 20, $sformatf("2.0x: 10 s of clocks shows %0d s", t));
    speed_sel = 2'b10;
    repeat (TPS * 20) @(negedge clk);
    check(shown() - t == 10 || shown() - t == 9, $sformatf("0.5x: 20 s of clocks adds %0d s", shown() - t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
