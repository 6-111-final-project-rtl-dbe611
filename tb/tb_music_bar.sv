// tb_music_bar: an 8-pixel bar with K = 3 and a 2-second song must advance
// one pixel every 6 clocks while playing, hold when paused, stop when full
// and clear on skip; at 2.0x a pixel takes half as long, at 0.5x twice as
// long. Random song lengths at 1.0x then fill the bar in BAR_LEN*K*length
// clocks.
module tb_music_bar;
  localparam int BL = 8, K = 3;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, play = 0, pause = 0, skip = 0;
  logic [8:0] song_len = 2;
  logic [1:0] speed_sel = 0;
  logic [3:0] fill;
  always #5 clk = ~clk;

  music_bar #(.BAR_LEN(BL), .K(K)) dut (.clk, .rst, .play, .pause, .skip, .speed_sel, .song_len, .fill);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    int t, f0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(fill == 0, "empty after reset");
    pulse(play);
    f0 = fill;
    t = 0;
    while (fill == 4'(f0)) begin @(negedge clk); t++; end
    f0 = fill; t = 0;
    while (fill == 4'(f0)) begin @(negedge clk); t++; end
    check(t == K * 2, $sformatf("pixel period %0d", t));
    pulse(pause);
    f0 = fill;
    repeat (40) @(negedge clk);
    check(fill == 4'(f0), "pause holds");
    pulse(play);
    repeat (200) @(negedge clk);
    check(fill == 4'(BL), $sformatf("full bar %0d", fill));
    pulse(skip);
    repeat (2) @(negedge clk);
    check(fill == 0, "skip clears");
    song_len = 5;
    pulse(play);
    f0 = fill;
    while (fill == 4'(f0)) @(negedge clk);
    f0 = fill; t = 0;
    while (fill == 4'(f0)) begin @(negedge clk); t++; end
    check(t == K * 5, $sformatf("period scales with length: %0d", t));
    speed_sel = 2'b01;
    f0 = fill;
    while (fill == 4'(f0)) @(negedge clk);
    f0 = fill; t = 0;
    while (fill < 4'(f0 + 2)) begin @(negedge clk); t++; end
    check(t == K * 5, $sformatf("2.0x: two pixels in %0d clocks", t));
    speed_sel = 2'b10;
    f0 = fill;
    while (fill == 4'(f0)) @(negedge clk);
    f0 = fill; t = 0;
    while (fill == 4'(f0)) begin @(negedge clk); t++; end
    check(t == 2 * K * 5, $sformatf("0.5x: pixel period %0d", t));
    speed_sel = 2'b00;
    repeat (12) begin
      int len;
      len = 1 + int'($urandom % 20);
      pulse(skip);
      song_len = 9'(len);
      pulse(play);
      t = 0;
      while (fill != 4'(BL)) begin @(negedge clk); t++; end
      check(t >= BL * K * len - 2 && t <= BL * K * len,
            $sformatf("length %0d: full after %0d clocks, expected %0d", len, t, BL * K * len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
