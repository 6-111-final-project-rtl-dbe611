// tb_music_player_display: places the beam on chosen pixels and checks the
// composed picture two clocks later: time digits (and their change after a
// second of play), the button shape for play and pause, the progress bar's
// filled and unfilled parts, volume digit blanking, spectrum bars drawn from
// a modelled magnitude memory, blanking, and the sync delay.
module tb_music_player_display;
  import gmp_pkg::*;
  localparam int TPS = 20;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, hsync = 0, vsync = 0, blank = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  ctrl_pulses_t ctrl = '0;
  logic [1:0] speed_sel = 0;
  logic [31:0] amp_in;
  logic [9:0] amp_addr, bar_fill;
  pixel_t pixel_out;
  logic hsync_out, vsync_out, blank_out, show_pause, song_ended;
  logic [1:0] song_idx;
  logic [11:0] time_digits;
  always #5 clk = ~clk;

  // magnitude memory model with a one-clock read
  always_ff @(posedge clk) amp_in <= 32'(amp_addr) * 32'd1500;

  music_player_display #(.TICKS_PER_SEC(TPS), .BAR_K(1)) dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync,
    .blank, .ctrl, .speed_sel, .amp_in, .amp_addr, .pixel_out, .hsync_out, .vsync_out, .blank_out,
    .song_idx, .show_pause, .song_ended, .time_digits, .bar_fill);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic look(input int h, input int v, output pixel_t p);
    @(negedge clk) begin hcount = 11'(h); vcount = 10'(v); end
    @(negedge clk);
    @(negedge clk) p = pixel_out;
  endtask

  task automatic pulse(input int which);
    @(negedge clk);
    case (which)
      0: ctrl.play = 1; 1: ctrl.pause = 1; 2: ctrl.skip_fwd = 1; default: ctrl.vol_down = 1;
    endcase
    @(negedge clk) ctrl = '0;
  endtask

  initial begin
    pixel_t p;
    int lit;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    // elapsed time 0:00: seconds-ones digit at (126,335), segment a lit, g dark
    look(126 + 7, 335 + 1, p); check(p == 12'hFFF, "digit 0 segment a");
    look(126 + 7, 335 + 7, p); check(p == 12'h000, "digit 0 segment g dark");
    // play button: triangle, not two bars
    look(20 + 24, 300 + 24, p); check(p == 12'hFFF, "play triangle centre");
    pulse(0);
    look(20 + 24, 300 + 24, p); check(p == 12'h000, "pause symbol gap");
    look(20 + 14, 300 + 24, p); check(p == 12'hFFF, "pause symbol bar");
    repeat (TPS + 4) @(negedge clk);
    check(time_digits == 12'h001, $sformatf("one second elapsed: %h", time_digits));
    look(126 + 7, 335 + 1, p); check(p == 12'h000, "digit 1 has no segment a");
    look(126 + 12, 335 + 4, p); check(p == 12'hFFF, "digit 1 segment b");
    // progress bar: one pixel per 255 clocks for the first song
    repeat (300) @(negedge clk);
    check(bar_fill > 0, "bar advancing");
    look(64, 362, p); check(p == 12'hFFF, "filled bar is white");
    look(64 + 511, 362, p); check(p == 12'h888, "unfilled bar is grey");
    // volume: 100 shows a hundreds digit, 75 does not
    look(540 + 12, 405 + 4, p); check(p == 12'hFFF, "hundreds digit at full volume");
    pulse(3);
    look(540 + 12, 405 + 4, p); check(p == 12'h000, "hundreds digit hidden at 75");
    look(556 + 7, 405 + 1, p); check(p == 12'hFFF, "tens digit 7 segment a");
    // speed 1.0: integer digit 1
    look(555 + 12, 450 + 4, p); check(p == 12'hFFF, "speed integer digit");
    // spectrum bars: magnitude grows with the address; bin 15 is tall
    look(15 * 32 + 10, 264, p); check(p == 12'hF77, $sformatf("bar bottom pixel %h", p));
    look(15 * 32 + 10, 30, p);  check(p == 12'h000, "above the bar");
    lit = 0;
    for (int v = 21; v <= 264; v++) begin look(15 * 32 + 10, v, p); if (p != 0) lit++; end
    check(lit == 15 * 1500 / 128, $sformatf("bar height %0d", lit));
    // blanking and sync delay
    @(negedge clk) begin blank = 1; hsync = 1; hcount = 11'd64; vcount = 10'd362; end
    @(negedge clk) check(!hsync_out, "sync delayed");
    @(negedge clk) check(hsync_out && blank_out && pixel_out == 12'h000, "blanked two clocks later");
    @(negedge clk) begin blank = 0; hsync = 0; end
    // skip: button back to play, time cleared, next song
    pulse(2);
    repeat (3) @(negedge clk);
    check(song_idx == 2'd1 && !show_pause && time_digits == 12'h000 && bar_fill == 0, "skip resets the screen state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
