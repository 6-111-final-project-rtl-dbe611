// tb_gesture_music_player: end-to-end test of the whole system at reduced
// sizes (fast serial link, 64-byte FIFO, 16-byte blocks, 16-point
// transform, short seconds). Accelerometer samples shaped like wrist tilts
// go in; the serial output is looped back to the receiver as the Bluetooth
// link would; a behavioural SD card serves the songs. Each gesture's effect
// is checked at the outputs and internal state, and every mechanism of the
// system is counted: one failure is added for each mechanism that never
// happened.
module tb_gesture_music_player;
  import gmp_pkg::*;
  localparam int DIV = 16, DEPTH = 64, BLK = 16, BASE = 40, FTN = 16, TPS = 3000, BK = 4;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk_25 = 0, clk_100 = 0, tx_rst = 1, rx_rst = 1;
  logic accel_data_ready = 0;
  logic [11:0] accel_x = 0, accel_y = 0, accel_z = 0;
  logic [2:0] gesture_light;
  logic bt_tx, bt_rx;
  logic [1:0] speed_sel = 0;
  logic sd_ready, sd_byte_available, sd_rd, aud_pwm, aud_sd, vga_hs, vga_vs;
  logic [7:0] sd_dout;
  logic [31:0] sd_addr, last_addr;
  logic [3:0] vga_r, vga_g, vga_b;
  int sd_reads;
  always #20 clk_25 = ~clk_25;
  always #5 clk_100 = ~clk_100;
  assign bt_rx = bt_tx;   // the Bluetooth pair acts as a wire

  fake_sd #(.BLOCK(BLK), .BYTE_GAP(2), .START_DELAY(4), .CRC_DELAY(2)) sd (
    .clk(clk_25), .reset(rx_rst), .rd(sd_rd), .address(sd_addr), .ready(sd_ready), .dout(sd_dout),
    .byte_available(sd_byte_available), .reads(sd_reads), .last_addr);

  gesture_music_player #(.UART_DIV(DIV), .FIFO_DEPTH(DEPTH), .BLOCK_BYTES(BLK), .BASE_PERIOD(BASE),
                         .FT_POINTS(FTN), .TICKS_PER_SEC(TPS), .BAR_K(BK)) dut (
    .clk_25, .clk_100, .tx_rst, .rx_rst, .accel_data_ready, .accel_x, .accel_y, .accel_z, .gesture_light,
    .bt_tx, .bt_rx, .speed_sel, .sd_ready, .sd_dout, .sd_byte_available, .sd_rd, .sd_addr,
    .aud_pwm, .aud_sd, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  initial begin
    repeat (3_000_000) @(posedge clk_25);
    failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters
  int n_gesture [8];        // done pulses per control bit
  int n_tx_bytes, n_rx_bytes, n_rx_match, n_samples, n_pwm_high, n_fifo_full, n_full_rd;
  int n_ft_frames, n_vga_frames, n_lit_pixels, n_play, n_pause, n_skip, n_vol, n_speed, n_tick, n_bar;
  logic [7:0] sent_q[$];
  logic vs_prev = 1;
  logic [11:0] td_prev = 0;
  logic [9:0] bar_prev = 0;

  always @(posedge clk_25) if (!tx_rst) begin
    if (dut.u_gestures.done) begin
      for (int b = 0; b < 8; b++) if (dut.u_gestures.val_out[b]) n_gesture[b]++;
    end
    if (dut.done) begin n_tx_bytes++; sent_q.push_back(dut.gesture_byte); end
  end

  always @(posedge clk_25) if (!rx_rst) begin
    if (dut.rx_valid) begin
      n_rx_bytes++;
      if (sent_q.size() > 0 && sent_q.pop_front() == dut.rx_byte) n_rx_match++;
    end
    if (dut.ctrl.play) n_play++;
    if (dut.ctrl.pause) n_pause++;
    if (dut.ctrl.skip_fwd || dut.ctrl.skip_back) n_skip++;
    if (dut.ctrl.vol_up || dut.ctrl.vol_down) n_vol++;
    if (dut.u_audio.sample_valid) n_samples++;
    if (aud_pwm) n_pwm_high++;
    // FIFO without room for a whole block: no block read may start
    if (32'(dut.u_audio.fifo_count) > DEPTH - BLK) begin
      n_fifo_full++;
      if (sd_rd) n_full_rd++;
    end
    if (dut.u_audio.speed == SPEED_2X) n_speed++;
    if (dut.u_display.time_digits != td_prev) n_tick++;
    td_prev <= dut.u_display.time_digits;
    if (dut.u_display.bar_fill > bar_prev) n_bar++;
    bar_prev <= dut.u_display.bar_fill;
    if (!vga_vs && vs_prev) n_vga_frames++;
    vs_prev <= vga_vs;
    if ({vga_r, vga_g, vga_b} != 0) n_lit_pixels++;
  end
  always @(posedge clk_100) if (dut.u_ft.frame_done) n_ft_frames++;

  // ---------------- accelerometer stimulus
  task automatic sample(input int x, input int y, input int z);
    @(negedge clk_25) begin
      accel_x = 12'(x); accel_y = 12'(y); accel_z = 12'(z); accel_data_ready = 1;
    end
    repeat (2) @(negedge clk_25);
    accel_data_ready = 0;
    repeat (3) @(negedge clk_25);
  endtask

  // tilt along one axis, hold, return flat; then wait for the byte to arrive
  task automatic tilt(input int axis, input bit neg);
    int v;
    v = (axis == 2 ? 1800 : 900) * (neg ? -1 : 1);
    repeat (40) sample(axis == 0 ? v : 0, axis == 1 ? v : 0, axis == 2 ? v : 0);
    repeat (60) sample(0, 0, 0);
    repeat (DIV * 12 + 20) @(negedge clk_25);
  endtask

  initial begin
    int t0, lv, samp;
    repeat (5) @(negedge clk_25);
    tx_rst = 0; rx_rst = 0;
    repeat (20) @(negedge clk_25);
    check(!dut.u_audio.playing && dut.u_audio.volume == VOL_FULL && dut.u_audio.speed == SPEED_1X, "idle after reset");
    check(aud_sd, "amplifier enabled");

    tilt(2, 0);                               // Z+: play
    check(dut.u_audio.playing && dut.u_display.show_pause, "play gesture starts playback and shows pause");
    repeat (3000) @(negedge clk_25);
    check(sd_reads > 1 && last_addr >= 32'h200 && last_addr < 32'h200 + 32'd2000, "first song read from its start");

    tilt(0, 1);                               // X-: volume down
    check(dut.u_audio.volume == VOL_3QUART, "volume gesture lowers volume");
    // the PWM level is the sample shifted once
    @(negedge clk_25); while (!dut.u_audio.sample_valid) @(negedge clk_25);
    repeat (3) @(negedge clk_25);
    check(dut.u_audio.level == (dut.u_audio.sample >> 1), "level follows the volume");

    speed_sel = 2'b01;
    repeat (4 * BASE) @(negedge clk_25);
    @(negedge clk_25); while (!dut.u_audio.sample_tick) @(negedge clk_25);
    t0 = 0;
    @(negedge clk_25); while (!dut.u_audio.sample_tick) begin @(negedge clk_25); t0++; end
    check(t0 + 1 == BASE / 2, $sformatf("2.0x sample period %0d", t0 + 1));

    repeat (8000) @(negedge clk_25);
    check(dut.u_display.time_digits != 0, "elapsed time advances while playing");

    tilt(1, 0);                               // Y+: next song
    check(dut.u_audio.song_idx == 2'd1 && dut.u_display.song_idx == 2'd1, "next gesture selects song 2");
    check(!dut.u_audio.playing && dut.u_display.time_digits == 0 && dut.u_display.bar_fill == 0, "skip pauses and clears the screen state");
    tilt(2, 0);                               // play the new song
    repeat (2000) @(negedge clk_25);
    check(last_addr >= 32'hBB8200 && last_addr < 32'hBB8200 + 32'd4000, $sformatf("song 2 read (%h)", last_addr));

    tilt(1, 1);                               // Y-: previous song
    check(dut.u_audio.song_idx == 2'd0 && dut.u_display.song_idx == 2'd0, "previous gesture selects song 1");
    tilt(2, 0);
    tilt(0, 0);                               // X+: volume up
    check(dut.u_audio.volume == VOL_FULL, "volume back to full");
    speed_sel = 2'b10;
    repeat (2000) @(negedge clk_25);
    check(dut.u_audio.speed == SPEED_HALF, "half speed");
    speed_sel = 2'b00;

    // let the display finish a frame
    while (n_vga_frames < 1) @(negedge clk_25);
    tilt(2, 1);                               // Z-: pause
    check(!dut.u_audio.playing && !dut.u_display.show_pause, "pause gesture stops playback");
    samp = n_samples;
    repeat (1000) @(negedge clk_25);
    check(n_samples == samp, "no samples while paused");

    // ---------------- every mechanism must have happened
    check(n_gesture[5] == 3, $sformatf("play gestures %0d", n_gesture[5]));
    check(n_gesture[4] == 1, "pause gesture");
    check(n_gesture[3] == 1, "next gesture");
    check(n_gesture[2] == 1, "previous gesture");
    check(n_gesture[1] == 1, "volume up gesture");
    check(n_gesture[0] == 1, "volume down gesture");
    check(n_tx_bytes == 8 && n_rx_bytes == 8 && n_rx_match == 8,
          $sformatf("serial link: sent %0d received %0d matched %0d", n_tx_bytes, n_rx_bytes, n_rx_match));
    check(n_play == 3 && n_pause == 1 && n_skip == 2 && n_vol == 2, "decoded command pulses");
    check(sd_reads > 10, $sformatf("SD block reads %0d", sd_reads));
    check(n_fifo_full > 0, "FIFO reached its hold-off level");
    check(n_full_rd == 0, "no block read started without room");
    check(n_samples > 100, $sformatf("samples played %0d", n_samples));
    check(n_pwm_high > 0, "PWM output active");
    check(n_speed > 0, "speed change");
    check(n_ft_frames > 2, $sformatf("transform frames %0d", n_ft_frames));
    check(n_tick > 2, $sformatf("time display ticks %0d", n_tick));
    check(n_bar > 2, $sformatf("progress bar steps %0d", n_bar));
    check(n_vga_frames > 0, "VGA frame");
    check(n_lit_pixels > 1000, $sformatf("lit pixels %0d", n_lit_pixels));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
