// tb_gesture_music_player_full: the whole system at its real sizes (38400
// baud link, 1024-byte FIFO, 512-byte blocks, 1024-point transform, full
// 640x480 frame). A play gesture starts the first song from a behavioural
// SD card; the test checks the serial byte, the block reads and FIFO
// hold-off, the 520-clock sample period, a volume gesture, a complete
// 1024-point transform frame, a VGA frame and a pause gesture. The seconds
// counter and progress bar need tens of millions of clocks per step at this
// size and are covered by the reduced-size system test.
module tb_gesture_music_player_full;
  import gmp_pkg::*;
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
  assign bt_rx = bt_tx;

  fake_sd sd (.clk(clk_25), .reset(rx_rst), .rd(sd_rd), .address(sd_addr), .ready(sd_ready), .dout(sd_dout),
    .byte_available(sd_byte_available), .reads(sd_reads), .last_addr);

  gesture_music_player dut (
    .clk_25, .clk_100, .tx_rst, .rx_rst, .accel_data_ready, .accel_x, .accel_y, .accel_z, .gesture_light,
    .bt_tx, .bt_rx, .speed_sel, .sd_ready, .sd_dout, .sd_byte_available, .sd_rd, .sd_addr,
    .aud_pwm, .aud_sd, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  initial begin
    repeat (4_000_000) @(posedge clk_25);
    failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_music, n_tx_bytes, n_rx_match, n_samples, n_fifo_full, n_full_rd, n_ft_frames, n_vga_frames, n_lit_pixels;
  logic [7:0] sent_q[$];
  logic vs_prev = 1;

  always @(posedge clk_25) if (!tx_rst && dut.done) begin n_tx_bytes++; sent_q.push_back(dut.gesture_byte); end
  always @(posedge clk_25) if (!rx_rst) begin
    if (dut.rx_valid && sent_q.size() > 0 && sent_q.pop_front() == dut.rx_byte) n_rx_match++;
    if (dut.u_audio.sample_valid) n_samples++;
    if (dut.music_valid) n_music++;
    if (32'(dut.u_audio.fifo_count) > 1024 - 512) begin
      n_fifo_full++;
      if (sd_rd) n_full_rd++;
    end
    if (!vga_vs && vs_prev) n_vga_frames++;
    vs_prev <= vga_vs;
    if ({vga_r, vga_g, vga_b} != 0) n_lit_pixels++;
  end
  always @(posedge clk_100) if (dut.u_ft.frame_done) n_ft_frames++;

  task automatic sample(input int x, input int y, input int z);
    @(negedge clk_25) begin
      accel_x = 12'(x); accel_y = 12'(y); accel_z = 12'(z); accel_data_ready = 1;
    end
    repeat (2) @(negedge clk_25);
    accel_data_ready = 0;
    repeat (3) @(negedge clk_25);
  endtask

  task automatic tilt(input int axis, input bit neg);
    int v;
    v = (axis == 2 ? 1800 : 900) * (neg ? -1 : 1);
    repeat (40) sample(axis == 0 ? v : 0, axis == 1 ? v : 0, axis == 2 ? v : 0);
    repeat (60) sample(0, 0, 0);
    repeat (UART_DIVISOR * 12) @(negedge clk_25);
  endtask

  initial begin
    int t0, samp;
    repeat (5) @(negedge clk_25);
    tx_rst = 0; rx_rst = 0;
    repeat (20) @(negedge clk_25);
    tilt(2, 0);
    check(n_tx_bytes == 1 && n_rx_match == 1, "play byte crossed the serial link");
    check(dut.u_audio.playing, "playing");
    repeat (20000) @(negedge clk_25);
    check(sd_reads >= 2 && last_addr >= 32'h200 && last_addr < 32'h200 + 32'd8192, $sformatf("block reads %0d at %h", sd_reads, last_addr));
    check(n_fifo_full > 0 && n_full_rd == 0, "FIFO fills and holds off block reads");
    @(negedge clk_25); while (!dut.u_audio.sample_tick) @(negedge clk_25);
    t0 = 0;
    @(negedge clk_25); while (!dut.u_audio.sample_tick) begin @(negedge clk_25); t0++; end
    check(t0 + 1 == 520, $sformatf("sample period %0d", t0 + 1));
    tilt(0, 1);
    check(dut.u_audio.volume == VOL_3QUART, "volume down");
    @(negedge clk_25); while (!dut.u_audio.sample_valid) @(negedge clk_25);
    repeat (3) @(negedge clk_25);
    check(dut.u_audio.level == (dut.u_audio.sample >> 1), "level follows the volume");
    while (n_ft_frames < 1) @(negedge clk_25);
    check(n_music >= 1024, $sformatf("music bytes before the first frame %0d", n_music));
    while (n_vga_frames < 1) @(negedge clk_25);
    tilt(2, 1);
    check(!dut.u_audio.playing, "pause");
    samp = n_samples;
    repeat (2000) @(negedge clk_25);
    check(n_samples == samp, "no samples while paused");
    check(n_lit_pixels > 1000, $sformatf("lit pixels %0d", n_lit_pixels));
    check(n_tx_bytes == 3 && n_rx_match == 3, "three bytes over the link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
