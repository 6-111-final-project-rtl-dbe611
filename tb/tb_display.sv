// tb_display: runs the display subsystem for one full 640x480 frame and
// checks the VGA pins: active-low sync pulses of 96 clocks and 2 lines,
// 800 clocks per line and 524 lines per frame, black during blanking, and
// the white elapsed-time digit 0 drawn at its place, two clocks after the
// beam position.
module tb_display;
  import gmp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok && failures < 20) $display("FAIL: %s", msg);
    if (!ok) failures++;
  endtask

  logic clk = 0, rst = 1;
  ctrl_pulses_t ctrl = '0;
  logic [1:0] speed_sel = 0;
  logic [31:0] amp_in;
  logic [9:0] amp_addr, bar_fill;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, show_pause, song_ended;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [1:0] song_idx;
  logic [11:0] time_digits;
  always #5 clk = ~clk;

  always_ff @(posedge clk) amp_in <= 32'd2000;

  display #(.TICKS_PER_SEC(1000), .BAR_K(2)) dut (.clk, .rst, .ctrl, .speed_sel, .amp_in, .amp_addr,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .hcount, .vcount, .song_idx, .show_pause, .song_ended,
    .time_digits, .bar_fill);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [10:0] h_d [2];
    logic [9:0] v_d [2];
    int hs_len, lines, frame_clocks, vs_lines, white_digit;
    bit vs_prev;
    repeat (3) @(negedge clk);
    rst = 0;
    // wait for the start of a frame at the pins
    @(negedge vga_vs);
    @(negedge clk);
    vs_prev = vga_vs;
    hs_len = 0; lines = 0; frame_clocks = 0; vs_lines = 0; white_digit = 0;
    h_d = '{1, 1}; v_d = '{0, 0};
    while (1) begin
      @(negedge clk);
      frame_clocks++;
      // beam position of the pixel now at the pins
      if (h_d[1] >= 640 || v_d[1] >= 480)
        check({vga_r, vga_g, vga_b} == 0, $sformatf("black in blanking at %0d,%0d", h_d[1], v_d[1]));
      if (h_d[1] == 126 + 7 && v_d[1] == 335 + 1 && {vga_r, vga_g, vga_b} == 12'hFFF) white_digit++;
      if (h_d[1] == 126 + 7 && v_d[1] == 335 + 7) check({vga_r, vga_g, vga_b} == 0, "digit 0 middle dark");
      if (!vga_hs) hs_len++;
      else if (hs_len != 0) begin check(hs_len == 96, $sformatf("hsync width %0d", hs_len)); hs_len = 0; lines++; end
      if (!vga_vs && h_d[1] == 0) vs_lines++;
      h_d[1] = h_d[0]; v_d[1] = v_d[0];
      h_d[0] = hcount; v_d[0] = vcount;
      if (!vga_vs && vs_prev) break;
      vs_prev = vga_vs;
    end
    check(frame_clocks == 800 * 524, $sformatf("frame length %0d", frame_clocks));
    check(lines == 524, $sformatf("lines %0d", lines));
    check(vs_lines == 2, $sformatf("vsync lines %0d", vs_lines));
    check(white_digit == 1, "time digit drawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
