// tb_vga: runs the 640x480 timing generator for two frames and checks at
// every clock that the counters step through 800 x 524 positions, that
// hsync, vsync and blank are high exactly in the sync and blanking
// intervals for the current counter values, and the sync pulse widths.
module tb_vga;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok && failures < 20) $display("FAIL: %s", msg);
    if (!ok) failures++;
  endtask

  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  always #5 clk = ~clk;

  vga dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int h, v, hs_len, vs_lines, frames;
    bit hs_prev;
    repeat (3) @(negedge clk);
    rst = 0;
    h = 0; v = 0; hs_len = 0; vs_lines = 0; frames = 0; hs_prev = 0;
    for (int i = 0; i < 2 * 800 * 524 + 10; i++) begin
      @(negedge clk);
      h = (h == 799) ? 0 : h + 1;
      if (h == 0) v = (v == 523) ? 0 : v + 1;
      if (h == 0 && v == 0) frames++;
      if (hcount != 11'(h) || vcount != 10'(v)) begin
        check(0, $sformatf("counter %0d,%0d expected %0d,%0d", hcount, vcount, h, v));
        break;
      end
      if (h % 97 == 0 || h >= 630) begin
        check(hsync == (h >= 656 && h < 752), $sformatf("hsync at %0d", h));
        check(vsync == (v >= 491 && v < 493), $sformatf("vsync at line %0d", v));
        check(blank == (h >= 640 || v >= 480), $sformatf("blank at %0d,%0d", h, v));
      end
      if (hsync) hs_len++;
      if (!hsync && hs_prev) begin check(hs_len == 96, $sformatf("hsync width %0d", hs_len)); hs_len = 0; end
      hs_prev = hsync;
      if (vsync && h == 0) vs_lines++;
    end
    check(frames == 2, "two frames");
    check(vs_lines == 4, $sformatf("vsync lines %0d over two frames", vs_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
