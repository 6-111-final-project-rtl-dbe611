// tb_fft_bars: drives random screen positions and magnitudes and checks the
// memory address (hcount/32), and one clock later the area flag, the bar
// height (magnitude >> 7, limited to the area) and the colour band.
module tb_fft_bars;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [9:0] addr;
  logic [31:0] amp_in = 0;
  logic [11:0] pixel;
  logic in_area;
  always #5 clk = ~clk;

  fft_bars dut (.clk, .hcount, .vcount, .addr, .amp_in, .pixel, .in_area);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [11:0] colours [8] = '{12'hF00, 12'hE60, 12'hFC0, 12'h7C0, 12'h0F8, 12'h0FF, 12'h80F, 12'hF77};

  initial begin
    int h, v, ht, band;
    bit area, lit;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      h = (i % 3 == 0) ? $urandom % 800 : 20 + $urandom % 610;
      v = (i % 3 == 0) ? $urandom % 524 : 15 + $urandom % 260;
      hcount = 11'(h); vcount = 10'(v);
      #1 check(addr == 10'(h >> 5), "address");
      @(negedge clk);
      amp_in = (i % 5 == 0) ? $urandom : $urandom % 40000;
      #1;
      area = h >= 26 && h <= 619 && v >= 21 && v <= 264;
      ht = (amp_in >> 7) > 244 ? 244 : int'(amp_in >> 7);
      lit = area && (264 - v) < ht;
      band = h < 36 ? 0 : ((h - 4) >> 5) % 8;
      check(in_area == area, $sformatf("area at %0d,%0d", h, v));
      check(pixel == (lit ? colours[band] : 12'h000), $sformatf("pixel at %0d,%0d amp %0d", h, v, amp_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
