// tb_command_decoder: every control bit of a received byte becomes a
// one-clock pulse on the matching output; nothing happens without
// byte_available. Random bytes then check every bit at once; bits 7:6 are
// ignored.
module tb_command_decoder;
  import gmp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, avail = 0;
  logic [7:0] b = 0;
  ctrl_pulses_t c;
  always #5 clk = ~clk;

  command_decoder dut (.clk, .rst, .byte_available(avail), .byte_in(b), .ctrl(c));

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [5:0] expect_pulses;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) begin b = 8'(1 << i); avail = 1; end
      @(negedge clk) avail = 0;
      // bit order of the byte: play 5, pause 4, next 3, prev 2, up 1, down 0
      expect_pulses = 6'(1 << i);
      check({c.play, c.pause, c.skip_fwd, c.skip_back, c.vol_up, c.vol_down} == expect_pulses,
            $sformatf("bit %0d", i));
      @(negedge clk);
      check(c == '0, "pulse lasts one clock");
    end
    @(negedge clk) begin b = 8'h3F; avail = 0; end
    @(negedge clk);
    check(c == '0, "no pulses without byte_available");
    repeat (50) begin
      logic [7:0] v;
      v = 8'($urandom);
      @(negedge clk) begin b = v; avail = 1; end
      @(negedge clk) avail = 0;
      check({c.play, c.pause, c.skip_fwd, c.skip_back, c.vol_up, c.vol_down} == v[5:0],
            $sformatf("random byte %02h", v));
      @(negedge clk);
      check(c == '0, "random pulse lasts one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
