// tb_play_pause_button: random play, pause and skip pulses against a
// reference model: play shows the pause symbol, pause or skip return to the
// play symbol.
module tb_play_pause_button;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, play = 0, pause = 0, skip = 0, show_pause;
  always #5 clk = ~clk;

  play_pause_button dut (.clk, .rst, .play, .pause, .skip, .show_pause);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit m = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!show_pause, "play symbol after reset");
    for (int i = 0; i < 300; i++) begin
      {play, pause, skip} = 3'($urandom % 8 == 0 ? $urandom : 0) | (i % 7 == 0 ? 3'b100 : 3'b000);
      if (!m) m = play && !skip; else m = !(pause || skip);
      @(negedge clk);
      check(show_pause == m, $sformatf("step %0d p=%b pa=%b s=%b", i, play, pause, skip));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
