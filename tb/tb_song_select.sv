// tb_song_select: skip pulses of random length move the song index one
// step, clamped at the first and last song, only after the button is
// released; skip_out pulses once per change, and song_len follows the index.
module tb_song_select;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, skip_fwd = 0, skip_back = 0, skip_out;
  logic [1:0] song_idx;
  logic [8:0] song_len;
  always #5 clk = ~clk;

  song_select dut (.clk, .rst, .skip_fwd, .skip_back, .song_idx, .song_len, .skip_out);

  int pulses = 0;
  always @(posedge clk) if (!rst && skip_out) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int m = 0, len, p0;
    int lens [3] = '{255, 137, 292};
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(song_idx == 0 && song_len == 255, "first song after reset");
    for (int i = 0; i < 60; i++) begin
      bit fwd;
      fwd = 1'($urandom % 2);
      p0 = pulses;
      len = 1 + $urandom % 4;
      skip_fwd = fwd; skip_back = !fwd;
      repeat (len) @(negedge clk);
      check(song_idx == 2'(m), "index holds while the button is held");
      skip_fwd = 0; skip_back = 0;
      m = fwd ? (m < 2 ? m + 1 : m) : (m > 0 ? m - 1 : m);
      repeat (2) @(negedge clk);
      check(song_idx == 2'(m) && song_len == 9'(lens[m]), $sformatf("index %0d expected %0d", song_idx, m));
      check(pulses == p0 + 1, "one skip_out pulse");
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
