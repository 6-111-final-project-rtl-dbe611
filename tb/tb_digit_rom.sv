// tb_digit_rom: for each of the ten glyphs, probes the centre of each of the
// seven segments and compares with the expected segment set of that digit,
// checks that the glyph corners stay dark, that addresses past the last
// glyph read as dark, and the one-clock read latency.
module tb_digit_rom;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0;
  logic [11:0] addr = 0;
  logic pixel;
  always #5 clk = ~clk;

  digit_rom dut (.clk, .addr, .pixel);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // segments lit per digit: a b c d e f g
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  int prow [7] = '{1, 4, 10, 13, 10, 4, 7};
  int pcol [7] = '{7, 12, 12, 7, 2, 2, 7};

  function automatic bit has(input string s, input byte c);
    foreach (s[i]) if (s[i] == c) return 1;
    return 0;
  endfunction

  task automatic probe(input int a, input bit exp, input string what);
    @(negedge clk) addr = 12'(a);
    @(negedge clk);
    check(pixel == exp, what);
  endtask

  initial begin
    for (int d = 0; d < 10; d++) begin
      for (int s = 0; s < 7; s++)
        probe(d * 256 + prow[s] * 16 + pcol[s], has(lit[d], byte'("a" + s)),
              $sformatf("digit %0d segment %c", d, "a" + s));
      probe(d * 256, 0, $sformatf("digit %0d corner", d));
      probe(d * 256 + 255, 0, $sformatf("digit %0d far corner", d));
    end
    probe(2560 + 16 + 7, 0, "beyond the last glyph");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
