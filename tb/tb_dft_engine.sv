// tb_dft_engine: feeds random frames into a 16-point transform and compares
// every bin against an integer reference built from the same quantised
// cosine table, including the saturation of the 16-bit outputs. The output
// handshake is throttled at random to check that bins are held until taken.
module tb_dft_engine;
  localparam int N = 16, SH = 8;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1;
  logic sample_valid = 0, out_ready = 0;
  logic [7:0] sample = 0;
  logic out_valid, out_last, busy;
  logic [31:0] out_data;
  logic [3:0] out_bin;
  always #5 clk = ~clk;

  dft_engine #(.N(N), .OUT_SHIFT(SH)) dut (.clk, .rst, .sample_valid, .sample, .out_valid, .out_ready,
    .out_data, .out_last, .out_bin, .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint qcos(input int i);
    return longint'($floor(32767.0 * $cos(2.0 * 3.14159265358979 * (i % N) / N) + 0.5));
  endfunction
  function automatic int sat(input longint v);
    longint s = v >>> SH;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  int x [N];
  initial begin
    int bins_seen;
    longint re, im;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        sample = (f == 0) ? 8'd128 + 8'(int'(100.0 * $cos(2.0 * 3.14159265358979 * 3 * i / N))) : 8'($urandom);
        x[i] = int'(sample) - 128;
        sample_valid = 1;
        @(negedge clk) sample_valid = 0;
      end
      check(busy, "busy after a full frame");
      bins_seen = 0;
      while (bins_seen < N) begin
        @(negedge clk);
        out_ready = ($urandom % 3) != 0;
        if (out_valid && out_ready) begin
          re = 0; im = 0;
          for (int n = 0; n < N; n++) begin
            re += x[n] * qcos(n * bins_seen);
            im -= x[n] * qcos(n * bins_seen - N / 4 + N);
          end
          check(out_bin == 4'(bins_seen), $sformatf("bin order %0d", out_bin));
          check($signed(out_data[31:16]) == sat(re) && $signed(out_data[15:0]) == sat(im),
                $sformatf("frame %0d bin %0d got %0d,%0d exp %0d,%0d", f, bins_seen,
                          $signed(out_data[31:16]), $signed(out_data[15:0]), sat(re), sat(im)));
          check(out_last == (bins_seen == N - 1), "last flag");
          bins_seen++;
        end
      end
      @(negedge clk) out_ready = 0;
      @(negedge clk);
      check(!busy, "back to filling");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
