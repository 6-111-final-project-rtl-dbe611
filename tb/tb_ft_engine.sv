// tb_ft_engine: the complete transform path at 16 points. Bytes are offered
// on a 25 MHz clock with random gaps; after frame_done (100 MHz) every
// magnitude is read back through the 25 MHz port and compared with an
// integer reference: quantised-cosine DFT, scaling and saturation, squared
// magnitude and truncated square root. A pure tone must show its peak in
// the right bin.
module tb_ft_engine;
  localparam int N = 16, SH = $clog2(N) + 7;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk_25 = 0, clk_100 = 0, rst_25 = 1;
  logic byte_available = 0;
  logic [7:0] music_byte = 0;
  logic [3:0] addr = 0;
  logic [31:0] amp_out;
  logic frame_done;
  always #20 clk_25 = ~clk_25;
  always #5 clk_100 = ~clk_100;

  ft_engine #(.N(N), .FIFO_DEPTH(32)) dut (.clk_25, .rst_25, .clk_100, .byte_available, .music_byte,
    .addr, .amp_out, .frame_done);

  initial begin
    #20000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int frames_done = 0;
  always @(posedge clk_100) if (frame_done) frames_done++;

  function automatic longint qcos(input int i);
    return longint'($floor(32767.0 * $cos(2.0 * 3.14159265358979 * (i % N) / N) + 0.5));
  endfunction
  function automatic longint sat(input longint v);
    longint s = v >>> SH;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return s;
  endfunction
  function automatic longint isqrt(input longint x);
    longint r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  int x [N];
  longint expm [N];
  initial begin
    longint re, im;
    int peak;
    repeat (4) @(negedge clk_25);
    rst_25 = 0;
    repeat (4) @(negedge clk_25);
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < N; i++) begin
        repeat ($urandom % 4) @(negedge clk_25);
        @(negedge clk_25);
        music_byte = (f == 0) ? 8'(128 + int'(100.0 * $cos(2.0 * 3.14159265358979 * 3 * i / N)))
                              : 8'($urandom);
        x[i] = int'(music_byte) - 128;
        byte_available = 1;
        @(negedge clk_25) byte_available = 0;
      end
      for (int k = 0; k < N; k++) begin
        re = 0; im = 0;
        for (int n = 0; n < N; n++) begin
          re += x[n] * qcos(n * k);
          im -= x[n] * qcos(n * k - N / 4 + N);
        end
        expm[k] = isqrt(sat(re) * sat(re) + sat(im) * sat(im));
      end
      while (frames_done <= f) @(negedge clk_25);
      peak = 0;
      for (int k = 0; k < N; k++) begin
        @(negedge clk_25) addr = 4'(k);
        @(negedge clk_25);
        check(longint'(amp_out) == expm[k], $sformatf("frame %0d bin %0d got %0d exp %0d", f, k, amp_out, expm[k]));
        if (f == 0 && k > 0 && k < N / 2 && amp_out > 1000) peak = k;
      end
      if (f == 0) check(peak == 3, $sformatf("tone peak in bin %0d", peak));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
