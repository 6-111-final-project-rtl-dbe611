// tb_accel_conditioner: signs follow the latched two's complement samples,
// magnitudes settle to |sample|/2 after repeated samples, and samples are
// taken only on the rising edge of data_ready. A reference model of the
// filter, sum <= sum - sum/8 + |x| with output sum/16, is then compared
// exactly against random samples.
module tb_accel_conditioner;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, ready = 0;
  logic [11:0] ax = 0, ay = 0, az = 0, xm, ym, zm;
  logic xs, ys, zs;
  always #5 clk = ~clk;

  accel_conditioner dut (.clk, .rst, .data_ready(ready), .accel_x(ax), .accel_y(ay), .accel_z(az),
    .x_mag_filtered(xm), .y_mag_filtered(ym), .z_mag_filtered(zm), .x_sign(xs), .y_sign(ys), .z_sign(zs));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int msum [3] = '{0, 0, 0};

  function automatic int mag(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic sample(input int x, input int y, input int z);
    int v [3];
    v = '{x, y, z};
    foreach (msum[i]) msum[i] = (msum[i] - (msum[i] >> 3) + mag(v[i])) % 32768;
    @(negedge clk); ax = 12'(x); ay = 12'(y); az = 12'(z); ready = 1;
    repeat (3) @(negedge clk);   // held several clocks: one sample only
    ready = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    sample(-400, 300, -1000);
    check(xs == 1 && ys == 0 && zs == 1, "signs of first sample");
    // one sample from zero: sum = |v|, out = |v|/16
    check(xm == 12'd25 && ym == 12'(300/16) && zm == 12'(1000/16),
          $sformatf("one-sample outputs %0d %0d %0d", xm, ym, zm));
    for (int i = 0; i < 80; i++) sample(-400, 300, -1000);
    check(xm >= 12'd197 && xm <= 12'd200, $sformatf("x settles to 200: %0d", xm));
    check(ym >= 12'd147 && ym <= 12'd150, $sformatf("y settles to 150: %0d", ym));
    check(zm >= 12'd497 && zm <= 12'd500, $sformatf("z settles to 500: %0d", zm));
    sample(5, -5, 5);
    check(xs == 0 && ys == 1 && zs == 0, "signs of second sample");
    // large magnitudes: only bit 11 carries the sign
    sample(1500, -1500, 1500);
    check(xs == 0 && ys == 1 && zs == 0, "signs of large samples");
    repeat (60) begin
      int x, y, z;
      x = int'($urandom % 4095) - 2047;
      y = int'($urandom % 4095) - 2047;
      z = int'($urandom % 4095) - 2047;
      sample(x, y, z);
      check(xm == 12'(msum[0] >> 4) && ym == 12'(msum[1] >> 4) && zm == 12'(msum[2] >> 4)
            && xs == (x < 0) && ys == (y < 0) && zs == (z < 0),
            $sformatf("random %0d %0d %0d: got %0d %0d %0d", x, y, z, xm, ym, zm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
