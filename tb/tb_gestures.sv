// tb_gestures: each of the six gestures (X, Y, Z axis, both directions)
// produces the expected control byte with a one-clock done pulse, only
// after the magnitude falls back below the threshold.
module tb_gestures;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1;
  logic [11:0] xm = 0, ym = 0, zm = 0;
  logic xs = 0, ys = 0, zs = 0, done;
  logic [7:0] val;
  logic [2:0] light;
  int done_count = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (done && !rst) done_count++;

  gestures dut (.clk, .rst, .x_mag_filtered(xm), .y_mag_filtered(ym), .z_mag_filtered(zm),
                .x_sign(xs), .y_sign(ys), .z_sign(zs), .val_out(val), .done, .axis_light(light));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // axis 0/1/2, neg direction, expected byte
  task automatic gesture(input int axis, input bit neg, input logic [7:0] expect_byte);
    int n0;
    n0 = done_count;
    @(negedge clk);
    case (axis)
      0: begin xm = 12'h0C0; xs = neg; end
      1: begin ym = 12'h0C0; ys = neg; end
      default: begin zm = 12'h300; zs = neg; end
    endcase
    repeat (10) @(negedge clk);
    check(done_count == n0, "no byte while the tilt lasts");
    xm = 12'h010; ym = 12'h010; zm = 12'h010;
    repeat (5) @(negedge clk);
    check(done_count == n0 + 1, $sformatf("one done pulse, axis %0d", axis));
    check(val == expect_byte, $sformatf("axis %0d neg %0d: byte %02h expected %02h", axis, neg, val, expect_byte));
    check(light == 3'(1 << axis), "axis light");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    gesture(0, 0, 8'b0000_0010);  // volume up
    gesture(0, 1, 8'b0000_0001);  // volume down
    gesture(1, 0, 8'b0000_1000);  // next song
    gesture(1, 1, 8'b0000_0100);  // previous song
    gesture(2, 0, 8'b0010_0000);  // play
    gesture(2, 1, 8'b0001_0000);  // pause
    // below threshold: nothing
    @(negedge clk) xm = 12'h09F;
    repeat (10) @(negedge clk);
    check(done_count == 6, "sub-threshold tilt ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
