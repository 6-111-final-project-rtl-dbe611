// tb_serial_tx: the line carries start bit, eight data bits LSB first and a
// stop bit, each exactly DIVISOR clocks, sampled in the middle of each bit.
module tb_serial_tx;
  localparam int DIV = 12;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, trig = 0, line, busy;
  logic [7:0] val = 0;
  always #5 clk = ~clk;

  serial_tx #(.DIVISOR(DIV)) dut (.clk, .rst, .trigger_in(trig), .val_in(val), .data_out(line), .busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    @(negedge clk) begin val = b; trig = 1; end
    @(negedge clk) trig = 0;            // the start bit began at the edge before
    for (int bit_i = 0; bit_i < 10; bit_i++) begin
      repeat (DIV / 2 - 1) @(negedge clk);   // middle of the bit
      check(line == frame[bit_i], $sformatf("byte %02h bit %0d", b, bit_i));
      repeat (DIV - DIV / 2 + 1) @(negedge clk);
    end
    check(!busy && line, "idle after the stop bit");
  endtask

  int len;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check(line == 1'b1, "line idles high");
    send(8'hA5);
    send(8'h3C);
    // frame length in clocks
    @(negedge clk) begin val = 8'h00; trig = 1; end
    @(negedge clk) trig = 0;
    len = 1;
    while (busy) begin @(negedge clk); len++; end
    check(len == 10 * DIV + 1, $sformatf("frame length %0d clocks", len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
