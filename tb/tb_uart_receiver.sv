// tb_uart_receiver: frames driven by the testbench at DIVISOR clocks per bit
// are received correctly, back to back; a short glitch and a frame with a
// bad stop bit produce no byte. byte_available lasts one clock. A run of
// random bytes with random idle gaps between frames ends the test.
module tb_uart_receiver;
  localparam int DIV = 16;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, rx = 1, avail;
  logic [7:0] b;
  int got = 0, pulse_len = 0, max_pulse = 0;
  logic [7:0] last_byte;
  always #5 clk = ~clk;

  uart_receiver #(.DIVISOR(DIV)) dut (.clk, .rst, .rx_in(rx), .byte_out(b), .byte_available(avail));

  always @(posedge clk) if (!rst) begin
    if (avail) begin got++; last_byte = b; pulse_len++; end else pulse_len = 0;
    if (pulse_len > max_pulse) max_pulse = pulse_len;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic frame(input logic [7:0] v, input logic stop_bit);
    logic [9:0] f;
    f = {stop_bit, v, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) rx = f[i];
      repeat (DIV - 1) @(negedge clk);
    end
    @(negedge clk) rx = 1'b1;
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      n = got;
      frame(v, 1'b1);
      repeat (DIV) @(negedge clk);
      check(got == n + 1 && last_byte == v, $sformatf("byte %02h received as %02h", v, last_byte));
    end
    // back to back, no idle time
    n = got;
    frame(8'h21, 1'b1); frame(8'h10, 1'b1);
    repeat (2 * DIV) @(negedge clk);
    check(got == n + 2 && last_byte == 8'h10, "two frames back to back");
    // glitch shorter than half a bit
    n = got;
    @(negedge clk) rx = 0;
    repeat (DIV / 4) @(negedge clk);
    rx = 1;
    repeat (12 * DIV) @(negedge clk);
    check(got == n, "glitch rejected");
    // bad stop bit
    frame(8'h55, 1'b0);
    repeat (3 * DIV) @(negedge clk);
    check(got == n, "frame with a low stop bit dropped");
    repeat (40) begin
      logic [7:0] v;
      v = 8'($urandom);
      n = got;
      repeat (int'($urandom % (2 * DIV))) @(negedge clk);
      frame(v, 1'b1);
      repeat (DIV) @(negedge clk);
      check(got == n + 1 && last_byte == v, $sformatf("random byte %02h received as %02h", v, last_byte));
    end
    check(max_pulse == 1, "byte_available lasts one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
