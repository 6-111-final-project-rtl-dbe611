// tb_sync_fifo: random pushes and pops against a queue model, including
// full and empty, the count, and clear.
module tb_sync_fifo;
  localparam int W = 8, D = 16;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, clear = 0, wr = 0, rd = 0, full, empty;
  logic [W-1:0] din = 0, dout;
  logic [$clog2(D):0] count;
  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .clear, .wr_en(wr), .din, .rd_en(rd),
                                         .dout, .full, .empty, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] q [$];
  int fulls = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(int'(count) == q.size() && full == (q.size() == D) && empty == (q.size() == 0), "flags and count");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %02h expected %02h", dout, q[0]));
      if (full) fulls++;
      // bias toward filling in the first half, draining in the second
      wr = ($urandom % 100) < ((i % 400) < 200 ? 70 : 30) && !full;
      rd = ($urandom % 100) < ((i % 400) < 200 ? 30 : 70) && !empty;
      din = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(din);
    end
    check(fulls > 0, "reached full");
    @(negedge clk) begin wr = !full; rd = 0; din = 8'h5A; end
    @(negedge clk) begin wr = 0; clear = 1; end
    @(negedge clk) clear = 0;
    check(empty && count == 0, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
