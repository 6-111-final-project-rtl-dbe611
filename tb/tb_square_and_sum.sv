// tb_square_and_sum: random signed pairs, including the extreme values, go
// through the pipeline with random stalls; every output is compared against
// re*re + im*im in order, and last must travel with its word.
module tb_square_and_sum;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0, out_ready = 0;
  logic [31:0] in_data = 0;
  logic in_ready, out_valid, out_last;
  logic [31:0] out_data;
  always #5 clk = ~clk;

  square_and_sum dut (.clk, .rst, .in_valid, .in_ready, .in_data, .in_last, .out_valid, .out_ready,
    .out_data, .out_last);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [32:0] q[$];
  int sent = 0;
  // producer and checker both act on the clock edge where the transfer happens
  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      q.push_back({in_last, 32'(longint'($signed(in_data[31:16])) * $signed(in_data[31:16])
                             + longint'($signed(in_data[15:0])) * $signed(in_data[15:0]))});
      sent++;
    end
    if (out_valid && out_ready) begin
      logic [32:0] e;
      e = q.pop_front();
      check(out_data == e[31:0] && out_last == e[32], $sformatf("got %h exp %h", out_data, e[31:0]));
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    while (sent < 400) begin
      @(negedge clk);
      out_ready = ($urandom % 4) != 0;
      if (!in_valid || in_ready) begin  // previous word taken at the last edge
        in_valid = ($urandom % 3) != 0;
        case ($urandom % 6)
          0: in_data = 32'h8000_8000;
          1: in_data = 32'h7FFF_8000;
          default: in_data = $urandom;
        endcase
        in_last = ($urandom % 8) == 0;
      end
    end
    @(negedge clk) begin in_valid = 0; out_ready = 1; end
    repeat (5) @(negedge clk);
    check(q.size() == 0, "all words came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
