// tb_magnitude_bram: writes random words on a 100 MHz port and reads them
// back on an unrelated 25 MHz port, checking the one-clock registered read
// and that unwritten addresses keep their earlier contents.
module tb_magnitude_bram;
  localparam int W = 32, D = 64;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk_a = 0, clk_b = 0, we_a = 0;
  logic [5:0] addr_a = 0, addr_b = 0;
  logic [W-1:0] din_a = 0, dout_b;
  logic [W-1:0] model [D];
  always #5 clk_a = ~clk_a;
  always #20 clk_b = ~clk_b;

  magnitude_bram #(.WIDTH(W), .DEPTH(D)) dut (.clk_a, .we_a, .addr_a, .din_a, .clk_b, .addr_b, .dout_b);

  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < D; i++) begin
        if (pass == 0 || ($urandom % 2)) begin
          @(negedge clk_a);
          we_a = 1; addr_a = 6'(i); din_a = $urandom;
          model[i] = din_a;
        end
      end
      @(negedge clk_a) we_a = 0;
      for (int i = 0; i < D; i++) begin
        @(negedge clk_b) addr_b = 6'($urandom);
        @(negedge clk_b);
        check(dout_b == model[addr_b], $sformatf("addr %0d got %h exp %h", addr_b, dout_b, model[addr_b]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
