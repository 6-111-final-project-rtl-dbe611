// tb_sqrt_unit: compares the root of random and edge-case 32-bit values
// against a reference (largest r with r*r <= x), checks the fixed latency
// and that in_ready drops while a root is being computed.
module tb_sqrt_unit;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0;
  logic [31:0] in_data = 0;
  logic in_ready, out_valid, out_last;
  logic [23:0] out_data;
  always #5 clk = ~clk;

  sqrt_unit dut (.clk, .rst, .in_valid, .in_ready, .in_data, .in_last, .out_valid, .out_data, .out_last);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint ref_root(input longint x);
    longint r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  initial begin
    logic [31:0] x;
    int lat;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      case (i)
        0: x = 0; 1: x = 1; 2: x = 2; 3: x = 32'hFFFF_FFFF; 4: x = 32'hFFFE_0001; 5: x = 32'hFFFE_0000;
        6: x = 32'h8000_0000;
        default: x = (i % 2) ? $urandom : ($urandom % 70000);
      endcase
      @(negedge clk);
      check(in_ready, "ready when idle");
      in_valid = 1; in_data = x; in_last = (i % 5) == 0;
      @(negedge clk);
      in_valid = 0; in_data = $urandom;
      check(!in_ready, "busy after accept");
      lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      check(lat == 17, $sformatf("latency %0d", lat));
      check(longint'(out_data) == ref_root(longint'(x)) && out_last == ((i % 5) == 0),
            $sformatf("sqrt(%0d) got %0d exp %0d", x, out_data, ref_root(longint'(x))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
