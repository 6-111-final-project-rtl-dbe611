// tb_playlist_controller: skip forward and backward step through the three
// songs with the right start and next addresses, saturate at the ends,
// wait for the skip request to end, and pulse skip_out once per change.
module tb_playlist_controller;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, fwd = 0, back = 0, skip;
  logic [1:0] idx;
  logic [31:0] sa, na;
  int skips = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (skip && !rst) skips++;

  playlist_controller dut (.clk, .rst, .skip_fwd(fwd), .skip_back(back), .skip_out(skip),
                           .song_idx(idx), .start_addr(sa), .next_addr(na));

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] addr [4] = '{32'h200, 32'hBB8200, 32'h11FEC00, 32'h1F68200};

  task automatic press(input bit forward, input int hold, input int exp_idx);
    int n;
    n = skips;
    @(negedge clk) if (forward) fwd = 1; else back = 1;
    repeat (hold) @(negedge clk);
    check(skips == n, "no change while the request lasts");
    fwd = 0; back = 0;
    repeat (3) @(negedge clk);
    check(skips == n + 1, "one skip pulse");
    check(idx == 2'(exp_idx) && sa == addr[exp_idx] && na == addr[exp_idx + 1],
          $sformatf("song %0d: start %h next %h", idx, sa, na));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(idx == 0 && sa == 32'h200 && na == 32'hBB8200, "reset song");
    press(1, 1, 1);
    press(1, 5, 2);
    press(1, 1, 2);   // stays on the last song
    press(0, 1, 1);
    press(0, 3, 0);
    press(0, 1, 0);   // stays on the first song
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
