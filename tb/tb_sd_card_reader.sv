// tb_sd_card_reader: with a behavioural SD controller, block reads are
// requested only when the FIFO has room for a whole block, addresses step
// by one block, the FIFO fills to its depth, samples come out in order one
// per tick while playing and not while paused, a skip flushes the FIFO and
// restarts at the new address, and reading stops at the end of the song.
// A last song is played with ticks at random spacing: every tick gives the
// next sample in order while blocks keep refilling the FIFO.
module tb_sd_card_reader;
  localparam int DEPTH = 32, BLK = 8;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1, play = 0, pause = 0, skip = 0, tick = 0;
  logic [31:0] start_addr = 32'h100, next_addr = 32'h100 + 32'(BLK * 12);
  logic sd_ready, sd_ba, sd_rd, sval, bav, playing, done;
  logic [7:0] sd_dout, sample, mbyte;
  logic [31:0] sd_addr, last_addr;
  logic [$clog2(DEPTH):0] count;
  int reads;
  always #5 clk = ~clk;

  fake_sd #(.BLOCK(BLK), .BYTE_GAP(2), .START_DELAY(3), .CRC_DELAY(2)) sd (
    .clk, .reset(rst), .rd(sd_rd), .address(sd_addr), .ready(sd_ready), .dout(sd_dout),
    .byte_available(sd_ba), .reads, .last_addr);

  sd_card_reader #(.FIFO_DEPTH(DEPTH), .BLOCK_BYTES(BLK)) dut (
    .clk, .rst, .play, .pause, .skip, .start_addr, .next_addr, .sample_tick(tick),
    .sd_ready, .sd_dout, .sd_byte_available(sd_ba), .sd_rd, .sd_addr,
    .sample_out(sample), .sample_valid(sval), .byte_available_out(bav), .music_byte(mbyte),
    .playing, .song_done(done), .fifo_count(count));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // a request must only happen with room for a whole block
  int bad_req = 0, samples_seen = 0, order_err = 0, fwd_bytes = 0;
  int pos = 0;   // position of the next sample in the song
  always @(posedge clk) if (!rst) begin
    if (sd_rd && sd_ready && count > (DEPTH - BLK)) bad_req++;
    if (bav) fwd_bytes++;
    if (sval) begin
      samples_seen++;
      // byte i of the song's k-th block is start_addr/BLK + k + i
      if (sample != 8'(start_addr / BLK + pos / BLK + pos % BLK)) order_err++;
      pos++;
    end
  end

  initial begin
    int n0, s0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (400) @(negedge clk);
    check(count == DEPTH, $sformatf("FIFO filled while paused: %0d", count));
    check(reads == DEPTH / BLK, $sformatf("%0d block reads to fill", reads));
    check(last_addr == start_addr + 32'((DEPTH / BLK - 1) * BLK), "block addresses step by one block");
    check(samples_seen == 0, "nothing played while paused");
    // play: one sample per tick
    @(negedge clk) play = 1;
    @(negedge clk) play = 0;
    s0 = samples_seen;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      repeat (6) @(negedge clk);
    end
    check(samples_seen == s0 + 40, $sformatf("one sample per tick: %0d", samples_seen - s0));
    check(order_err == 0, $sformatf("samples in order (%0d errors)", order_err));
    // pause: ticks ignored
    @(negedge clk) pause = 1;
    @(negedge clk) pause = 0;
    s0 = samples_seen;
    repeat (5) begin @(negedge clk) tick = 1; @(negedge clk) tick = 0; end
    check(samples_seen == s0 && !playing, "paused: no samples");
    // skip: flush and restart at the new address
    start_addr = 32'h800; next_addr = 32'h800 + 32'(BLK * 3);
    @(negedge clk) skip = 1;
    @(negedge clk) begin skip = 0; pos = 0; end
    check(count == 0 && !playing, "skip flushes the FIFO and pauses");
    repeat (300) @(negedge clk);
    check(last_addr == 32'h800 + 32'(2 * BLK), $sformatf("new song read to its end: %h", last_addr));
    check(done && count == 3 * BLK, $sformatf("reading stops at the end of the song (%0d bytes)", count));
    @(negedge clk) play = 1;
    @(negedge clk) play = 0;
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
    @(negedge clk);
    check(sample == 8'(32'h800 / BLK), $sformatf("first sample of the new song %0d", sample));
    // long song, random tick spacing
    start_addr = 32'h1000; next_addr = 32'h1000 + 32'(BLK * 100);
    @(negedge clk) skip = 1;
    @(negedge clk) begin skip = 0; pos = 0; end
    repeat (400) @(negedge clk);
    @(negedge clk) play = 1;
    @(negedge clk) play = 0;
    s0 = samples_seen; n0 = order_err;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      repeat (6 + int'($urandom % 14)) @(negedge clk);
    end
    check(samples_seen == s0 + 200, $sformatf("random ticks: %0d samples", samples_seen - s0));
    check(order_err == n0, $sformatf("random ticks: samples in order (%0d errors)", order_err - n0));
    check(last_addr > 32'h1000 + 32'(20 * BLK), $sformatf("blocks refilled while playing: %h", last_addr));
    check(bad_req == 0, "no block requested without room");
    check(fwd_bytes == DEPTH + 40 + 3 * BLK || fwd_bytes >= DEPTH + 3 * BLK, "bytes forwarded to the transform path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
