// tb_audio: the audio subsystem with a behavioural SD controller. Checks
// that a play command starts samples at the sample rate, that the PWM duty
// cycle follows the volume-scaled sample, that volume steps shift the
// sample, that the speed code changes the sample period, and that skip
// forward moves reading to the next song's address. A random run of
// commands is then compared with a model of the volume step, the song
// number and the play state, with the duty cycle checked at random points.
module tb_audio;
  import gmp_pkg::*;
  localparam int DEPTH = 32, BLK = 8, BASE = 300;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst = 1;
  ctrl_pulses_t ctrl = '0;
  logic [1:0] speed_sel = 0;
  logic sd_ready, sd_ba, sd_rd, aud_pwm, aud_sd, bav, playing, tick;
  logic [7:0] sd_dout, mbyte, level;
  logic [31:0] sd_addr, last_addr;
  volume_t volume;
  speed_t speed;
  logic [1:0] song;
  int reads;
  always #5 clk = ~clk;

  fake_sd #(.BLOCK(BLK), .BYTE_GAP(2), .START_DELAY(3), .CRC_DELAY(2)) sd (
    .clk, .reset(rst), .rd(sd_rd), .address(sd_addr), .ready(sd_ready), .dout(sd_dout),
    .byte_available(sd_ba), .reads, .last_addr);

  audio #(.FIFO_DEPTH(DEPTH), .BLOCK_BYTES(BLK), .BASE_PERIOD(BASE)) dut (
    .clk, .rst, .ctrl, .speed_sel, .sd_ready, .sd_dout, .sd_byte_available(sd_ba), .sd_rd, .sd_addr,
    .aud_pwm, .aud_sd, .byte_available_out(bav), .music_byte(mbyte), .level, .volume, .speed,
    .song_idx(song), .playing, .sample_tick(tick));

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic command(input int which);
    @(negedge clk);
    case (which)
      0: ctrl.play = 1; 1: ctrl.pause = 1; 2: ctrl.skip_fwd = 1;
      3: ctrl.skip_back = 1; 4: ctrl.vol_up = 1; default: ctrl.vol_down = 1;
    endcase
    @(negedge clk) ctrl = '0;
  endtask

  // duty cycle over one PWM period right after a sample change
  task automatic check_duty(input int shift);
    int high;
    logic [7:0] s;
    @(posedge clk); while (!dut.sample_valid) @(posedge clk);
    repeat (2) @(posedge clk);
    s = dut.sample;
    high = 0;
    repeat (256) begin @(negedge clk); if (aud_pwm) high++; end
    check(high == int'(s >> shift), $sformatf("duty %0d for sample %0d shift %0d", high, s, shift));
  endtask

  int t0, period;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (300) @(negedge clk);
    check(aud_sd == 1'b1, "amplifier enabled");
    check(!playing, "paused after reset");
    command(0);
    check(playing, "play command starts playback");
    check_duty(0);
    command(5);                    // volume down: shift by one
    check(volume == VOL_3QUART, "volume stepped down");
    check_duty(1);
    command(5);
    check_duty(3);
    // sample period at 1.0x and 2.0x
    @(posedge clk); while (!dut.sample_valid) @(posedge clk);
    t0 = 0;
    @(posedge clk); while (!dut.sample_valid) begin @(posedge clk); t0++; end
    check(t0 + 1 == BASE, $sformatf("1.0x period %0d", t0 + 1));
    @(negedge clk) speed_sel = 2'b01;
    repeat (2) begin @(posedge clk); while (!dut.sample_valid) @(posedge clk); end
    t0 = 0;
    @(posedge clk); while (!dut.sample_valid) begin @(posedge clk); t0++; end
    check(t0 + 1 == BASE / 2, $sformatf("2.0x period %0d", t0 + 1));
    // skip forward: the next song is read
    command(2);
    repeat (5) @(negedge clk);
    check(song == 2'd1 && !playing, "skip selects song 1 and pauses");
    repeat (400) @(negedge clk);
    check(last_addr >= 32'hBB8200 && last_addr < 32'hBB8200 + 32'(DEPTH), $sformatf("reading the new song at %h", last_addr));
    @(negedge clk) speed_sel = 2'b00;   // a sample must outlast one PWM period
    begin
      int m_vol = 2, m_song = 1, shifts [5] = '{7, 5, 3, 1, 0};
      bit m_play = 0;
      int bad = 0;
      repeat (60) begin
        int c;
        c = int'($urandom % 6);
        command(c);
        case (c)
          0: m_play = 1;
          1: m_play = 0;
          2: begin m_play = 0; if (m_song < 2) m_song++; end
          3: begin m_play = 0; if (m_song > 0) m_song--; end
          4: if (m_vol < 4) m_vol++;
          default: if (m_vol > 0) m_vol--;
        endcase
        repeat (5) @(negedge clk);
        if (int'(volume) != m_vol || int'(song) != m_song || playing != m_play) begin
          bad++;
          $display("FAIL: command %0d: volume %0d/%0d song %0d/%0d playing %0d/%0d",
                   c, volume, m_vol, song, m_song, playing, m_play);
        end
        if (m_play && $urandom % 4 == 0) begin
          repeat (300) @(negedge clk);
          check_duty(shifts[m_vol]);
        end
      end
      check(bad == 0, $sformatf("random commands follow the model (%0d mismatches)", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
