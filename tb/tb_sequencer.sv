// Testbench for sequencer, with short timing so that every path is reached:
// the clear of the store after reset, live pass-through in Idle, recording
// with simultaneous hits (one command), the recorded words and waits, the
// channel-full stop, playback with its waits and loop, stop by start/stop,
// channel up/down with wrap-around (restarting the timer), abort by the
// mode switch and the
// overflow filler command. The store is checked through its array; the
// playback through the trigger outputs and their timing.
module tb_sequencer;
  import drum_pkg::*;
  localparam int PS = 16, HOLD = 20, DB = 8, CH_LEN = 5, NUM_CH = 3;
  logic clk = 0, rst = 1;
  drum_mask_t drum_btn = '0, triggers;
  logic start_btn = 0, up_btn = 0, down_btn = 0, mode_sw = 0;
  logic led_record, led_active;
  logic [1:0] channel;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_passthru = 0, n_gather = 0, n_full = 0, n_loop = 0, n_wrap = 0,
      n_modeabort = 0, n_filler = 0, n_stop = 0;

  sequencer #(.NUM_CH(NUM_CH), .CH_LEN(CH_LEN), .TIMER_PRESCALE(PS),
              .HOLD_CYCLES(HOLD), .DEBOUNCE_CYCLES(DB)) dut (
    .clk(clk), .rst(rst), .drum_btn(drum_btn), .start_stop_btn(start_btn),
    .ch_up_btn(up_btn), .ch_down_btn(down_btn), .play_mode_sw(mode_sw),
    .triggers(triggers), .led_record(led_record), .led_active(led_active),
    .channel(channel));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  task automatic wait_clk(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic push(ref logic b);
    b = 1; wait_clk(DB + 6); b = 0; wait_clk(DB + 6);
  endtask

  function automatic seq_cmd_t word(int ch, int i);
    return dut.u_store.mem[ch * CH_LEN + i];
  endfunction

  // press drums (mask), hold for `len` clocks, release
  task automatic hit(drum_mask_t m, int len);
    drum_btn = m; wait_clk(len); drum_btn = '0; wait_clk(10);
  endtask

  initial begin
    longint t_hit1, t_hit2, t_fire [$];
    drum_mask_t fire_mask [$];
    int idx;
    wait_clk(3);
    rst = 0;
    wait_clk(NUM_CH * CH_LEN + 5);
    for (int i = 0; i < NUM_CH * CH_LEN; i++)
      check(word(0, i) == '0, $sformatf("word %0d not cleared after reset", i));
    check(led_record == 1 && led_active == 0 && channel == 0, "reset state");

    // Idle: live pass-through
    drum_btn = 6'b001000; wait_clk(4);
    check(triggers == 6'b001000, "idle pass-through");
    if (triggers == 6'b001000) n_passthru++;
    drum_btn = '0; wait_clk(4);
    check(triggers == '0, "idle pass-through release");

    // Record into channel 0: two hits, the second with two drums together
    push(start_btn);
    check(led_active == 1, "recording active");
    wait_clk(40 * PS);
    t_hit1 = cyc;
    drum_btn = 6'b000001; wait_clk(HOLD + 6);
    check(triggers == 6'b000001, "record: trigger follows the hit");
    wait_clk(30); drum_btn = '0; wait_clk(10);
    check(triggers == '0, "record: trigger released");
    wait_clk(100 * PS - 46 - HOLD);
    // buttons 1 and 2 struck a few clocks apart are one hit
    drum_btn = 6'b000010; wait_clk(5); drum_btn = 6'b000110; wait_clk(HOLD + 10);
    drum_btn = '0; wait_clk(10);
    push(start_btn);
    check(led_active == 0, "recording stopped by start/stop");
    if (led_active == 0) n_stop++;
    check(word(0, 0).drum_id == 6'b000001, $sformatf("word 0 drums %b", word(0, 0).drum_id));
    check(word(0, 1).drum_id == 6'b000110, $sformatf("word 1 drums %b", word(0, 1).drum_id));
    if (word(0, 1).drum_id == 6'b000110) n_gather++;
    check(word(0, 2) == '0, "word 2 empty");
    // waits: the first from the start press, the second 100 ticks later
    check(int'(word(0, 1).timer) >= 98 && int'(word(0, 1).timer) <= 101,
          $sformatf("second wait %0d ticks, expected about 100", word(0, 1).timer));
    check(int'(word(0, 0).timer) >= 40 && int'(word(0, 0).timer) <= 45,
          $sformatf("first wait %0d ticks, expected about 41", word(0, 0).timer));

    // Play channel 0 and watch the triggers for two loops
    mode_sw = 1; wait_clk(DB + 6);
    check(led_record == 0, "play mode");
    push(start_btn);
    check(led_active == 1, "playing");
    wait_clk(200 * PS * 2 + 2000);
    push(start_btn);
    check(led_active == 0, "playback stopped");

    // Channel full: channel 1 of 5 commands stops recording by itself
    wait_clk(50 * PS);
    push(up_btn);
    check(channel == 1, "channel up");
    check(int'(dut.elapsed) <= 2, $sformatf("timer not restarted by channel change (%0d)", dut.elapsed));
    mode_sw = 0; wait_clk(DB + 6);
    push(start_btn);
    for (int i = 0; i < CH_LEN; i++) hit(6'b100000, HOLD + 20);
    wait_clk(5);
    check(led_active == 0, "recording stops when the channel is full");
    if (led_active == 0) n_full++;
    for (int i = 0; i < CH_LEN; i++)
      check(word(1, i).drum_id == 6'b100000, "channel 1 word");
    check(word(0, 0).drum_id == 6'b000001, "channel 0 untouched");

    // channel wrap-around
    push(up_btn); check(channel == 2, "channel 2");
    push(up_btn); check(channel == 0, "wrap up to 0");
    push(down_btn); check(channel == 2, "wrap down to 2");
    if (channel == 2) n_wrap++;
    push(down_btn); push(down_btn); check(channel == 0, "back to 0");

    // mode switch aborts a recording in channel 2
    push(down_btn);
    push(start_btn);
    check(led_active == 1, "recording channel 2");
    mode_sw = 1; wait_clk(DB + 6);
    check(led_active == 0, "mode switch stops recording");
    if (led_active == 0) n_modeabort++;

    // overflow filler: record channel 2, wait past 65536 ticks, then hit
    mode_sw = 0; wait_clk(DB + 6);
    push(start_btn);
    wait_clk(65536 * PS + 100);
    hit(6'b010000, HOLD + 10);
    push(start_btn);
    check(word(2, 0).drum_id == '0 && word(2, 0).timer == 16'hFFFF, "overflow filler command");
    if (word(2, 0).timer == 16'hFFFF) n_filler++;
    check(word(2, 1).drum_id == 6'b010000, "hit after the filler");
    check(int'(word(2, 1).timer) < 20, $sformatf("wait after filler %0d", word(2, 1).timer));

    check(n_passthru > 0 && n_gather > 0 && n_full > 0 && n_wrap > 0 &&
          n_modeabort > 0 && n_filler > 0 && n_stop > 0 && n_loop >= 2,
          $sformatf("mechanisms pass=%0d gather=%0d full=%0d wrap=%0d abort=%0d filler=%0d stop=%0d loop=%0d",
                    n_passthru, n_gather, n_full, n_wrap, n_modeabort, n_filler, n_stop, n_loop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Playback monitor: trigger rising edges while playing, with their times.
  // The recorded waits were about 41 and 100 ticks; the three empty words
  // fire with no drums, each costing HOLD clocks, before the loop restarts.
  drum_mask_t prev_trig = '0;
  longint last_fire = -1;
  int fires = 0;
  always @(negedge clk) begin
    if (led_active && !led_record && triggers != '0 && prev_trig == '0) begin
      fires++;
      if (triggers == 6'b000110) begin
        check(last_fire >= 0 && (cyc - last_fire) >= 99 * PS && (cyc - last_fire) <= 102 * PS,
              $sformatf("playback gap %0d clocks, expected about %0d", cyc - last_fire, 100 * PS));
      end else if (triggers == 6'b000001) begin
        if (last_fire >= 0) begin
          // loop: empty words then the first wait again
          check((cyc - last_fire) >= 40 * PS && (cyc - last_fire) <= 46 * PS + 4 * HOLD,
                $sformatf("loop gap %0d clocks", cyc - last_fire));
          n_loop++;
        end
      end else begin
        check(0, $sformatf("unexpected trigger mask %b", triggers));
      end
      last_fire = cyc;
    end
    if (!led_active) last_fire = -1;
    prev_trig = triggers;
  end
endmodule
