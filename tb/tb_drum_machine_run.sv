// Shared body of the drum_machine end-to-end testbenches; FULL selects the
// top's default parameters or shortened timing. See tb_drum_machine.
module tb_drum_machine_run #(parameter bit FULL = 0);
  import drum_pkg::*;
  localparam int CLK_HZ = FULL ? 20_000_000 : 2_000_000;
  localparam int PS     = FULL ? 1024 : 64;     // clocks per timer tick
  localparam int HOLD   = FULL ? 40_000 : 2000;
  localparam int DB     = FULL ? 40_000 : 200;
  localparam int SPS    = CLK_HZ / 44100 + 1;   // clocks per sample, rounded up
  localparam int GAP1   = 60, GAP2 = 150;       // recorded waits in ticks

  logic clk = 0, rst = 1;
  drum_mask_t drum_btn = '0, mute = '0, triggers, playing;
  logic start_btn = 0, up_btn = 0, down_btn = 0, mode_sw = 0;
  logic [11:0] dac_out;
  logic dac_strobe, led_record, led_active;
  logic [1:0] channel;
  logic [7:0] leds;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_live = 0, n_rec = 0, n_gather = 0, n_loop = 0, n_stop = 0, n_wrap = 0,
      n_abort = 0, n_mute = 0, n_retrig = 0, n_end = 0;

  if (FULL) begin : g_full
    drum_machine dut (
      .clk(clk), .rst(rst), .drum_btn(drum_btn), .start_stop_btn(start_btn),
      .ch_up_btn(up_btn), .ch_down_btn(down_btn), .play_mode_sw(mode_sw), .mute(mute),
      .dac_out(dac_out), .dac_strobe(dac_strobe), .led_record(led_record),
      .led_active(led_active), .channel(channel), .leds(leds), .triggers(triggers),
      .playing(playing));
  end else begin : g_short
    drum_machine #(.CLK_HZ(CLK_HZ), .TIMER_PRESCALE(PS), .HOLD_CYCLES(HOLD),
                   .DEBOUNCE_CYCLES(DB)) dut (
      .clk(clk), .rst(rst), .drum_btn(drum_btn), .start_stop_btn(start_btn),
      .ch_up_btn(up_btn), .ch_down_btn(down_btn), .play_mode_sw(mode_sw), .mute(mute),
      .dac_out(dac_out), .dac_strobe(dac_strobe), .led_record(led_record),
      .led_active(led_active), .channel(channel), .leds(leds), .triggers(triggers),
      .playing(playing));
  end

  always #25 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (FULL ? 80_000_000 : 8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  task automatic wait_clk(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic push(ref logic b);
    b = 1; wait_clk(DB + 10); b = 0; wait_clk(DB + 10);
  endtask

  task automatic wait_ticks(int n);
    wait_clk(n * PS);
  endtask

  // Every trigger edge must start exactly its channels within two samples.
  drum_mask_t prev_trig = '0, prev_play = '0;
  int dac_min = 4095, dac_max = 0;
  always @(negedge clk) begin
    drum_mask_t rise;
    rise = triggers & ~prev_trig;
    if (rise != '0) begin
      fork
        begin
          automatic logic [5:0] r = rise;
          automatic logic [5:0] was_on = playing;
          repeat (3 * SPS) @(negedge clk);
          check((playing & r) == r, $sformatf("trigger %b did not start its channels (%b)", r, playing));
          if ((was_on & r) != '0) n_retrig++;
        end
      join_none
    end
    for (int c = 0; c < NUM_DRUMS; c++)
      if (prev_play[c] && !playing[c] && !mute[c]) n_end++;
    prev_trig = triggers;
    prev_play = playing;
    if (dac_out < dac_min) dac_min = int'(dac_out);
    if (dac_out > dac_max) dac_max = int'(dac_out);
  end

  // Playback monitor (play mode, running): masks and gaps.
  longint last_fire = -1;
  int fires = 0;
  drum_mask_t ptrig = '0;
  always @(negedge clk) begin
    if (led_active && !led_record && triggers != '0 && ptrig == '0) begin
      fires++;
      if (triggers == 6'b010100) begin
        check(last_fire >= 0 && (cyc - last_fire) >= (GAP2 - 2) * PS && (cyc - last_fire) <= (GAP2 + 2) * PS,
              $sformatf("playback gap %0d clocks, expected about %0d", cyc - last_fire, GAP2 * PS));
      end else if (triggers == 6'b000001) begin
        if (last_fire >= 0) begin
          // 23 empty commands of HOLD clocks each, then the first wait
          check((cyc - last_fire) >= (GAP1 - 2) * PS + 23 * HOLD &&
                (cyc - last_fire) <= (GAP1 + 4) * PS + 24 * HOLD + 100,
                $sformatf("loop gap %0d clocks", cyc - last_fire));
          n_loop++;
        end
      end else begin
        check(0, $sformatf("unexpected playback mask %b", triggers));
      end
      last_fire = cyc;
    end
    if (!led_active) last_fire = -1;
    ptrig = triggers;
  end

  initial begin
    wait_clk(5);
    rst = 0;
    wait_clk(200);
    check(dac_out == 12'd1535, $sformatf("silent DAC %0d", dac_out));
    check(led_record && !led_active && channel == 0, "reset state");

    // play a drum live in Idle
    drum_btn = 6'b000010; wait_clk(3 * SPS + 10); drum_btn = '0;
    check(playing[1], "live drum sounds");
    if (playing[1]) n_live++;
    wait_clk(20 * SPS);
    check(dac_max > 1535 && dac_min < 1535, "DAC moves while sounding");

    // record channel 0
    push(start_btn);
    check(led_active, "recording");
    wait_ticks(GAP1 - (DB + 10) / PS);
    drum_btn = 6'b000001; wait_clk(HOLD + 3 * SPS); drum_btn = '0; wait_clk(20);
    wait_ticks(GAP2 - (HOLD + 3 * SPS + 20) / PS);
    drum_btn = 6'b000100; wait_clk(7); drum_btn = 6'b010100; wait_clk(HOLD + 3 * SPS);
    drum_btn = '0; wait_clk(20);
    push(start_btn);
    check(!led_active, "recording stopped");
    if (!led_active) n_rec++;

    // play it back for about three loops, mute channel 4 once
    mode_sw = 1; wait_clk(DB + 10);
    check(!led_record, "play mode");
    push(start_btn);
    check(led_active, "playing back");
    wait_ticks(GAP1 + GAP2 + 20);
    // mute channel 4 ten samples after playback fires it
    @(negedge clk iff !triggers[4]);
    @(negedge clk iff triggers[4]);
    wait_clk(10 * SPS);
    mute[4] = 1; wait_clk(2 * SPS); mute[4] = 0;
    check(!playing[4], "mute stops channel 4");
    if (!playing[4]) n_mute++;
    wait_clk(2 * ((GAP1 + GAP2) * PS + 24 * HOLD));
    n_gather = (fires > 0) ? 1 : 0;
    push(start_btn);
    check(!led_active, "playback stopped");
    if (!led_active) n_stop++;
    check(fires >= 6, $sformatf("%0d playback fires", fires));

    // channel buttons with wrap-around
    push(down_btn);
    check(channel == 2, "channel down wraps to 2");
    push(up_btn);
    check(channel == 0, "channel up wraps to 0");
    if (channel == 0) n_wrap++;

    // record in channel 1 and abort with the mode switch
    push(up_btn);
    mode_sw = 0; wait_clk(DB + 10);
    push(start_btn);
    check(led_active && led_record, "recording channel 1");
    mode_sw = 1; wait_clk(DB + 10);
    check(!led_active, "mode switch aborts");
    if (!led_active) n_abort++;

    // everything dies away
    wait_clk(20_500 * SPS);
    check(playing == '0, "all sounds ended");
    check(dac_out == 12'd1535, $sformatf("silent DAC at the end %0d", dac_out));
    check(n_live > 0 && n_rec > 0 && n_gather > 0 && n_loop >= 2 && n_stop > 0 &&
          n_wrap > 0 && n_abort > 0 && n_mute > 0 && n_retrig > 0 && n_end > 0,
          $sformatf("mechanisms live=%0d rec=%0d gather=%0d loop=%0d stop=%0d wrap=%0d abort=%0d mute=%0d retrig=%0d end=%0d",
                    n_live, n_rec, n_gather, n_loop, n_stop, n_wrap, n_abort, n_mute, n_retrig, n_end));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
