// Workload testbench for drum_machine: all three storage channels in use.
// With shortened timing (2 MHz clock, 64-clock timer tick, 2000-clock hold),
// it records a different pattern into each channel: two single hits in
// channel 0, a full channel of 25 hits in channel 1 (recording stops by
// itself), and a two-drum hit then a single hit in channel 2. It then plays
// every channel for two loops and checks that the fired masks come back in
// recorded order, that no channel leaks into another, and that each fire
// starts its synth channels.
module tb_drum_machine_channels;
  import drum_pkg::*;
  localparam int CLK_HZ = 2_000_000, PS = 64, HOLD = 2000, DB = 200;
  localparam int SPS = CLK_HZ / 44100 + 1;

  logic clk = 0, rst = 1;
  drum_mask_t drum_btn = '0, mute = '0, triggers, playing;
  logic start_btn = 0, up_btn = 0, down_btn = 0, mode_sw = 0;
  logic [11:0] dac_out;
  logic dac_strobe, led_record, led_active;
  logic [1:0] channel;
  logic [7:0] leds;
  int checks = 0, failures = 0;

  drum_machine #(.CLK_HZ(CLK_HZ), .TIMER_PRESCALE(PS), .HOLD_CYCLES(HOLD),
                 .DEBOUNCE_CYCLES(DB)) dut (
    .clk(clk), .rst(rst), .drum_btn(drum_btn), .start_stop_btn(start_btn),
    .ch_up_btn(up_btn), .ch_down_btn(down_btn), .play_mode_sw(mode_sw), .mute(mute),
    .dac_out(dac_out), .dac_strobe(dac_strobe), .led_record(led_record),
    .led_active(led_active), .channel(channel), .leds(leds), .triggers(triggers),
    .playing(playing));

  always #25 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  task automatic wait_clk(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic push(ref logic b);
    b = 1; wait_clk(DB + 10); b = 0; wait_clk(DB + 10);
  endtask

  task automatic hit(drum_mask_t m, int gap_ticks);
    wait_clk(gap_ticks * PS);
    drum_btn = m; wait_clk(HOLD + 3 * SPS); drum_btn = '0; wait_clk(20);
  endtask

  // fired masks while playing
  drum_mask_t fired [$];
  drum_mask_t prev = '0;
  always @(negedge clk) begin
    if (led_active && !led_record && triggers != '0 && prev == '0) begin
      fired.push_back(triggers);
      fork
        begin
          automatic logic [5:0] m = triggers;
          repeat (3 * SPS) @(negedge clk);
          check((playing & m) == m, $sformatf("mask %b did not start its channels", m));
        end
      join_none
    end
    prev = triggers;
  end

  drum_mask_t pattern [3][$];

  task automatic play_and_compare(int ch, int loops);
    int n;
    fired.delete();
    push(start_btn);
    n = pattern[ch].size();
    while (fired.size() < loops * n) @(negedge clk);
    push(start_btn);
    check(!led_active, "playback stopped");
    for (int i = 0; i < loops * n; i++)
      check(fired[i] == pattern[ch][i % n],
            $sformatf("channel %0d fire %0d: %b expected %b", ch, i, fired[i], pattern[ch][i % n]));
  endtask

  initial begin
    wait_clk(5);
    rst = 0;
    wait_clk(300);

    // record channel 0
    push(start_btn);
    hit(6'b000001, 30); pattern[0].push_back(6'b000001);
    hit(6'b000010, 40); pattern[0].push_back(6'b000010);
    push(start_btn);
    check(!led_active, "channel 0 recorded");

    // record channel 1 until it is full
    push(up_btn);
    check(channel == 1, "channel 1 selected");
    push(start_btn);
    for (int i = 0; i < 25; i++) begin
      hit(6'b000100, 5 + i); pattern[1].push_back(6'b000100);
    end
    wait_clk(10);
    check(!led_active, "channel 1 full, recording stopped by itself");

    // record channel 2
    push(up_btn);
    check(channel == 2, "channel 2 selected");
    push(start_btn);
    hit(6'b101000, 20); pattern[2].push_back(6'b101000);
    hit(6'b010000, 25); pattern[2].push_back(6'b010000);
    push(start_btn);

    // play each channel for two loops
    mode_sw = 1; wait_clk(DB + 10);
    play_and_compare(2, 2);
    push(up_btn);
    check(channel == 0, "channel 0 selected");
    play_and_compare(0, 2);
    push(up_btn);
    play_and_compare(1, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
