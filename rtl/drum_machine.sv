// Drum loop recorder and sequencer: the complete machine.
//
// Nine pushbuttons and a play/record switch drive the sequencer, which
// records and loops drum patterns in three channels. Its six trigger lines
// start the six synth channels of the sound controller, whose mixed 12-bit
// output, updated 44100 times a second, goes to a parallel DAC (offset
// binary, 0 = lowest voltage). Both halves run on the same 20 MHz clock and
// reset. The DAC, its analog filter, the power amplifier and the buttons'
// pulldowns are outside this module; their signals are the ports.
//
// Per-channel `mute` inputs are brought out so that an external source can
// stop a sound early; the sequencer itself never mutes. The split into a
// sequencer and a synthesizer follows the original machine; the single
// clock is this design's choice.
module drum_machine
  import drum_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 20_000_000,
  parameter int unsigned NUM_CH          = 3,
  parameter int unsigned CH_LEN          = 25,
  parameter int unsigned TIMER_PRESCALE  = 1024,
  parameter int unsigned HOLD_CYCLES     = 40_000,
  parameter int unsigned DEBOUNCE_CYCLES = 40_000
) (
  input  logic                      clk,
  input  logic                      rst,            // synchronous, active high
  input  drum_mask_t                drum_btn,       // six drum buttons
  input  logic                      start_stop_btn,
  input  logic                      ch_up_btn,
  input  logic                      ch_down_btn,
  input  logic                      play_mode_sw,   // 1 = play, 0 = record
  input  drum_mask_t                mute,           // stop a channel's sound
  output logic [11:0]               dac_out,        // to the DAC
  output logic                      dac_strobe,     // dac_out updates now
  output logic                      led_record,     // red: record mode
  output logic                      led_active,     // green: running
  output logic [$clog2(NUM_CH)-1:0] channel,        // selected channel
  output logic [7:0]                leds,           // trigger display
  output drum_mask_t                triggers,       // sequencer to synth
  output drum_mask_t                playing         // channels sounding
);

  sequencer #(
    .NUM_CH          (NUM_CH),
    .CH_LEN          (CH_LEN),
    .TIMER_PRESCALE  (TIMER_PRESCALE),
    .HOLD_CYCLES     (HOLD_CYCLES),
    .DEBOUNCE_CYCLES (DEBOUNCE_CYCLES)
  ) u_seq (
    .clk            (clk),
    .rst            (rst),
    .drum_btn       (drum_btn),
    .start_stop_btn (start_stop_btn),
    .ch_up_btn      (ch_up_btn),
    .ch_down_btn    (ch_down_btn),
    .play_mode_sw   (play_mode_sw),
    .triggers       (triggers),
    .led_record     (led_record),
    .led_active     (led_active),
    .channel        (channel)
  );

  controller #(.CLK_HZ(CLK_HZ)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .triggers   (triggers),
    .mute       (mute),
    .dac_out    (dac_out),
    .dac_strobe (dac_strobe),
    .leds       (leds),
    .playing    (playing)
  );

endmodule
