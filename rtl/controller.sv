// Sound controller: the six-channel drum synthesizer that drives the DAC.
//
// A clockdiv phase accumulator makes the 44100 Hz audio sample strobe from
// the 20 MHz system clock; every register below advances on that strobe.
// Each of the six channels pairs a sine sample generator (220, 120, 80, 330,
// 400 and 60 Hz) with a synth channel (ADSR envelope and multiplier); the
// channel outputs are summed by the signal combiner and the top 12 bits of
// the 15-bit sum are registered into `dac_out` on every strobe, so the DAC
// word changes once per sample period and holds in between. `dac_strobe`
// marks the clock in which `dac_out` takes a new value.
//
// Trigger inputs come from the sequencer as levels held for milliseconds.
// A channel needs a single trigger per hit, so each input is passed through
// a two-flop synchronizer, its rising edge is detected, and the edge is held
// as a pending trigger until the next sample strobe delivers it to the
// channel. Holding a line high therefore starts one sound, not many.
//
// The channel frequencies, envelope rates, combiner and DAC register follow
// the original design, as does `leds` showing the trigger lines. The edge
// detection and pending latch, the separate per-channel `mute` inputs and
// the single clock with a sample enable are this design's choices.
module controller
  import drum_pkg::*;
#(
  parameter int unsigned CLK_HZ           = 20_000_000,  // system clock
  parameter int unsigned SAMPLE_RATE_DHZ  = 441_000,     // 44100.0 Hz
  parameter int unsigned SAMPLE_HZ        = 44_100,      // for the ROMs
  parameter int unsigned CH_FREQ_HZ [NUM_DRUMS] = '{220, 120, 80, 330, 400, 60},
  parameter logic signed [23:0] A_RATE    = 24'h000500,
  parameter logic signed [23:0] D_RATE    = 24'h000300,
  parameter logic signed [23:0] S_RATE    = 24'h000100,
  parameter logic signed [23:0] R_RATE    = 24'h000400
) (
  input  logic             clk,
  input  logic             rst,         // synchronous, active high
  input  drum_mask_t       triggers,    // drum trigger levels
  input  drum_mask_t       mute,        // per-channel stop
  output logic [11:0]      dac_out,     // parallel DAC word
  output logic             dac_strobe,  // dac_out updates in this clock
  output logic [7:0]       leds,        // trigger lines, for display
  output drum_mask_t       playing      // channels currently sounding
);

  localparam int SUM_W = SAMPLE_W + $clog2(NUM_DRUMS);

  logic             sample_tick;
  logic             sample_sq;
  drum_mask_t       trig_s1, trig_s2, trig_s3;
  drum_mask_t       pending;
  logic [11:0]      ch_out [NUM_DRUMS];
  logic [SUM_W-1:0] mix;

  clockdiv #(.CLK_HZ(CLK_HZ)) u_sample_clk (
    .clk       (clk),
    .rst       (rst),
    .frequency (32'(SAMPLE_RATE_DHZ)),
    .freq_out  (sample_sq),
    .tick      (sample_tick)
  );

  // Synchronize the trigger lines and turn each rising edge into one
  // trigger, held until the next sample strobe.
  always_ff @(posedge clk) begin
    if (rst) begin
      trig_s1 <= '0;
      trig_s2 <= '0;
      trig_s3 <= '0;
      pending <= '0;
    end else begin
      trig_s1 <= triggers;
      trig_s2 <= trig_s1;
      trig_s3 <= trig_s2;
      if (sample_tick) pending <= trig_s2 & ~trig_s3;
      else             pending <= pending | (trig_s2 & ~trig_s3);
    end
  end

  for (genvar c = 0; c < NUM_DRUMS; c++) begin : g_channel
    logic signed [11:0] wave;

    sample_generator #(
      .FREQ_HZ   (CH_FREQ_HZ[c]),
      .SAMPLE_HZ (SAMPLE_HZ)
    ) u_sg (
      .clk  (clk),
      .rst  (rst),
      .step (sample_tick),
      .data (wave)
    );

    synth #(
      .A_RATE(A_RATE), .D_RATE(D_RATE), .S_RATE(S_RATE), .R_RATE(R_RATE)
    ) u_synth (
      .clk        (clk),
      .rst        (rst),
      .ce         (sample_tick),
      .mute       (mute[c]),
      .trigger    (pending[c]),
      .sample_in  (wave),
      .sample_out (ch_out[c]),
      .playing    (playing[c])
    );
  end

  signal_combiner #(.N(NUM_DRUMS), .W(SAMPLE_W)) u_mix (
    .sample (ch_out),
    .sum    (mix)
  );

  always_ff @(posedge clk) begin
    if (rst)
      dac_out <= mix[SUM_W-1 -: 12];
    else if (sample_tick)
      dac_out <= mix[SUM_W-1 -: 12];
  end

  // A trigger edge is never lost: a pending trigger is delivered on the
  // very next sample strobe, so pending bits never outlive a strobe.
  a_pending_delivered: assert property (@(posedge clk) disable iff (rst)
                                        sample_tick |=> (pending & ~$past(trig_s2 & ~trig_s3)) == '0)
    else $error("controller: pending trigger survived a sample strobe");

  assign dac_strobe = sample_tick;
  assign leds       = {2'b00, triggers};

endmodule
