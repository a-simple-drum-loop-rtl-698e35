// Synth channel: plays one drum sound by scaling a sample stream with an
// ADSR envelope.
//
// A three-state machine (Stopped, Trig, Playing) decides whether the channel
// sounds. A `trigger` seen on a sample strobe moves it to Trig, which
// restarts the envelope, and then to Playing; a new trigger while playing
// restarts the sound. Playing ends when `mute` is seen or the envelope
// reports idle. While sounding, each sample is
//     out = ((sample >>> 1) * coeff)[23:12] + 0x7FF
// i.e. the signed sample is scaled by the coefficient and shifted to offset
// binary for the DAC; while stopped the output is the mid-scale 0x7FF.
// `sample_out` is registered and changes one clock after each `ce` strobe.
// `trigger` and `mute` are sampled only on `ce`, so the caller must hold a
// trigger until the next strobe.
//
// The state machine, the multiply with its one-bit pre-shift and the
// offset-binary conversion follow the original design; the clock enable and
// the synchronous reset to Stopped are this design's choices.
module synth
  import drum_pkg::*;
#(
  parameter logic signed [23:0] A_RATE = 24'h000500,
  parameter logic signed [23:0] D_RATE = 24'h000300,
  parameter logic signed [23:0] S_RATE = 24'h000100,
  parameter logic signed [23:0] R_RATE = 24'h000400
) (
  input  logic               clk,
  input  logic               rst,         // synchronous, active high
  input  logic               ce,          // audio sample strobe
  input  logic               mute,        // stop playing
  input  logic               trigger,     // start or restart playing
  input  logic signed [11:0] sample_in,   // from the sample generator
  output logic [11:0]        sample_out,  // offset binary, 0x7FF = silence
  output logic               playing      // channel is sounding
);

  synth_state_t       state, next;
  logic signed [11:0] coeff;
  logic               done;
  logic signed [23:0] product;
  logic [11:0]        scaled;

  adsr_envelope #(
    .A_RATE(A_RATE), .D_RATE(D_RATE), .S_RATE(S_RATE), .R_RATE(R_RATE)
  ) u_adsr (
    .clk      (clk),
    .rst      (rst),
    .ce       (ce),
    .play_ctl (state == SYN_TRIG),
    .coeff    (coeff),
    .idle     (done),
    .phase    ()
  );

  assign product = 24'(sample_in >>> 1) * 24'(coeff);
  assign scaled  = product[23:12] + MIDSCALE;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= SYN_STOPPED;
      sample_out <= MIDSCALE;
    end else if (ce) begin
      state      <= next;
      sample_out <= (state == SYN_STOPPED) ? MIDSCALE : scaled;
    end
  end

  always_comb begin
    unique case (state)
      SYN_TRIG:    next = SYN_PLAYING;
      SYN_PLAYING: next = trigger        ? SYN_TRIG
                        : (mute || done) ? SYN_STOPPED
                        :                  SYN_PLAYING;
      SYN_STOPPED: next = trigger ? SYN_TRIG : SYN_STOPPED;
      default:     next = SYN_STOPPED;
    endcase
  end

  assign playing = (state != SYN_STOPPED);

endmodule
