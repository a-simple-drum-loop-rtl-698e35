// ADSR envelope, a numerically controlled amplitude filter.
//
// A 24-bit signed accumulator moves by a fixed rate per audio sample, and its
// top 12 bits are the envelope coefficient handed to the synth channel. A
// state machine picks the phase:
//   Trigger  load START_LEVEL (0x2FF000, about 3/4 of full scale)
//   Attack   add A_RATE      until the level passes ATTACK_TURN  (0x7FF000)
//   Decay    subtract D_RATE until it drops below DECAY_TURN     (0x3FF000)
//   Sustain  subtract S_RATE until it drops below SUSTAIN_TURN   (0x1FF000)
//   Release  subtract R_RATE until it drops below zero, then Idle
// A `play_ctl` pulse in any phase restarts the envelope at Trigger. `idle`
// is high in the Idle phase and tells the channel the sound has ended.
// Everything advances only on `ce`, the audio sample strobe: the state
// changes one strobe after the condition is seen, as in a plain Moore FSM.
//
// The phases, turning points, start level and rates follow the original
// design. Two details are this design's own: a synchronous reset puts the
// envelope in Idle, and the coefficient output is held at zero while the
// accumulator is negative (the last strobe or two of Release), so the
// multiplier only ever sees a non-negative coefficient.
module adsr_envelope
  import drum_pkg::*;
#(
  parameter logic signed [23:0] A_RATE       = 24'h000500,
  parameter logic signed [23:0] D_RATE       = 24'h000300,
  parameter logic signed [23:0] S_RATE       = 24'h000100,
  parameter logic signed [23:0] R_RATE       = 24'h000400,
  parameter logic signed [23:0] START_LEVEL  = 24'h2FF000,
  parameter logic signed [23:0] ATTACK_TURN  = 24'h7FF000,
  parameter logic signed [23:0] DECAY_TURN   = 24'h3FF000,
  parameter logic signed [23:0] SUSTAIN_TURN = 24'h1FF000
) (
  input  logic               clk,
  input  logic               rst,       // synchronous, active high
  input  logic               ce,        // audio sample strobe
  input  logic               play_ctl,  // (re)start the envelope
  output logic signed [11:0] coeff,     // 0 .. 0x7FF
  output logic               idle,      // envelope finished
  output adsr_state_t        phase      // current phase, for observation
);

  adsr_state_t       state, next;
  logic signed [23:0] level;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ADSR_IDLE;
      level <= START_LEVEL;
    end else if (ce) begin
      state <= next;
      unique case (state)
        ADSR_ATTACK:  level <= level + A_RATE;
        ADSR_DECAY:   level <= level - D_RATE;
        ADSR_SUSTAIN: level <= level - S_RATE;
        ADSR_RELEASE: level <= level - R_RATE;
        default:      level <= START_LEVEL;  // Idle and Trigger
      endcase
    end
  end

  always_comb begin
    next = state;
    if (play_ctl) begin
      next = ADSR_TRIGGER;
    end else begin
      unique case (state)
        ADSR_IDLE:    next = ADSR_IDLE;
        ADSR_TRIGGER: next = ADSR_ATTACK;
        ADSR_ATTACK:  if (level > ATTACK_TURN)  next = ADSR_DECAY;
        ADSR_DECAY:   if (level < DECAY_TURN)   next = ADSR_SUSTAIN;
        ADSR_SUSTAIN: if (level < SUSTAIN_TURN) next = ADSR_RELEASE;
        ADSR_RELEASE: if (level < 0)            next = ADSR_IDLE;
        default:      next = ADSR_IDLE;
      endcase
    end
  end

  assign coeff = level[23] ? 12'sd0 : level[23:12];
  assign idle  = (state == ADSR_IDLE);
  assign phase = state;

  // The coefficient handed to the multiplier is never negative.
  a_coeff_nonneg: assert property (@(posedge clk) disable iff (rst) coeff >= 0)
    else $error("adsr_envelope: negative coefficient");

endmodule
