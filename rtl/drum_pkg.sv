// Shared types and constants of the drum loop recorder and sequencer.
//
// The sequencer stores one command per drum hit: which drums were struck
// (one bit per drum button, so simultaneous hits share a command) and how
// many timer ticks passed since the previous command. The synthesizer side
// works on 12-bit samples: signed two's complement inside a channel and
// offset binary (mid-scale 0x7FF) on the channel outputs and the DAC word.
// The state encodings of the two synthesizer state machines follow the
// original design's numbering.
package drum_pkg;

  localparam int NUM_DRUMS = 6;   // drum buttons and synth channels
  localparam int SAMPLE_W  = 12;  // sample, coefficient and DAC width
  localparam int TIMER_W   = 16;  // interval timer width

  localparam logic [SAMPLE_W-1:0] MIDSCALE = 12'h7FF;  // silent output level

  typedef logic [NUM_DRUMS-1:0] drum_mask_t;

  // One recorded command: drums to fire and the wait before firing them.
  typedef struct packed {
    drum_mask_t         drum_id;
    logic [TIMER_W-1:0] timer;
  } seq_cmd_t;

  // Phases of the ADSR envelope.
  typedef enum logic [2:0] {
    ADSR_ATTACK  = 3'b000,
    ADSR_DECAY   = 3'b001,
    ADSR_SUSTAIN = 3'b010,
    ADSR_RELEASE = 3'b011,
    ADSR_TRIGGER = 3'b100,
    ADSR_IDLE    = 3'b101
  } adsr_state_t;

  // Playback state of a synth channel; bit 0 is the envelope restart.
  typedef enum logic [1:0] {
    SYN_STOPPED = 2'b00,
    SYN_TRIG    = 2'b01,
    SYN_PLAYING = 2'b10
  } synth_state_t;

endpackage
