// Reference models for the drum machine testbenches.
//
// Written from the behaviour described for each block, independently of the
// RTL: a sine table entry, and a synth channel (playback state plus ADSR
// envelope) stepped once per audio sample. Integers are used throughout so
// that signed arithmetic is explicit.
package drum_ref_pkg;

  // Sine table entry n for a tone of f Hz sampled at sf Hz.
  function automatic int sine_entry(int n, int f, int sf);
    real s;
    int  v;
    s = $sin(2.0 * 3.14159265358979 * n * f / sf);
    v = $rtoi(s * 2048.0);
    v = $rtoi(v * 0.999);
    return v;
  endfunction

  // ADSR phases
  localparam int A_IDLE = 5, A_TRIG = 4, A_ATT = 0, A_DEC = 1, A_SUS = 2, A_REL = 3;
  // synth states
  localparam int Y_STOP = 0, Y_TRIG = 1, Y_PLAY = 2;

  class synth_model;
    int a_rate, d_rate, s_rate, r_rate;
    int ystate;   // synth state
    int astate;   // ADSR phase
    int level;    // ADSR accumulator
    int out;      // registered output

    function new(int a = 'h500, int d = 'h300, int s = 'h100, int r = 'h400);
      a_rate = a; d_rate = d; s_rate = s; r_rate = r;
      reset();
    endfunction

    function void reset();
      ystate = Y_STOP; astate = A_IDLE; level = 'h2FF000; out = 'h7FF;
    endfunction

    // Coefficient: top 12 bits of the accumulator, zero when negative.
    function int coeff();
      return (level < 0) ? 0 : (level >>> 12);
    endfunction

    // One audio sample: returns the new registered output.
    function int step(bit trigger, bit mute, int sample);
      int ny, na, nl, prod, scaled;
      // synth next state
      case (ystate)
        Y_TRIG: ny = Y_PLAY;
        Y_PLAY: ny = trigger ? Y_TRIG : ((mute || astate == A_IDLE) ? Y_STOP : Y_PLAY);
        default: ny = trigger ? Y_TRIG : Y_STOP;
      endcase
      // envelope next phase
      if (ystate == Y_TRIG) na = A_TRIG;
      else case (astate)
        A_TRIG: na = A_ATT;
        A_ATT:  na = (level > 'h7FF000) ? A_DEC : A_ATT;
        A_DEC:  na = (level < 'h3FF000) ? A_SUS : A_DEC;
        A_SUS:  na = (level < 'h1FF000) ? A_REL : A_SUS;
        A_REL:  na = (level < 0) ? A_IDLE : A_REL;
        default: na = A_IDLE;
      endcase
      case (astate)
        A_ATT: nl = level + a_rate;
        A_DEC: nl = level - d_rate;
        A_SUS: nl = level - s_rate;
        A_REL: nl = level - r_rate;
        default: nl = 'h2FF000;
      endcase
      // output
      prod   = (sample >>> 1) * coeff();
      scaled = ((prod >>> 12) + 'h7FF) & 'hFFF;
      out    = (ystate == Y_STOP) ? 'h7FF : scaled;
      ystate = ny; astate = na; level = nl;
      return out;
    endfunction
  endclass

endpackage
