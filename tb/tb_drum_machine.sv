// End-to-end testbench for drum_machine. By default it runs with shortened
// timing (2 MHz clock so that a sample is about 45 clocks, short debounce,
// hold and timer tick); with FULL=1 it leaves the top at its real sizes.
// The user's session is: play a drum live, record a loop of two hits (the
// second two drums struck together) in channel 0, play it back through
// several loops, mute a channel during playback, stop, change channels with
// wrap-around, abort a recording with the mode switch, and let the sounds
// die away. Checked: trigger masks and gaps in playback, that each trigger
// starts exactly the right synth channels, DAC silence at 1535 before and
// after and movement while sounding, and that every mechanism happened.
module tb_drum_machine;
  import drum_pkg::*;
  tb_drum_machine_run #(.FULL(0)) run ();
endmodule
