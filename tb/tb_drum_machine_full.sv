// Full-size end-to-end testbench for drum_machine: the same session as
// tb_drum_machine with the top at its default parameters (20 MHz clock,
// 44100 Hz samples, 2 ms debounce and hold, 51.2 us timer tick, 3 channels
// of 25 commands).
module tb_drum_machine_full;
  tb_drum_machine_run #(.FULL(1)) run ();
endmodule
