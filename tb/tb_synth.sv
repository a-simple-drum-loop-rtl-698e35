// Testbench for synth: every output sample against the reference channel
// model while a sine is played through full envelopes, a restart while
// playing, a mute, strobe gaps, and idle output at mid-scale. Each mechanism
// (start, restart, mute, natural end) is counted and must occur.
module tb_synth;
  import drum_ref_pkg::*;
  logic clk = 0, rst = 1, ce = 0, mute = 0, trigger = 0;
  logic signed [11:0] sample_in = 0;
  logic [11:0] sample_out;
  logic playing;
  int checks = 0, failures = 0;
  int n_start = 0, n_restart = 0, n_mute = 0, n_end = 0;

  synth dut (.clk(clk), .rst(rst), .ce(ce), .mute(mute), .trigger(trigger),
             .sample_in(sample_in), .sample_out(sample_out), .playing(playing));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  synth_model m = new();
  int ph = 0;

  task automatic strobe(bit t, bit mu);
    int exp_out;
    bit was_play;
    was_play = (m.ystate != Y_STOP);
    sample_in = 12'(sine_entry(ph, 330, 44100));
    ph = (ph + 1) % 134;
    trigger = t; mute = mu; ce = 1;
    @(negedge clk);
    ce = 0; trigger = 0; mute = 0;
    exp_out = m.step(t, mu, int'(sample_in));
    check(int'(sample_out) == exp_out, $sformatf("out %0h expected %0h", sample_out, exp_out));
    check(playing == (m.ystate != Y_STOP), "playing flag");
    if (was_play && m.ystate == Y_STOP && !mu) n_end++;
    if (was_play && m.ystate == Y_STOP && mu) n_mute++;
    if (t && was_play) n_restart++;
    if (t && !was_play) n_start++;
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst = 0;
    check(sample_out == 12'h7FF, "mid-scale after reset");
    repeat (20) strobe(0, 0);
    check(sample_out == 12'h7FF, "silent without trigger");
    // a whole sound
    strobe(1, 0);
    n = 0;
    while (m.ystate != Y_STOP && n < 30000) begin
      strobe(0, 0); n++;
      if ($urandom_range(0, 15) == 0) @(negedge clk);
    end
    check(n > 19000 && n < 21000, $sformatf("sound lasted %0d samples", n));
    repeat (10) strobe(0, 0);
    // restart while playing, then mute
    strobe(1, 0);
    repeat (3000) strobe(0, 0);
    strobe(1, 0);
    repeat (2000) strobe(0, 0);
    strobe(0, 1);
    check(sample_out != 12'h7FF || m.out == 'h7FF, "mute sample");
    strobe(0, 0);
    check(sample_out == 12'h7FF && !playing, "silent after mute");
    repeat (10) strobe(0, 0);
    check(n_start >= 2 && n_restart >= 1 && n_mute >= 1 && n_end >= 1,
          $sformatf("mechanisms start=%0d restart=%0d mute=%0d end=%0d", n_start, n_restart, n_mute, n_end));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
