// Testbench for controller at its default sizes (20 MHz clock, 44100 Hz
// samples, the six tones and envelope rates). A reference model of the six
// sine tables and channels predicts every DAC word; the testbench checks each
// one, the sample rate, the silent level (6*0x7FF >> 3 = 1535), that a
// trigger held high for a long time starts one sound, simultaneous triggers,
// a restart while sounding, a mute, all six drums at once and the natural end
// of a sound.
module tb_controller;
  import drum_pkg::*;
  import drum_ref_pkg::*;
  logic clk = 0, rst = 1;
  drum_mask_t triggers = '0, mute = '0, playing;
  logic [11:0] dac_out;
  logic dac_strobe;
  logic [7:0] leds;
  int checks = 0, failures = 0;
  longint cyc = 0, strobes = 0;
  int n_start = 0, n_restart = 0, n_mute = 0, n_end = 0;

  controller dut (.clk(clk), .rst(rst), .triggers(triggers), .mute(mute),
                  .dac_out(dac_out), .dac_strobe(dac_strobe), .leds(leds), .playing(playing));

  always #25 clk = ~clk;  // 20 MHz

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  int freqs [6] = '{220, 120, 80, 330, 400, 60};
  int addr  [6] = '{0, 0, 0, 0, 0, 0};
  synth_model ch [6];
  int outs [6] = '{'h7FF, 'h7FF, 'h7FF, 'h7FF, 'h7FF, 'h7FF};
  bit pend_trig [6];
  bit pend_mute [6];
  bit strobe_q = 0;

  // model: at each sample strobe the DAC takes the previous channel outputs,
  // then each channel takes a new sample.
  always @(negedge clk) begin
    cyc++;
    if (strobe_q && !rst) begin
      int sum, expd;
      strobes++;
      sum = 0;
      for (int c = 0; c < 6; c++) sum += outs[c];
      expd = sum >> 3;
      check(int'(dac_out) == expd, $sformatf("dac %0d expected %0d", dac_out, expd));
      for (int c = 0; c < 6; c++) begin
        bit was;
        int len;
        was = ch[c].ystate != Y_STOP;
        if (pend_trig[c]) begin if (was) n_restart++; else n_start++; end
        outs[c] = ch[c].step(pend_trig[c], pend_mute[c], sine_entry(addr[c], freqs[c], 44100));
        if (was && ch[c].ystate == Y_STOP) begin if (pend_mute[c]) n_mute++; else n_end++; end
        len = 44100 / freqs[c];
        addr[c] = (addr[c] == len) ? 0 : addr[c] + 1;
        pend_trig[c] = 0;
        check(playing[c] == (ch[c].ystate != Y_STOP), $sformatf("playing[%0d]", c));
      end
    end
    strobe_q = dac_strobe;
  end

  // Raise trigger lines right after a strobe; the model sees them at the next.
  task automatic fire(drum_mask_t m, int hold_clocks);
    @(negedge clk iff dac_strobe);
    repeat (2) @(negedge clk);
    triggers = m;
    for (int c = 0; c < 6; c++) if (m[c]) pend_trig[c] = 1;
    repeat (hold_clocks) @(negedge clk);
    triggers = '0;
  endtask

  task automatic samples(int n);
    repeat (n) @(negedge clk iff dac_strobe);
  endtask

  initial begin
    longint s0, c0;
    for (int c = 0; c < 6; c++) ch[c] = new();
    repeat (3) @(negedge clk);
    rst = 0;
    // silence and sample rate
    samples(5);
    check(dac_out == 12'd1535, $sformatf("silent level %0d", dac_out));
    s0 = strobes; c0 = cyc;
    samples(441);
    check((cyc - c0) >= 199_990 && (cyc - c0) <= 200_010,
          $sformatf("441 samples took %0d clocks, expected 200000", cyc - c0));
    check(leds == 8'h00, "leds idle");
    // channel 0 held high for 8 ms (160000 clocks): one sound only
    fork
      fire(6'b000001, 160_000);
      begin
        @(negedge clk iff triggers != '0);
        @(negedge clk);
        check(leds == 8'h01, "leds show trigger");
      end
    join
    samples(2000);
    // channels 3 and 5 together, then restart channel 3 while sounding
    fire(6'b101000, 20);
    samples(3000);
    fire(6'b001000, 20);
    samples(1000);
    // mute channel 5 for one sample
    @(negedge clk iff dac_strobe); repeat (2) @(negedge clk);
    mute = 6'b100000; pend_mute[5] = 1;
    @(negedge clk iff dac_strobe); repeat (2) @(negedge clk);
    mute = '0; pend_mute[5] = 0;
    // all six drums at once
    fire(6'b111111, 20);
    samples(3);
    check(playing == 6'b111111, "all six channels sounding");
    samples(4000);
    // let everything end
    samples(21000);
    check(playing == '0, "all channels ended");
    check(dac_out == 12'd1535, "silent again");
    check(n_start >= 3 && n_restart >= 1 && n_mute >= 1 && n_end >= 2,
          $sformatf("mechanisms start=%0d restart=%0d mute=%0d end=%0d", n_start, n_restart, n_mute, n_end));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
