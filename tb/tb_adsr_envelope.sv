// Testbench for adsr_envelope: the coefficient and idle flag against a
// reference accumulator on every strobe, through a full envelope, a restart
// in the middle of Decay, strobe gaps, and the phase lengths worked out from
// the rates. Attack starts at 0x2FF000 and must pass 0x7FF000 in steps of
// 0x500: 4097 steps, seen one strobe later, so 4098 strobes in Attack, ending
// at 0x7FFA00. Decay (0x300) then needs 5465 steps to fall below 0x3FF000
// (5466 strobes, ending at 0x3FEC00), Sustain (0x100) 8189 steps to fall
// below 0x1FF000 (8190, ending at 0x1FEE00) and Release (0x400) 2044 steps
// to go negative (2045).
module tb_adsr_envelope;
  import drum_pkg::*;
  logic clk = 0, rst = 1, ce = 0, play = 0;
  logic signed [11:0] coeff;
  logic idle;
  adsr_state_t phase;
  int checks = 0, failures = 0;

  adsr_envelope dut (.clk(clk), .rst(rst), .ce(ce), .play_ctl(play),
                     .coeff(coeff), .idle(idle), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // reference envelope
  int st = 5, lv = 'h2FF000;
  int phase_len [6];
  function automatic void ref_step(bit p);
    int ns, nl;
    if (p) ns = 4;
    else case (st)
      4: ns = 0;
      0: ns = (lv > 'h7FF000) ? 1 : 0;
      1: ns = (lv < 'h3FF000) ? 2 : 1;
      2: ns = (lv < 'h1FF000) ? 3 : 2;
      3: ns = (lv < 0) ? 5 : 3;
      default: ns = 5;
    endcase
    case (st)
      0: nl = lv + 'h500;
      1: nl = lv - 'h300;
      2: nl = lv - 'h100;
      3: nl = lv - 'h400;
      default: nl = 'h2FF000;
    endcase
    st = ns; lv = nl;
  endfunction

  task automatic strobe(bit p);
    play = p; ce = 1;
    @(negedge clk);
    ce = 0; play = 0;
    ref_step(p);
    phase_len[st]++;
    check(int'(coeff) == ((lv < 0) ? 0 : (lv >>> 12)),
          $sformatf("coeff %0h expected %0h (phase %0d)", coeff, (lv < 0) ? 0 : (lv >>> 12), st));
    check(idle == (st == 5), "idle flag");
    check(int'(phase) == st, $sformatf("phase %0d expected %0d", phase, st));
  endtask

  initial begin
    int n;
    bit saw_neg_clamp = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(idle == 1, "idle after reset");
    strobe(0);
    // full envelope
    for (int i = 0; i < 6; i++) phase_len[i] = 0;
    strobe(1);
    n = 0;
    while (!idle && n < 30000) begin
      strobe(0); n++;
      if (st == 3 && lv < 0) saw_neg_clamp = 1;
      if ($urandom_range(0, 7) == 0) @(negedge clk);  // a clock without strobe
    end
    check(phase_len[0] == 4098, $sformatf("attack length %0d, expected 4098", phase_len[0]));
    check(phase_len[1] == 5466, $sformatf("decay length %0d, expected 5466", phase_len[1]));
    check(phase_len[2] == 8190, $sformatf("sustain length %0d, expected 8190", phase_len[2]));
    check(phase_len[3] == 2045, $sformatf("release length %0d, expected 2045", phase_len[3]));
    check(saw_neg_clamp, "release never went below zero");
    // restart in the middle of Decay
    strobe(1);
    while (phase != ADSR_DECAY) strobe(0);
    repeat (100) strobe(0);
    strobe(1);
    check(phase == ADSR_TRIGGER, "restart from Decay");
    strobe(0);
    check(coeff == 12'sh2FF, "level reloaded on restart");
    repeat (50) strobe(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
