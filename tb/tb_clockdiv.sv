// Testbench for clockdiv: tick count and spacing at 44100.0 Hz from 20 MHz,
// exact division at 1 MHz, and the square-wave duty of freq_out.
module tb_clockdiv;
  logic clk = 0, rst = 1;
  logic [31:0] frequency;
  logic freq_out, tick;
  int checks = 0, failures = 0;

  clockdiv dut (.clk(clk), .rst(rst), .frequency(frequency), .freq_out(freq_out), .tick(tick));

  always #25 clk = ~clk;  // 20 MHz

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    longint ticks, highs, last, gap, gmin, gmax;
    frequency = 32'd441000;
    repeat (3) @(negedge clk);
    rst = 0;
    // 4535100 clocks at 20 MHz are 0.226755 s: 10000 periods of 44100 Hz
    // (plus or minus one for the phase at the window edges)
    ticks = 0; highs = 0; last = -1; gmin = 1000; gmax = 0;
    for (int i = 0; i < 4535100; i++) begin
      @(negedge clk);
      if (freq_out) highs++;
      if (tick) begin
        ticks++;
        if (last >= 0) begin
          gap = i - last;
          if (gap < gmin) gmin = gap;
          if (gap > gmax) gmax = gap;
        end
        last = i;
      end
    end
    check(ticks >= 9999 && ticks <= 10001, $sformatf("44.1 kHz tick count %0d, expected 10000", ticks));
    check(gmin == 453 && gmax == 454, $sformatf("tick spacing %0d..%0d, expected 453..454", gmin, gmax));
    check(highs > 4535100*45/100 && highs < 4535100*55/100, $sformatf("freq_out duty %0d/4535100", highs));
    // 1 MHz: exactly every 20 clocks
    rst = 1; frequency = 32'd10_000_000;
    @(negedge clk); rst = 0;
    ticks = 0; last = -1; gmin = 1000; gmax = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (tick) begin
        ticks++;
        if (last >= 0) begin
          gap = i - last;
          if (gap < gmin) gmin = gap;
          if (gap > gmax) gmax = gap;
        end
        last = i;
      end
    end
    check(ticks == 100, $sformatf("1 MHz tick count %0d, expected 100", ticks));
    check(gmin == 20 && gmax == 20, $sformatf("1 MHz spacing %0d..%0d, expected 20", gmin, gmax));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
