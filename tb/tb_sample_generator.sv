// Testbench for sample_generator: the 80 Hz table against entries of the
// original sine ROM, every entry of the 80 Hz and 400 Hz tables against the
// table formula, the wrap point, and that the address holds without `step`.
module tb_sample_generator;
  import drum_ref_pkg::*;
  logic clk = 0, rst = 1, step = 0;
  logic signed [11:0] d80, d400;
  int checks = 0, failures = 0;

  sample_generator #(.FREQ_HZ(80),  .SAMPLE_HZ(44100)) dut80  (.clk(clk), .rst(rst), .step(step), .data(d80));
  sample_generator #(.FREQ_HZ(400), .SAMPLE_HZ(44100)) dut400 (.clk(clk), .rst(rst), .step(step), .data(d400));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // entries of the original 80 Hz ROM
  int known_addr [8] = '{0, 1, 2, 4, 548, 549, 550, 551};
  int known_val  [8] = '{0, 22, 45, 92, -74, -51, -28, -4};

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst = 0;
    // address must not move without step
    repeat (5) @(negedge clk);
    check(d80 == 0 && d400 == 0, "address moved without step");
    for (n = 0; n < 1200; n++) begin
      int a80, a400;
      a80 = n % 552; a400 = n % 111;
      check(int'(d80) == sine_entry(a80, 80, 44100),
            $sformatf("80 Hz entry %0d: %0d vs %0d", a80, d80, sine_entry(a80, 80, 44100)));
      check(int'(d400) == sine_entry(a400, 400, 44100),
            $sformatf("400 Hz entry %0d: %0d vs %0d", a400, d400, sine_entry(a400, 400, 44100)));
      for (int k = 0; k < 8; k++)
        if (known_addr[k] == a80)
          check(int'(d80) == known_val[k], $sformatf("80 Hz ROM entry %0d = %0d, expected %0d", a80, d80, known_val[k]));
      step = 1; @(negedge clk); step = 0;
      if (n % 3 == 0) @(negedge clk);  // gaps between steps
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
