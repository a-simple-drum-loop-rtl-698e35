// Testbench for signal_combiner: random and extreme inputs against a sum.
module tb_signal_combiner;
  logic [11:0] s [6];
  logic [14:0] sum;
  int checks = 0, failures = 0;

  signal_combiner dut (.sample(s), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_once();
    int ref_sum = 0;
    for (int i = 0; i < 6; i++) ref_sum += int'(s[i]);
    #1;
    checks++;
    if (int'(sum) != ref_sum) begin
      failures++;
      $display("FAIL: sum %0d expected %0d", sum, ref_sum);
    end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) s[i] = 12'hFFF;
    try_once();
    for (int i = 0; i < 6; i++) s[i] = 12'h7FF;
    try_once();
    for (int i = 0; i < 6; i++) s[i] = 12'h000;
    try_once();
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 6; i++) s[i] = 12'($urandom);
      try_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
