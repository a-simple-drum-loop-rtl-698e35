// Testbench for seq_timer: the count equals elapsed clocks / PRESCALE after
// every clear, clear restarts the prescaler, and the overflow pulse comes
// exactly once, 65536*PRESCALE clocks after a clear.
module tb_seq_timer;
  localparam int PS = 4;
  logic clk = 0, rst = 1, clear = 0;
  logic [15:0] count;
  logic overflow;
  int checks = 0, failures = 0;

  seq_timer #(.PRESCALE(PS)) dut (.clk(clk), .rst(rst), .clear(clear), .count(count), .overflow(overflow));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int ovf_at, n;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 20; r++) begin
      n = $urandom_range(1, 500);
      clear = 1; @(negedge clk); clear = 0;
      for (int i = 1; i <= n; i++) begin
        @(negedge clk);
        check(int'(count) == i / PS, $sformatf("count %0d after %0d clocks", count, i));
      end
    end
    // overflow
    clear = 1; @(negedge clk); clear = 0;
    ovf_at = -1;
    for (int i = 1; i <= 65536 * PS + 10; i++) begin
      @(negedge clk);
      if (overflow) begin
        check(ovf_at < 0, "second overflow pulse");
        ovf_at = i;
      end
    end
    check(ovf_at == 65536 * PS, $sformatf("overflow after %0d clocks", ovf_at));
    check(int'(count) == 10 / PS, "count after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
