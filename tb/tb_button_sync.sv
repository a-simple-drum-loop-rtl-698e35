// Testbench for button_sync: bounces shorter than the debounce time are
// ignored, a clean press gives exactly one pulse DEBOUNCE_CYCLES+2 clocks
// after the edge, holding gives no more pulses, and release drops the level.
module tb_button_sync;
  localparam int DB = 10;
  logic clk = 0, rst = 1, btn = 0;
  logic level, press;
  int checks = 0, failures = 0;
  int presses = 0;

  button_sync #(.DEBOUNCE_CYCLES(DB)) dut (.clk(clk), .rst(rst), .btn_in(btn), .level(level), .press(press));

  always #5 clk = ~clk;
  always @(posedge clk) if (press) presses++;

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

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    // bouncing: high for less than DB clocks at a time
    for (int i = 0; i < 20; i++) begin
      btn = 1; repeat ($urandom_range(1, DB - 2)) @(negedge clk);
      btn = 0; repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    repeat (DB + 5) @(negedge clk);
    check(presses == 0 && level == 0, "bounce produced a press");
    // clean press: measure latency
    btn = 1; t = 0;
    while (!press && t < 100) begin @(negedge clk); t++; end
    check(t == DB + 2, $sformatf("press latency %0d, expected %0d", t, DB + 2));
    repeat (200) @(negedge clk);
    check(presses == 1 && level == 1, $sformatf("held button gave %0d presses", presses));
    // release with bounce
    for (int i = 0; i < 10; i++) begin
      btn = 0; repeat ($urandom_range(1, DB - 2)) @(negedge clk);
      btn = 1; repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    check(level == 1, "release bounce changed the level");
    btn = 0;
    repeat (DB + 5) @(negedge clk);
    check(level == 0 && presses == 1, "release");
    // second press
    btn = 1; repeat (DB + 5) @(negedge clk);
    check(presses == 2, "second press");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
