// Testbench for sequence_store: random writes into a shadow array, then
// every word read back, with and without interleaved writes.
module tb_sequence_store;
  import drum_pkg::*;
  localparam int DEPTH = 75;
  logic clk = 0, we = 0;
  logic [6:0] addr = 0;
  seq_cmd_t wdata = '0, rdata;
  seq_cmd_t shadow [DEPTH];
  int checks = 0, failures = 0;

  sequence_store #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; addr = 7'(i); wdata = seq_cmd_t'($urandom); shadow[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      addr = 7'(a);
      #1;
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        if (failures < 10) $display("FAIL: word %0d = %h expected %h", a, rdata, shadow[a]);
      end
      if ($urandom_range(0, 3) == 0) begin
        we = 1; wdata = seq_cmd_t'($urandom); shadow[a] = wdata;
      end
      @(negedge clk);
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
