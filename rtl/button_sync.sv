// Pushbutton conditioner: synchronizer, debouncer and press detector.
//
// The raw input passes through two flip-flops into the clock domain. A
// counter then accepts a new level only after the synchronized input has
// stayed different from the accepted level for DEBOUNCE_CYCLES clocks in a
// row; any bounce back restarts the count. `level` is the accepted
// (debounced) level and `press` is high for one clock when it rises, which
// is DEBOUNCE_CYCLES+2 clocks after a clean press.
//
// The buttons are active high (held low by pulldowns when open), as in the
// original input circuit. The original relied on interrupt edges and a
// fixed software delay of about 2 ms; this counter-based debouncer is this
// design's equivalent, with 40000 clocks (2 ms at 20 MHz) as default.
module button_sync #(
  parameter int unsigned DEBOUNCE_CYCLES = 40_000
) (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic btn_in,  // raw, asynchronous
  output logic level,   // debounced level
  output logic press    // one-clock pulse on a debounced rising edge
);

  localparam int CNT_W = $clog2(DEBOUNCE_CYCLES + 1);

  logic             s1, s2;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1    <= 1'b0;
      s2    <= 1'b0;
      level <= 1'b0;
      count <= '0;
      press <= 1'b0;
    end else begin
      s1    <= btn_in;
      s2    <= s1;
      press <= 1'b0;
      if (s2 == level) begin
        count <= '0;
      end else if (count >= CNT_W'(DEBOUNCE_CYCLES - 1)) begin
        count <= '0;
        level <= s2;
        press <= s2;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
