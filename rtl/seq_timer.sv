// Interval timer of the sequencer: a prescaled 16-bit up-counter.
//
// A prescaler divides the clock by PRESCALE; each time it wraps the 16-bit
// count goes up by one. When the count wraps from 0xFFFF to 0, `overflow`
// pulses for one clock. `clear` zeroes both the count and the prescaler, so
// the next count comes a full PRESCALE clocks later; it wins over a tick in
// the same clock. The count is the time since the last clear in ticks.
//
// The 16-bit width and the division by 1024 (instruction clock = clock/4,
// then a 1:256 prescaler: 51.2 us per tick at 20 MHz, 3.36 s to overflow)
// are those of the original timer setup.
module seq_timer
  import drum_pkg::*;
#(
  parameter int unsigned PRESCALE = 1024  // clocks per count
) (
  input  logic               clk,
  input  logic               rst,       // synchronous, active high
  input  logic               clear,     // restart timing from zero
  output logic [TIMER_W-1:0] count,     // ticks since the last clear
  output logic               overflow   // one-clock pulse on wrap
);

  localparam int PS_W = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PS_W-1:0] ps;
  logic            tick;

  assign tick = (ps == PS_W'(PRESCALE - 1));

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ps       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      ps       <= tick ? '0 : ps + 1'b1;
      overflow <= tick && (count == '1);
      if (tick) count <= count + 1'b1;
    end
  end

endmodule
