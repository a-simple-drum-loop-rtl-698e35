// Sample-rate generator: a phase accumulator that divides the system clock
// down to an arbitrary output frequency.
//
// Every clock the accumulator adds `frequency`, given in tenths of a hertz,
// and wraps modulo ten times the clock frequency. Each wrap is one period of
// the output: `tick` is high for that one clock, and `freq_out` is a near
// square wave (high while the accumulator is in its upper half). With the
// default 20 MHz clock and frequency = 441000 the tick rate is 44100.0 Hz,
// one tick every 453 or 454 clocks; the long-run rate is exact.
//
// The accumulator scheme and the tenths-of-hertz input follow the original
// design. Using `tick` as a clock enable, instead of clocking the audio logic
// from `freq_out`, is this design's choice: the whole system then runs on a
// single clock. `frequency` must be below CLK_HZ*10/2.
module clockdiv #(
  parameter int unsigned CLK_HZ = 20_000_000  // system clock frequency
) (
  input  logic        clk,
  input  logic        rst,        // synchronous, active high
  input  logic [31:0] frequency,  // output frequency in 0.1 Hz units
  output logic        freq_out,   // square wave at the output frequency
  output logic        tick        // one-clock pulse per output period
);

  localparam logic [32:0] MODULUS = 33'(CLK_HZ) * 33'd10;

  logic [32:0] count;
  logic [32:0] sum;

  assign sum = count + {1'b0, frequency};

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (sum >= MODULUS) begin
      count <= sum - MODULUS;
      tick  <= 1'b1;
    end else begin
      count <= sum;
      tick  <= 1'b0;
    end
  end

  assign freq_out = (count >= (MODULUS >> 1));

  // The requested frequency must stay below half the clock frequency.
  a_freq_range: assert property (@(posedge clk) disable iff (rst)
                                 {1'b0, frequency} < (MODULUS >> 1))
    else $error("clockdiv: frequency %0d out of range", frequency);

endmodule
