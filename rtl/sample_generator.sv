// Sample generator: a ROM holding one period of a sine wave, read out one
// sample per audio sample period and wrapping at the end.
//
// The table has LEN+1 entries, LEN = SAMPLE_HZ / FREQ_HZ (integer division),
// and entry n is
//     trunc( trunc(2048 * sin(2*pi*n*FREQ_HZ/SAMPLE_HZ)) * 0.999 )
// as a signed 12-bit number, truncating towards zero both times. The 0.999
// keeps the peak (2045) inside the 12-bit signed range. The table is computed
// while the design is elaborated, so any frequency can be had by changing
// FREQ_HZ. The address steps on every `step` strobe and goes back to 0 after
// entry LEN; `data` follows the address combinationally, so a new sample is
// on `data` in the clock after each strobe.
//
// The table formula, its length and the wrap point are those of the original
// sine ROMs; that they are computed in SystemVerilog rather than pasted in as
// a case table is this design's choice.
module sample_generator #(
  parameter int unsigned FREQ_HZ   = 220,    // tone frequency
  parameter int unsigned SAMPLE_HZ = 44100   // sample rate
) (
  input  logic               clk,
  input  logic               rst,   // synchronous, active high
  input  logic               step,  // advance one sample
  output logic signed [11:0] data   // current sample, signed
);

  localparam int unsigned LEN    = SAMPLE_HZ / FREQ_HZ;  // last address
  localparam int unsigned ADDR_W = $clog2(LEN + 1);

  typedef logic signed [11:0] table_t [LEN+1];

  function automatic table_t make_table();
    table_t t;
    for (int n = 0; n <= int'(LEN); n++) begin
      int v;
      v = $rtoi(2048.0 * $sin(2.0 * 3.14159265358979 * real'(n) *
                              real'(FREQ_HZ) / real'(SAMPLE_HZ)));
      v = $rtoi(real'(v) * 0.999);
      t[n] = 12'(v);
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  logic [ADDR_W-1:0] address;

  always_ff @(posedge clk) begin
    if (rst)
      address <= '0;
    else if (step)
      address <= (address == ADDR_W'(LEN)) ? '0 : address + 1'b1;
  end

  assign data = ROM[address];

endmodule
