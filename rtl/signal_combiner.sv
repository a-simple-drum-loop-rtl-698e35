// Signal combiner: adds the offset-binary outputs of the synth channels.
//
// The sum is wide enough never to overflow (six 12-bit words need 15 bits),
// so no clipping is needed; the caller keeps the top 12 bits for the DAC.
// Because every channel idles at mid-scale, the silent sum is N*0x7FF and
// sounds are excursions around it. Purely combinational. The adder and its
// width follow the original design.
module signal_combiner #(
  parameter int N   = 6,                 // number of channels
  parameter int W   = 12,                // width of each input
  parameter int SUM_W = W + $clog2(N)    // width of the sum
) (
  input  logic [W-1:0]     sample [N],   // unsigned channel outputs
  output logic [SUM_W-1:0] sum
);

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++)
      sum = sum + SUM_W'(sample[i]);
  end

endmodule
