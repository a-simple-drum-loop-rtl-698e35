// Sequence store: the memory holding every recorded command.
//
// DEPTH words of (drum mask, timer), one synchronous write port and one
// asynchronous read port at the same address: `rdata` shows the word at
// `addr` in the same clock, and a write takes effect at the clock edge.
// Channel c owns words c*CH_LEN .. c*CH_LEN+CH_LEN-1, an arrangement the
// sequencer makes. There is no reset: the sequencer clears the memory after
// reset. The default of 3 channels of 25 commands is the size of the
// original recorder's storage.
module sequence_store
  import drum_pkg::*;
#(
  parameter int DEPTH = 75,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  seq_cmd_t          wdata,
  output seq_cmd_t          rdata
);

  seq_cmd_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
