// bf_sbox: one key-dependent S-box, 256 entries of 32 bits.
//
// A single-port memory: on a rising clock edge with we high, data_in is
// written at address; data_out always shows the entry at address
// (asynchronous read, so the F function can look up all four boxes and finish
// a round within one clock). The port names follow the S-box block diagram;
// the read timing is this design's choice. The contents are not reset: the
// key schedule writes every entry before any encryption reads one.
module bf_sbox
  import bf_pkg::*;
#(
  parameter int unsigned DEPTH = S_ENTRIES
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] address,
  input  word_t                    data_in,
  output word_t                    data_out
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[address] <= data_in;
  end

  assign data_out = mem[address];
endmodule
