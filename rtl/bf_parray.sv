// bf_parray: the P-array, 18 subkeys of 32 bits (P1..P18 at addresses 0..17).
//
// A register file with one address port shared by reads and writes, as in the
// P-array block diagram: on a rising clock edge with we high, data_in is
// written at address; data_out always shows the entry at address
// (asynchronous read). Writes to addresses 18..31 are ignored and reads there
// return 0. The contents are not reset: the key schedule writes all 18 entries
// before the first encryption.
module bf_parray
  import bf_pkg::*;
(
  input  logic    clk,
  input  logic    we,
  input  p_addr_t address,
  input  word_t   data_in,
  output word_t   data_out
);
  word_t regs [P_ENTRIES];

  always_ff @(posedge clk) begin
    if (we && address < p_addr_t'(P_ENTRIES)) regs[address] <= data_in;
  end

  always_comb begin
    data_out = '0;
    for (int i = 0; i < P_ENTRIES; i++)
      if (address == p_addr_t'(i)) data_out = regs[i];
  end
endmodule
