// bf_f: the Blowfish round function F.
//
// The 32-bit input xl is cut into four bytes; byte 0 (bits 31:24) addresses
// S-box 0, byte 1 S-box 1, and so on. The four looked-up words are combined as
//   fxl = ((S0[a] + S1[b]) ^ S2[c]) + S3[d]
// with both additions done by the proposed 32-bit carry-select adder
// (bf_add32) and taken modulo 2**32. The S-boxes sit outside this module, as in
// the F-function block diagram: the module drives their read addresses and
// takes their read data. Combinational; with asynchronous S-box reads one
// round of the cipher fits in one clock cycle, so the clock input that the
// F-function diagram shows is not needed here. The byte-to-box assignment and
// the add/xor/add order are the algorithm's; the carries out of the two
// additions are dropped (cout_a, cout_b), which is what modulo 2**32 means.
module bf_f
  import bf_pkg::*;
(
  input  word_t   xl,
  output s_addr_t sbox0_addr,
  output s_addr_t sbox1_addr,
  output s_addr_t sbox2_addr,
  output s_addr_t sbox3_addr,
  input  word_t   sbox0_data,
  input  word_t   sbox1_data,
  input  word_t   sbox2_data,
  input  word_t   sbox3_data,
  output word_t   fxl
);
  word_t sum01, mix;
  logic  cout_a, cout_b;   // carries out of the modulo-2**32 additions, dropped

  assign sbox0_addr = xl[31:24];
  assign sbox1_addr = xl[23:16];
  assign sbox2_addr = xl[15:8];
  assign sbox3_addr = xl[7:0];

  bf_add32 u_add_a (.a(sbox0_data), .b(sbox1_data), .s(sum01), .cout(cout_a));
  assign mix = sum01 ^ sbox2_data;
  bf_add32 u_add_b (.a(mix), .b(sbox3_data), .s(fxl), .cout(cout_b));
endmodule
