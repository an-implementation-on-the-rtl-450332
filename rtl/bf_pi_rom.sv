// bf_pi_rom: the 1042 initial table words of Blowfish, the fractional part of
// pi in hexadecimal.
//
// Word k holds hex digits 8k+1 .. 8k+8 after the point of pi, so word 0 is
// 243F6A88 and the most significant bit of the fraction is bit 31 of word 0.
// Words 0..17 initialise P1..P18 and words 18..1041 initialise S-boxes 0..3,
// 256 words each, in that order. Read is asynchronous. The contents are read
// from bf_pi_init.hex, one 8-digit hex word per line (frac(pi) * 16**(8*1042),
// truncated, cut into 32-bit words, most significant first).
module bf_pi_rom
  import bf_pkg::*;
(
  input  pi_addr_t addr,
  output word_t    data
);
  word_t rom [PI_WORDS];

  initial $readmemh("rtl/bf_pi_init.hex", rom);

  assign data = (addr < pi_addr_t'(PI_WORDS)) ? rom[addr] : '0;
endmodule
