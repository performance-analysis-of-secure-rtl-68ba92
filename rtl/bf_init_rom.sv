// bf_init_rom: the fixed starting contents of the P-array and the S-boxes.
//
// Blowfish starts every key expansion from the same 1042 words: the
// fractional part of pi in hexadecimal (pi = 3.243F6A88 85A308D3 ...), taken
// 32 bits at a time. Words 0..17 are P0..P17, words 18 + 256*k + j are
// S-box k, entry j. The table is read from rtl/blowfish_init.hex, one word per
// line in that order. Asynchronous read.
//
// These are the standard Blowfish constants; the paper refers to the initial
// contents without listing them.
module bf_init_rom
  import blowfish_pkg::*;
(
  input  logic [10:0] addr,
  output word_t       data
);
  word_t rom [INIT_WORDS];

  initial $readmemh("rtl/blowfish_init.hex", rom);

  assign data = (addr < 11'(INIT_WORDS)) ? rom[addr] : '0;
endmodule
