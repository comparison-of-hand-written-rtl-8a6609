// blowfish_pi_rom: the 1042 initial Blowfish table words, read-only.
//
// Word i is bits 32*i .. 32*i+31 after the binary point of pi, i.e. the fractional
// hexadecimal digits of pi taken eight at a time: 0x243F6A88, 0x85A308D3, ...
// Words 0..17 seed the P-array, words 18..1041 seed S-boxes 0..3 in order. The
// contents are loaded from rtl/blowfish_pi.hex (one word per line).
// Interface: addr_i -> data_o, combinational read; addresses past 1041 read zero.
// The contents are fixed by Blowfish; holding them in a ROM that the key schedule copies
// from is this design's choice.
module blowfish_pi_rom
  import blowfish_pkg::*;
#(
  parameter string INIT_FILE = "rtl/blowfish_pi.hex"
) (
  input  table_addr_t addr_i,
  output word_t       data_o
);
  word_t rom [TABLE_WORDS];

  initial $readmemh(INIT_FILE, rom);

  assign data_o = (addr_i < table_addr_t'(TABLE_WORDS)) ? rom[addr_i] : '0;
endmodule
