// Initial-value ROM of the Blowfish key expansion.
//
// Holds the 18 initial P-array words followed by the 1024 initial S-box
// words (S-box 1 entries 0..255, then S-boxes 2, 3 and 4).  The values are
// the fractional part of pi written in hexadecimal, taken 32 bits at a time
// in order: word i is hex digits 8i+1 .. 8i+8 after the point of pi
// (word 0 = 243F6A88).  The key expansion copies this table into the
// P-array and the S-box memory before it mixes in the key.
//
// Interface: word address in, word out, combinational read (the key
// expansion reads one word per clock).  The table is loaded from
// rtl/blowfish_pi_init.hex, one 32-bit hex word per line.
//
// A ROM of initial values feeding the S-boxes is part of the architecture;
// the combinational read port is this design's choice.
module blowfish_init_rom
  import blowfish_pkg::*;
#(
  parameter int unsigned DEPTH = INIT_DEPTH
) (
  input  logic [INIT_AW-1:0] addr,
  output word_t              data
);

  word_t rom [DEPTH];

  initial $readmemh("rtl/blowfish_pi_init.hex", rom);

  always_comb data = (32'(addr) < DEPTH) ? rom[addr] : '0;

endmodule
