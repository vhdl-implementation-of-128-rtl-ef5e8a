// Feistel building block: one Blowfish round on a 64-bit half block.
//
// With din = {L, R} and subkey p the round computes
//     L' = L xor p,   R' = R xor F(L'),   dout = {R', L'}
// i.e. the two words are swapped on the way out, so sixteen blocks in a
// row form the sixteen rounds of Blowfish.  The block is combinational:
// the xor with the subkey, the F function and its four S-box lookups all
// lie on one path, which sets the stage time of the pipeline.  The
// S-box lookups leave the module as four address/data pairs so that all
// building blocks can share one S-box memory.  The round is the standard
// Blowfish round; putting the swap inside the block is this design's
// choice.
module blowfish_round
  import blowfish_pkg::*;
(
  input  half_t  din,
  input  word_t  p,
  output saddr_t saddr [4],
  input  word_t  sdata [4],
  output half_t  dout
);

  word_t xl, f;

  assign xl = din[63:32] ^ p;

  blowfish_f u_f (
    .x     (xl),
    .saddr (saddr),
    .sdata (sdata),
    .f     (f)
  );

  assign dout = {din[31:0] ^ f, xl};

endmodule
