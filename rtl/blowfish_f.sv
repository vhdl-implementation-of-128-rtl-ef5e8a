// Blowfish F function.
//
// The 32-bit input x is cut into four bytes a (bits 31:24), b, c and
// d (bits 7:0).  Each byte addresses one of the four S-boxes in the shared
// S-box memory (S-box n at addresses 256(n-1) .. 256n-1); the four words
// that come back are combined as
//     F(x) = ((S1[a] + S2[b]) xor S3[c]) + S4[d]      (additions mod 2^32).
// The module is combinational: it drives the four memory addresses and
// forms F from the data the memory returns in the same cycle.
// The byte split and the add-xor-add combination are standard Blowfish;
// handing the lookups out as ports, so that one memory serves every
// round unit, is how this design shares its S-boxes.
module blowfish_f
  import blowfish_pkg::*;
(
  input  word_t  x,
  output saddr_t saddr [4],
  input  word_t  sdata [4],
  output word_t  f
);

  always_comb begin
    for (int n = 0; n < 4; n++)
      saddr[n] = {2'(n), x[31-8*n -: 8]};
    f = ((sdata[0] + sdata[1]) ^ sdata[2]) + sdata[3];
  end

endmodule
