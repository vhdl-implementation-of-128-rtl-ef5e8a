// P-array: the 18 32-bit Blowfish subkeys.
//
// All 18 words are visible at once, because every pipeline stage needs
// its own subkey in the same clock (stage k uses P[k] when encrypting and
// P[17-k] when decrypting, and the output whitening uses two more).  One
// synchronous write port lets the key expansion rewrite the words.  There
// is no reset: the contents are only meaningful after a key expansion.
// The parallel read-out and the single write port are this design's
// choices; the 18 subkeys are Blowfish's.
module blowfish_parray
  import blowfish_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [4:0] waddr,
  input  word_t      wdata,
  output word_t      p [NP]
);

  word_t regs [NP];

  always_ff @(posedge clk)
    if (we && 32'(waddr) < NP) regs[waddr] <= wdata;

  assign p = regs;

endmodule
