// Shared types and constants of the 128-bit pipelined Blowfish core.
//
// A 128-bit block is two independent 64-bit Blowfish blocks; each 64-bit
// half is split into a left word L (upper 32 bits) and a right word R.
// The four 256-entry S-boxes live in one 1024 x 32 memory addressed by
// {S-box number, byte}, so an S-box address is 10 bits wide.  The P-array
// holds 18 subkeys.  These sizes are those of standard Blowfish.
package blowfish_pkg;

  localparam int unsigned NP        = 18;    // P-array words
  localparam int unsigned NROUNDS   = 16;    // Feistel rounds
  localparam int unsigned SBOX_AW   = 10;    // 4 S-boxes x 256 entries
  localparam int unsigned SBOX_DEPTH = 1024;
  localparam int unsigned INIT_DEPTH = NP + SBOX_DEPTH;  // 1042 words
  localparam int unsigned INIT_AW   = 11;
  localparam int unsigned KEY_W     = 64;

  typedef logic [31:0]        word_t;
  typedef logic [63:0]        half_t;
  typedef logic [SBOX_AW-1:0] saddr_t;

  // A block travelling down the pipeline.
  typedef struct packed {
    logic         valid;
    logic         decrypt;   // 1: P-array used in reverse order
    logic [127:0] data;      // [127:64] high half, [63:0] low half
  } bf_block_t;

endpackage
