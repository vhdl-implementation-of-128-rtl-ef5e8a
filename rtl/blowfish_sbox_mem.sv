// S-box memory: the four 256 x 32-bit Blowfish S-boxes as one 1024 x 32
// memory.
//
// Address {s, b} selects entry b of S-box s+1.  All building blocks of the
// core share this one memory: each has its own combinational read port
// (NRD ports in all), so a lookup costs no clock.  A single synchronous
// write port is used only by the key expansion, which fills the memory
// with the key-dependent S-box values before any data is enciphered.  In
// normal operation the memory is therefore read-only, like the 1024 x 32
// ROM of the memory-based F function it stands in for; making it writable
// lets the core accept any key.
//
// Timing: reads are combinational; a write lands at the clock edge.
module blowfish_sbox_mem
  import blowfish_pkg::*;
#(
  parameter int unsigned NRD   = 68,
  parameter int unsigned DEPTH = SBOX_DEPTH
) (
  input  logic   clk,
  input  logic   we,
  input  saddr_t waddr,
  input  word_t  wdata,
  input  saddr_t raddr [NRD],
  output word_t  rdata [NRD]
);

  word_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb
    for (int i = 0; i < NRD; i++) rdata[i] = mem[raddr[i]];

endmodule
