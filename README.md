# 128-bit pipelined Blowfish

A Blowfish cipher core that takes 128-bit blocks and a 64-bit key. Blowfish
itself works on 64-bit blocks; this core treats each 128-bit block as two
64-bit Blowfish blocks enciphered with the same key. The main idea is how it
gets the second half almost for free: the datapath is a 16-stage pipeline with
one Feistel round per stage, and each stage has only **one** round unit (the
"building block"). A select signal time-shares that unit between the two
64-bit halves, so one pipeline stage costs one round of logic but still
advances a full 128-bit block. Registers between the stages let a new 128-bit
block enter on every stage period.

The core also holds the key expansion: a 1042-word table of initial constants,
a controller that runs Blowfish's 521-encryption key schedule, the 18-word
P-array and the four S-boxes as one 1024 x 32 memory that every round unit
shares. Encryption and decryption use the same pipeline; the mode is chosen
per block.

## Blowfish in one page

With a 64-bit half split into a left word L and a right word R, and subkeys
P[0..17]:

    for i = 0 .. 15:  L = L ^ P[i];  R = R ^ F(L);  swap(L, R)
    swap(L, R);  R = R ^ P[16];  L = L ^ P[17]          (output whitening)

    F(x) = ((S1[x[31:24]] + S2[x[23:16]]) ^ S3[x[15:8]]) + S4[x[7:0]]   (mod 2^32)

Decryption is the same with P used in reverse order (P[17] down to P[2] in
the rounds, then P[1] and P[0] in the whitening).

The subkeys come from the key as follows. P and the S-boxes start from
fixed constants: the hex digits of pi after the point, 32 bits at a time, in
the order P[0..17], S1[0..255], S2, S3, S4 (so P[0] = 243F6A88). Each P word
is xored with 32 bits of the key, cycling through the key; with a 64-bit key
that is the upper key word into P[0], P[2], ... and the lower key word into
P[1], P[3], .... Then the all-zero block is enciphered with the current
subkeys, and the result replaces P[0], P[1]. That result is enciphered again
and replaces P[2], P[3], and so on through the P-array and all four S-boxes:
9 + 512 = 521 encryptions.

## The pipeline and the select signal

This is the part that needs the most care when using or changing the core.

Each stage (`blowfish_pipe_stage`) has a 130-bit stage register (valid, mode,
128 data bits), one round unit (`blowfish_round`), a selector in front of it
and a de-selector behind it:

    sel = 0 clock: round unit works on the LOW half  (data[63:0]);
                   its result goes into a 64-bit holding register
    sel = 1 clock: round unit works on the HIGH half (data[127:64]);
                   the stage register loads {high result, held low result}

All stage registers, the input register and the output register load on the
same `sel = 1` clocks. Call one such load a *move*. The intended drive is
`sel` = 0, 1, 0, 1, ... on successive clocks, so one move takes two clocks and
a stage period is two round delays long. An assertion in `blowfish_pipeline`
fires if `sel` is 1 on two clocks in a row (the holding register would then
be stale). Extra `sel = 0` clocks are harmless: the low half is simply
recomputed from an unchanged stage register, so holding `sel` at 0 freezes
the whole pipeline.

Timing, counted in moves:

| event | move |
|---|---|
| `din` captured into the input register (`in_valid` high on a `sel = 1` clock) | 0 |
| after round k (k = 1..16) | k |
| whitened result in `dout`, `out_valid` high | 17 |

So the latency is 17 moves = 34 clocks, and the throughput is one 128-bit
block per move (two clocks). `out_valid`/`dout` hold for the two clocks of a
move.

The subkey of stage k is P[k] when encrypting and P[17-k] when decrypting,
picked per block from the mode bit that travels with it, so encrypt and
decrypt blocks can follow each other in any order. The whitening sits between
the last stage register and the output register.

Each round unit reads the S-box memory through its own four combinational
read ports (64 for the pipeline, 4 for the key expansion), so a lookup never
waits. In an FPGA these would become replicated block RAMs or LUT ROMs; in
this RTL it is one array with 68 read ports.

## Key expansion

`blowfish_keysched` does the key schedule on its own round unit, one round
per clock:

1. **Copy** (1042 clocks): word i of the constant table goes into P[i]
   (xored with the key) for i < 18, otherwise into S-box address i - 18.
2. **Encrypt** (16 clocks): 16 rounds on the running {L, R}, starting from 0.
3. **Write** (2 clocks): whitening, then the left word and the right word go
   to P[2t], P[2t+1] for encryption t < 9, otherwise to S-box addresses
   2(t-9), 2(t-9)+1. The whitened pair stays in {L, R} as the next input.

Steps 2 and 3 repeat 521 times. `key_ready` rises 1042 + 521 x 18 = 10,420
clocks after the clock that took `key_load`. `key_load` is ignored while an
expansion is running. Because the expansion rewrites the memories the
pipeline reads, a key must not be loaded while blocks are in flight; blocks
offered while `key_ready` is low are dropped.

The S-box memory is addressed {S-box number, byte}: S1 at 0..255, S2 at
256..511, and so on.

## Interface (`blowfish128_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `clr` | in | 1 | asynchronous clear of all pipeline and control registers; also drops the key (`key_ready` falls). P-array and S-box contents are not cleared |
| `sel` | in | 1 | half select, alternate 0/1 every clock; the pipeline moves on `sel = 1` |
| `key`, `key_load` | in | 64, 1 | key and start pulse for key expansion |
| `key_ready` | out | 1 | subkeys valid; blocks are accepted |
| `in_valid`, `in_decrypt`, `din` | in | 1, 1, 128 | block, sampled on a `sel = 1` clock |
| `out_valid`, `out_decrypt`, `dout` | out | 1, 1, 128 | result 34 clocks later |

Bit order: `din[127:64]` is one 64-bit Blowfish block and `din[63:0]` the
other; in each, bits [63:32] are L. With key 0 and `din` = 0 the result is
`4EF997456198DD78_4EF997456198DD78`, the standard Blowfish test value.

## Modules

| file | role |
|---|---|
| `rtl/blowfish_pkg.sv` | sizes, word types, the pipeline block struct |
| `rtl/blowfish_init_rom.sv` + `rtl/blowfish_pi_init.hex` | 1042-word constant table (pi digits), combinational read |
| `rtl/blowfish_parray.sv` | 18 x 32 subkeys, all readable at once, one write port |
| `rtl/blowfish_sbox_mem.sv` | 1024 x 32 S-box memory, `NRD` read ports, one write port |
| `rtl/blowfish_f.sv` | F function: byte split into S-box addresses, add/xor/add |
| `rtl/blowfish_round.sv` | one Feistel round on a 64-bit half (combinational) |
| `rtl/blowfish_pipe_stage.sv` | selector, round unit, holding register, stage register |
| `rtl/blowfish_pipeline.sv` | input register, 16 stages, whitening, output register |
| `rtl/blowfish_keysched.sv` | key expansion controller with its own round unit |
| `rtl/blowfish128_top.sv` | everything wired together |

The hex table must be found as `rtl/blowfish_pi_init.hex` relative to the
directory the simulator runs in. It is simply the first 1042 x 8 hex digits
of the fractional part of pi, one 32-bit word per line.

## Where this follows the source architecture and where it chooses

Follows it: 128-bit block as two 64-bit Blowfish halves under a 64-bit key
sharing one S-box store; the S-boxes held as a single 1024 x 32 memory; one
Feistel building block (subkey xor + F) used twice per block through a
selector and de-selector; a register after every building block; a clear
that clears all registers; the select input changing once per stage period;
initial S-box and P values from a table; encryption and decryption on the
same hardware.

This design's own choices:

- **Synchronous select.** The source lets `sel` change in the middle of a
  clock period. Here the clock runs at twice the stage rate and `sel` is a
  signal sampled on it, with a holding register for the low half. One move
  of this design equals one clock period of the source; its 23 MHz stage
  rate (two 21.6 ns round delays on a Virtex-E) corresponds to a 46 MHz
  `clk` here. No timing was analysed for this RTL.
- **Writable S-box memory.** The source describes the S-boxes as a ROM of
  precomputed key-dependent values. Here key expansion writes the memory, so
  any key can be loaded at run time.
- Low half first, then high half.
- Handshake signals (`in_valid`, `out_valid`, `key_load`, `key_ready`) and
  the per-block mode bit.
- Input and output registers around the 16 stages, hence 17 moves latency.
- Only a 64-bit key; longer Blowfish keys (up to 448 bits) are not
  supported.

Not included: input padding (the core takes whole 128-bit blocks; framing a
message is left to the surrounding system), and the non-pipelined variants
of the architecture (two parallel 64-bit cores, or one 64-bit core reused
twice without stage registers).

## How far it has been checked

Each module has a self-checking testbench in `tb/`; `tb/bf_ref_pkg.sv` is a
plain software model of Blowfish used as the reference. The end-to-end
testbench `tb/tb_blowfish128_top.sv` runs the core at its full size and
checks:

- the published Blowfish test vectors for keys 0000000000000000,
  FFFFFFFFFFFFFFFF, 3000000000000000 and 0123456789ABCDEF, in both
  directions;
- random keys with random blocks, both modes mixed block by block,
  back-to-back at the full rate, every result with a latency of exactly
  34 clocks;
- decryption of the core's own ciphertext;
- a clear with the pipeline full, blocks offered without a key, rekeying;
- key expansion time of 10,420 clocks.

The key-expansion testbench compares the whole P-array and all 1024 S-box
words with the model for three keys. The whole suite runs in well under a
minute.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/blowfish_pkg.sv tb/bf_ref_pkg.sv tb/tb_blowfish128_top.sv \
        --top-module tb_blowfish128_top -o sim
    ./obj_dir/sim

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The other
testbenches (`tb_blowfish_keysched`, `tb_blowfish_pipeline`,
`tb_blowfish_pipe_stage`, `tb_blowfish_round`, `tb_blowfish_f`,
`tb_blowfish_sbox_mem`, `tb_blowfish_parray`, `tb_blowfish_init_rom`) are
built the same way.
