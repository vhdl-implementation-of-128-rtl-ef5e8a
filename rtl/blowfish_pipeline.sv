// 128-bit Blowfish datapath: input register, 16 pipeline stages and
// the output whitening.
//
// Each stage (blowfish_pipe_stage) performs one Feistel round on both
// 64-bit halves of its block by time sharing one building block under the
// select input, so the whole datapath holds 18 blocks at once and
// takes a new 128-bit block every two clocks.  All registers move on the
// clocks with sel = 1; sel is meant to alternate 0, 1, 0, 1 ..., and must
// never be 1 on two clocks in a row (checked by an assertion).  din is captured on a sel = 1 clock; its result is in dout
// 17 such moves (34 clocks) later.
//
// After the last round the output whitening undoes the last swap and
// applies the two remaining subkeys to each half:
//     encrypt: L = R16 xor P[17], R = L16 xor P[16]
//     decrypt: L = R16 xor P[0],  R = L16 xor P[1]
// (P indexed from 0).  Decryption is encryption with the P-array read in
// reverse order, so the same stages serve both.
//
// S-box lookups leave the module as 64 read ports; port 4k+n is
// lookup n of stage k.  clr clears every register asynchronously.
module blowfish_pipeline
  import blowfish_pkg::*;
(
  input  logic         clk,
  input  logic         clr,
  input  logic         sel,
  input  logic         in_valid,
  input  logic         in_decrypt,
  input  logic [127:0] din,
  input  word_t        p_all [NP],
  output saddr_t       saddr [4*NROUNDS],
  input  word_t        sdata [4*NROUNDS],
  output logic         out_valid,
  output logic         out_decrypt,
  output logic [127:0] dout
);

  localparam int unsigned ROUNDS = NROUNDS;

  bf_block_t stage [ROUNDS+1];   // stage[0] is the input register
  bf_block_t out_q;

  always_ff @(posedge clk or posedge clr) begin
    if (clr)      stage[0] <= '0;
    else if (sel) stage[0] <= '{valid: in_valid, decrypt: in_decrypt, data: din};
  end

  for (genvar k = 0; k < ROUNDS; k++) begin : g_stage
    saddr_t sa [4];
    word_t  sd [4];
    blowfish_pipe_stage #(.ROUND(k)) u_stage (
      .clk     (clk),
      .clr     (clr),
      .sel     (sel),
      .in_blk  (stage[k]),
      .p_all   (p_all),
      .saddr   (sa),
      .sdata   (sd),
      .out_blk (stage[k+1])
    );
    for (genvar n = 0; n < 4; n++) begin : g_port
      assign saddr[4*k+n] = sa[n];
      assign sd[n]        = sdata[4*k+n];
    end
  end

  // output whitening
  function automatic half_t whiten(half_t h, word_t pl, word_t pr);
    return {h[31:0] ^ pl, h[63:32] ^ pr};
  endfunction

  word_t wl, wr;
  assign wl = stage[ROUNDS].decrypt ? p_all[0] : p_all[NP-1];
  assign wr = stage[ROUNDS].decrypt ? p_all[1] : p_all[NP-2];

  always_ff @(posedge clk or posedge clr) begin
    if (clr) out_q <= '0;
    else if (sel)
      out_q <= '{valid:   stage[ROUNDS].valid,
                 decrypt: stage[ROUNDS].decrypt,
                 data:    {whiten(stage[ROUNDS].data[127:64], wl, wr),
                           whiten(stage[ROUNDS].data[63:0],   wl, wr)}};
  end

  assign out_valid   = out_q.valid;
  assign out_decrypt = out_q.decrypt;
  assign dout        = out_q.data;

  // A move (sel = 1) must be preceded by a sel = 0 clock, or the held
  // low-half result would be stale.  Extra sel = 0 clocks are harmless.
  a_sel_alternates: assert property (@(posedge clk) disable iff (clr) sel |=> !sel)
    else $error("sel high on two clocks in a row");

endmodule
