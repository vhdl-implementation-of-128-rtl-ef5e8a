// One stage of the 128-bit Blowfish pipeline.
//
// The stage owns a single Feistel building block and uses it twice per
// 128-bit block, once for each 64-bit half.  A selector in front of the
// block picks the half named by the select input: the low half
// in_blk.data[63:0] when sel = 0, the high half in_blk.data[127:64] when
// sel = 1.  A de-selector behind it keeps the low-half result in a 64-bit
// holding register on the sel = 0 clock, and on the sel = 1 clock loads the
// 128-bit stage register with {high-half result, held low-half result}.
// So the stage register, like every register of the pipeline, moves on
// once every two clocks, and the select signal changes once between two
// of those moves.
//
// The subkey is P[ROUND] for encryption and P[17-ROUND] for decryption,
// chosen per block from its decrypt flag, so both modes can be mixed in
// the pipeline.  clr clears the stage register and the holding register
// at once (asynchronous).
//
// The sel = 0 / sel = 1 order, the holding register and the per-block
// mode flag are choices of this design; the time-shared building block
// with selector, de-selector and a register after it follows the
// architecture.
module blowfish_pipe_stage
  import blowfish_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic      clk,
  input  logic      clr,
  input  logic      sel,
  input  bf_block_t in_blk,
  input  word_t     p_all [NP],
  output saddr_t    saddr [4],
  input  word_t     sdata [4],
  output bf_block_t out_blk
);

  half_t half_in, half_out, hold;
  word_t p;

  // selector
  assign half_in = sel ? in_blk.data[127:64] : in_blk.data[63:0];
  assign p       = in_blk.decrypt ? p_all[NP-1-ROUND] : p_all[ROUND];

  blowfish_round u_round (
    .din   (half_in),
    .p     (p),
    .saddr (saddr),
    .sdata (sdata),
    .dout  (half_out)
  );

  // de-selector
  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      hold    <= '0;
      out_blk <= '0;
    end else if (!sel) begin
      hold    <= half_out;
    end else begin
      out_blk <= '{valid: in_blk.valid, decrypt: in_blk.decrypt,
                   data: {half_out, hold}};
    end
  end

endmodule
