// Testbench of blowfish_pipe_stage (round index 3): random blocks, modes,
// subkeys and S-boxes.  Each block is held for a sel = 0 clock and a
// sel = 1 clock; the stage register must then hold both halves advanced by
// one round with P[3] (encrypt) or P[14] (decrypt), must not change on
// sel = 0 clocks, and must be cleared by clr.
module tb_blowfish_pipe_stage;
  import blowfish_pkg::*;

  localparam int unsigned ROUND = 3;

  logic      clk = 0, clr, sel;
  bf_block_t in_blk, out_blk, prev;
  word_t     p_all [NP];
  saddr_t    saddr [4];
  word_t     sdata [4];
  word_t     sbox [4][256];
  int checks = 0, failures = 0;

  blowfish_pipe_stage #(.ROUND(ROUND)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int n = 0; n < 4; n++) sdata[n] = sbox[saddr[n][9:8]][saddr[n][7:0]];

  function automatic half_t model_round(half_t h, word_t p);
    word_t l, f;
    l = h[63:32] ^ p;
    f = ((sbox[0][l[31:24]] + sbox[1][l[23:16]]) ^ sbox[2][l[15:8]]) + sbox[3][l[7:0]];
    return {h[31:0] ^ f, l};
  endfunction

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bf_block_t exp_blk;
    word_t p;
    for (int s = 0; s < 4; s++)
      for (int j = 0; j < 256; j++) sbox[s][j] = $urandom;
    for (int i = 0; i < NP; i++) p_all[i] = $urandom;
    clr = 1; sel = 0; in_blk = '0;
    @(negedge clk);
    clr = 0;
    check(out_blk == '0, "cleared after clr");
    repeat (300) begin
      in_blk = '{valid: 1'($urandom), decrypt: 1'($urandom), data: {$urandom, $urandom, $urandom, $urandom}};
      sel = 0;
      prev = out_blk;
      @(negedge clk);
      check(out_blk == prev, "stage register holds on sel=0");
      sel = 1;
      @(negedge clk);
      p = in_blk.decrypt ? p_all[NP-1-ROUND] : p_all[ROUND];
      exp_blk = '{valid: in_blk.valid, decrypt: in_blk.decrypt,
                  data: {model_round(in_blk.data[127:64], p), model_round(in_blk.data[63:0], p)}};
      check(out_blk == exp_blk, "one round on both halves");
    end
    // asynchronous clear in mid-cycle
    #2 clr = 1;
    #1 check(out_blk == '0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
