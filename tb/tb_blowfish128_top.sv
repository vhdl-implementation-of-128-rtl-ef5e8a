// End-to-end testbench of blowfish128_top at its default size.
//
// Loads keys through the key expansion and streams 128-bit blocks under
// an alternating select signal, comparing every result with the reference
// model: published Blowfish known-answer vectors (each placed in both
// 64-bit halves), random blocks in both modes with mode switches from one
// block to the next, back-to-back blocks at the full rate of one block per
// two clocks, decryption of the core's own ciphertext, a clear with the
// pipeline full, blocks offered while no key is ready (dropped) and a
// change of key.  Checks the 34-clock latency, the 10,420-clock key
// expansion and counts how often each of these happened.
module tb_blowfish128_top;
  import blowfish_pkg::*;
  import bf_ref_pkg::*;

  localparam int unsigned LATENCY_CLK = 34;
  localparam int unsigned KEY_CLOCKS  = 10420;

  logic         clk = 0, clr, sel, key_load, key_ready;
  logic [63:0]  key;
  logic         in_valid, in_decrypt, out_valid, out_decrypt;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  bf_ref ref_m;

  blowfish128_top dut (.*);

  always #5 clk = ~clk;

  // clock count, from the simulation time (period 10)
  function automatic int cyc();
    return int'($time / 10);
  endfunction

  typedef struct {
    int           cyc;
    logic         dec;
    logic [127:0] data;
  } item_t;
  item_t q [$];

  // event counters
  int n_key = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_b2b = 0, n_clear = 0,
      n_drop = 0, n_kat = 0, n_roundtrip = 0;
  int last_out_cyc = -100;
  logic last_dec = 0;
  logic [127:0] last_cipher;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pipeline move: a sel = 0 clock, then a sel = 1 clock that may carry
  // a block.  Results are checked right after the sel = 1 edge.
  task automatic move(logic v, logic dec, logic [127:0] d);
    item_t it;
    logic  kr;
    @(negedge clk);
    sel = 0; in_valid = 0;
    @(negedge clk);
    sel = 1; in_valid = v; in_decrypt = dec; din = d;
    kr = key_ready;          // the value the core samples at the next edge
    @(posedge clk);
    if (v && kr) begin
      q.push_back('{cyc: cyc(), dec: dec, data: ref_m.cipher128(d, dec)});
      if (dec) n_dec++; else n_enc++;
      if (dec != last_dec) n_switch++;
      last_dec = dec;
    end
    if (v && !kr) n_drop++;
    #1;
    if (out_valid) begin
      if (q.size() == 0) check(0, "unexpected result");
      else begin
        it = q.pop_front();
        check(dout == it.data, "result data");
        check(out_decrypt == it.dec, "result mode");
        check(cyc() - it.cyc == LATENCY_CLK, $sformatf("latency %0d clocks", cyc() - it.cyc));
        if (cyc() - last_out_cyc == 2) n_b2b++;
        last_out_cyc = cyc();
        last_cipher  = dout;
      end
    end
  endtask

  task automatic drain();
    repeat (18) move(1'b0, 1'b0, '0);
    check(q.size() == 0, "pipeline drained");
  endtask

  task automatic load_key(logic [63:0] k);
    int c0;
    @(negedge clk);
    sel = 0; key = k; key_load = 1;
    @(posedge clk);
    c0 = cyc();
    @(negedge clk);
    key_load = 0;
    ref_m.set_key(k);
    // Blocks offered during the expansion are dropped; the one offered
    // as key_ready rises is taken and must come out right.
    while (!key_ready) move(1'b1, 1'b0, {$urandom, $urandom, $urandom, $urandom});
    check(q.size() <= 1, "no block accepted during key expansion");
    n_key++;
    $display("key %016h ready after about %0d clocks", k, cyc() - c0);
    check(cyc() - c0 >= KEY_CLOCKS && cyc() - c0 <= KEY_CLOCKS + 2, "key expansion time");
    drain();
  endtask

  task automatic kat(logic [63:0] k, logic [63:0] pt, logic [63:0] ct);
    load_key(k);
    move(1'b1, 1'b0, {pt, pt});
    drain();
    check(last_cipher == {ct, ct}, $sformatf("known answer, key %016h", k));
    move(1'b1, 1'b1, {ct, pt ^ 64'h1});
    drain();
    check(last_cipher[127:64] == pt, "known answer decrypts");
    n_kat++;
  endtask

  initial begin
    logic [127:0] pt;
    ref_m = new();
    clr = 1; sel = 0; key_load = 0; key = '0; in_valid = 0; in_decrypt = 0; din = '0;
    #12 clr = 0;
    check(!key_ready, "no key after clr");

    // published Blowfish test vectors
    kat(64'h0000000000000000, 64'h0000000000000000, 64'h4ef997456198dd78);
    kat(64'hffffffffffffffff, 64'hffffffffffffffff, 64'h51866fd5b85ecb8a);
    kat(64'h3000000000000000, 64'h1000000000000001, 64'h7d856f9a613063f2);
    kat(64'h0123456789abcdef, 64'h1111111111111111, 64'h61f9c3802281b096);

    // random key, random traffic in both modes
    load_key({$urandom, $urandom});
    repeat (40)  move(($urandom % 3) == 0, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    repeat (100) move(1'b1, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    drain();

    // encrypt, then decrypt the core's own output
    pt = {$urandom, $urandom, $urandom, $urandom};
    move(1'b1, 1'b0, pt);
    drain();
    move(1'b1, 1'b1, last_cipher);
    drain();
    check(last_cipher == pt, "round trip through the core");
    n_roundtrip++;

    // clear with the pipeline full: nothing comes out, the key is gone
    repeat (20) move(1'b1, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    @(negedge clk);
    clr = 1;
    #1 check(!out_valid && !key_ready, "clr clears outputs and key");
    q.delete();
    n_clear++;
    @(negedge clk);
    clr = 0; sel = 0;
    repeat (20) move(1'b1, 1'b0, {$urandom, $urandom, $urandom, $urandom});
    check(q.size() == 0 && !out_valid, "no blocks accepted without a key");

    // new key after the clear
    load_key({$urandom, $urandom});
    repeat (60) move(1'b1, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    drain();

    $display("key expansions %0d, known answers %0d, encrypt %0d, decrypt %0d, mode switches %0d",
             n_key, n_kat, n_enc, n_dec, n_switch);
    $display("back-to-back results %0d, clears %0d, dropped blocks %0d, round trips %0d",
             n_b2b, n_clear, n_drop, n_roundtrip);
    check(n_key > 0,  "key expansion happened");
    check(n_kat == 4, "known answers ran");
    check(n_enc > 0 && n_dec > 0, "both modes used");
    check(n_switch > 0, "mode switch happened");
    check(n_b2b > 50, "full-rate streaming happened");
    check(n_clear > 0, "clear happened");
    check(n_drop > 0, "blocks dropped without a key");
    check(n_roundtrip > 0, "round trip happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
