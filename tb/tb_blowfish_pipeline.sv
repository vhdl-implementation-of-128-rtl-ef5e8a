// Testbench of blowfish_pipeline: the P-array and S-boxes come from the
// reference model after a key expansion with a random key, and the model
// also supplies the expected results.  Blocks (random data, random mode,
// random gaps, then back-to-back) are streamed in under an alternating
// sel; every result is checked in order, with its mode flag, and must
// arrive exactly 17 pipeline moves after its block was captured, also
// when sel is held at 0 for extra clocks (a pause).  A clear
// in mid-stream must empty the pipeline.
module tb_blowfish_pipeline;
  import blowfish_pkg::*;
  import bf_ref_pkg::*;

  localparam int unsigned LATENCY = 17;   // moves from din to dout

  logic         clk = 0, clr, sel;
  logic         in_valid, in_decrypt, out_valid, out_decrypt;
  logic [127:0] din, dout;
  word_t        p_all [NP];
  saddr_t       saddr [4*NROUNDS];
  word_t        sdata [4*NROUNDS];
  int checks = 0, failures = 0;
  bf_ref ref_m;

  typedef struct {
    int           adv;
    logic         dec;
    logic [127:0] data;
  } item_t;
  item_t q [$];

  blowfish_pipeline dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < 4*NROUNDS; i++)
      sdata[i] = (ref_m == null) ? '0 : ref_m.S[saddr[i][9:8]][saddr[i][7:0]];

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int adv = 0, results = 0, r0, n_stall = 0;
  bit stall_on = 0;

  // One pipeline move: a sel = 0 clock, then a sel = 1 clock that may
  // carry a new block.
  task automatic move(logic v, logic dec, logic [127:0] d);
    item_t it;
    @(negedge clk);
    sel = 0; in_valid = 0;
    // extra sel = 0 clocks must only pause the pipeline
    if (stall_on && ($urandom % 4) == 0) begin
      repeat (1 + $urandom % 3) @(negedge clk);
      n_stall++;
    end
    @(negedge clk);
    sel = 1; in_valid = v; in_decrypt = dec; din = d;
    @(posedge clk);
    adv++;
    if (v) q.push_back('{adv: adv, dec: dec, data: ref_m.cipher128(d, dec)});
    #1;
    if (out_valid) begin
      results++;
      if (q.size() == 0) check(0, "unexpected result");
      else begin
        it = q.pop_front();
        check(dout == it.data, "result data");
        check(out_decrypt == it.dec, "result mode");
        check(adv - it.adv == LATENCY, "latency of 17 moves");
      end
    end
  endtask

  initial begin
    ref_m = new();
    ref_m.set_key({$urandom, $urandom});
    for (int i = 0; i < NP; i++) p_all[i] = ref_m.P[i];
    clr = 1; sel = 1; in_valid = 0; in_decrypt = 0; din = '0;
    #12 clr = 0;
    // sparse traffic
    repeat (60) move(($urandom % 3) == 0, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    // traffic with pauses (sel held at 0 for extra clocks)
    stall_on = 1;
    repeat (60) move(1'b1, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    stall_on = 0;
    check(n_stall > 0, "pauses happened");
    // back-to-back traffic
    repeat (80) move(1'b1, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    // clear with the pipeline full
    @(negedge clk);
    clr = 1;
    #1 check(!out_valid, "clr empties the output");
    @(negedge clk);
    clr = 0; sel = 0;
    check(results > 50, "results streamed before the clear");
    q.delete();
    r0 = results;
    repeat (LATENCY + 2) move(1'b0, 1'b0, '0);
    check(results == r0, "nothing left in the pipeline after clr");
    // after the clear: round trip through the pipeline
    repeat (40) move(1'b1, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    repeat (LATENCY + 1) move(1'b0, 1'b0, '0);
    check(q.size() == 0, "pipeline drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
