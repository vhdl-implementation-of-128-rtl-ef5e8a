// Testbench of blowfish_round: with the standard initial S-boxes loaded
// from the table, 16 chained rounds plus the whitening done here must
// give the published Blowfish result for a known P-array (the all-zero key
// expanded by the reference model); random single rounds are checked
// against the round equations.
module tb_blowfish_round;
  import blowfish_pkg::*;
  import bf_ref_pkg::*;

  half_t  din, dout;
  word_t  p;
  saddr_t saddr [4];
  word_t  sdata [4];
  int checks = 0, failures = 0;
  bf_ref  ref_m;

  blowfish_round dut (.*);

  always_comb
    for (int n = 0; n < 4; n++) sdata[n] = (ref_m == null) ? '0 : ref_m.S[saddr[n][9:8]][saddr[n][7:0]];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t h, exp_h;
    word_t l, r;
    ref_m = new();
    ref_m.set_key(64'h0);
    // random single rounds
    repeat (500) begin
      din = {$urandom, $urandom}; p = $urandom;
      #1;
      l = din[63:32] ^ p;
      r = din[31:0] ^ ref_m.F(l);
      checks++;
      if (dout !== {r, l}) begin
        failures++;
        $display("FAIL round(%016h, %08h) = %016h expected %016h", din, p, dout, {r, l});
      end
    end
    // 16 chained rounds = Blowfish with key 0: 0 -> 4ef997456198dd78
    h = '0;
    for (int i = 0; i < 16; i++) begin
      din = h; p = ref_m.P[i];
      #1;
      h = dout;
    end
    exp_h = {h[31:0] ^ ref_m.P[17], h[63:32] ^ ref_m.P[16]};
    checks++;
    if (exp_h !== 64'h4ef997456198dd78) begin
      failures++;
      $display("FAIL 16 rounds gave %016h", exp_h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
