// Testbench of blowfish_keysched, connected to the initial-value ROM, a
// P-array and an S-box memory.  For the all-zero key and two random keys
// the P-array and all 1024 S-box words after key expansion must equal the
// reference model's, and key_ready must rise 10,420 clocks after the clock
// that took key_load.  A key_load while busy must be ignored, and clr in
// mid-expansion must stop it with key_ready low.
module tb_blowfish_keysched;
  import blowfish_pkg::*;
  import bf_ref_pkg::*;

  localparam int unsigned KEY_CLOCKS = INIT_DEPTH + 521 * (NROUNDS + 2);  // 10,420

  logic               clk = 0, clr, key_load, busy, key_ready;
  logic [KEY_W-1:0]   key;
  logic [INIT_AW-1:0] rom_addr;
  word_t              rom_data;
  word_t              p_all [NP];
  logic               p_we, s_we;
  logic [4:0]         p_waddr;
  word_t              p_wdata, s_wdata;
  saddr_t             s_waddr;
  saddr_t             saddr [4];
  word_t              sdata [4];
  int checks = 0, failures = 0;
  bf_ref ref_m;

  blowfish_keysched dut (.*);
  blowfish_init_rom u_rom (.addr(rom_addr), .data(rom_data));
  blowfish_parray   u_p   (.clk(clk), .we(p_we), .waddr(p_waddr), .wdata(p_wdata), .p(p_all));
  blowfish_sbox_mem #(.NRD(4)) u_s (.clk(clk), .we(s_we), .waddr(s_waddr), .wdata(s_wdata),
                                    .raddr(saddr), .rdata(sdata));

  always #5 clk = ~clk;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expand(logic [63:0] k);
    int n, bad;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    n = 1;
    // a second key_load while busy must change nothing
    repeat (100) begin @(negedge clk); n++; end
    key = ~k; key_load = 1;
    @(negedge clk); n++;
    key_load = 0;
    while (!key_ready) begin @(negedge clk); n++; end
    check(n == KEY_CLOCKS + 1, $sformatf("key ready after %0d clocks", n - 1));
    check(!busy, "idle when ready");
    ref_m.set_key(k);
    bad = 0;
    for (int i = 0; i < NP; i++) if (p_all[i] !== ref_m.P[i]) bad++;
    check(bad == 0, $sformatf("P-array (%0d words wrong)", bad));
    bad = 0;
    for (int a = 0; a < SBOX_DEPTH; a++) if (u_s.mem[a] !== ref_m.S[a/256][a%256]) bad++;
    check(bad == 0, $sformatf("S-boxes (%0d words wrong)", bad));
  endtask

  initial begin
    ref_m = new();
    clr = 1; key_load = 0; key = '0;
    #12 clr = 0;
    check(!key_ready && !busy, "idle after clr");
    expand(64'h0);
    // spot check: encryption with the expanded key gives the published value
    check(ref_m.encrypt(64'h0) == 64'h4ef997456198dd78, "reference known answer");
    expand({$urandom, $urandom});
    // clear in mid-expansion
    @(negedge clk);
    key = 64'h0123456789abcdef; key_load = 1;
    @(negedge clk);
    key_load = 0;
    repeat (3000) @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    check(!busy && !key_ready, "clr stops the expansion");
    expand({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
