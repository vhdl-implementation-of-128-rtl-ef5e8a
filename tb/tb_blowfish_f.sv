// Testbench of blowfish_f: a random S-box model answers the four lookups;
// F is recomputed here from the bytes of x and compared, and each address
// is checked to select the right S-box and byte.
module tb_blowfish_f;
  import blowfish_pkg::*;

  word_t  x, f;
  saddr_t saddr [4];
  word_t  sdata [4];
  word_t  sbox [4][256];
  int checks = 0, failures = 0;

  blowfish_f dut (.*);

  always_comb
    for (int n = 0; n < 4; n++) sdata[n] = sbox[saddr[n][9:8]][saddr[n][7:0]];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_f;
    for (int s = 0; s < 4; s++)
      for (int j = 0; j < 256; j++) sbox[s][j] = $urandom;
    repeat (1000) begin
      x = $urandom;
      #1;
      exp_f = sbox[0][x[31:24]] + sbox[1][x[23:16]];
      exp_f = exp_f ^ sbox[2][x[15:8]];
      exp_f = exp_f + sbox[3][x[7:0]];
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL F(%08h) = %08h expected %08h", x, f, exp_f);
      end
      checks++;
      if (saddr[0] !== {2'd0, x[31:24]} || saddr[1] !== {2'd1, x[23:16]} ||
          saddr[2] !== {2'd2, x[15:8]}  || saddr[3] !== {2'd3, x[7:0]}) begin
        failures++;
        $display("FAIL addresses for x=%08h", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
