// Testbench of blowfish_init_rom: checks published Blowfish initial
// constants (first and last P words, first and last words of each S-box)
// and a sum and xor over the whole table, both taken from the hex
// expansion of pi.
module tb_blowfish_init_rom;
  import blowfish_pkg::*;

  logic [INIT_AW-1:0] addr;
  word_t              data;
  int checks = 0, failures = 0;

  blowfish_init_rom dut (.addr(addr), .data(data));

  task automatic expect_word(int a, word_t v);
    addr = INIT_AW'(a);
    #1;
    checks++;
    if (data !== v) begin
      failures++;
      $display("FAIL rom[%0d] = %08h, expected %08h", a, data, v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t sum, x;
    expect_word(0,  32'h243f6a88);
    expect_word(1,  32'h85a308d3);
    expect_word(2,  32'h13198a2e);
    expect_word(3,  32'h03707344);
    expect_word(17, 32'h8979fb1b);
    expect_word(18, 32'hd1310ba6);     // S1[0]
    expect_word(19, 32'h98dfb5ac);     // S1[1]
    expect_word(18+256, 32'h4b7a70e9); // S2[0]
    expect_word(18+512, 32'he93d5a68); // S3[0]
    expect_word(18+768, 32'h3a39ce37); // S4[0]
    expect_word(1041, 32'h3ac372e6);   // S4[255]
    sum = '0; x = '0;
    for (int a = 0; a < INIT_DEPTH; a++) begin
      addr = INIT_AW'(a);
      #1;
      sum += data;
      x   ^= data;
    end
    checks++;
    if (sum !== 32'h6bbf03ac || x !== 32'h6ffa520a) begin
      failures++;
      $display("FAIL table sum %08h xor %08h", sum, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
