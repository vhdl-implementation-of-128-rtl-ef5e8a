// Testbench of blowfish_parray: random writes to random words (including
// out-of-range indices, which must be ignored) against a model; all 18
// outputs are compared after every write.
module tb_blowfish_parray;
  import blowfish_pkg::*;

  logic       clk = 0;
  logic       we;
  logic [4:0] waddr;
  word_t      wdata;
  word_t      p [NP];
  word_t      model [NP];
  int checks = 0, failures = 0;

  blowfish_parray dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      we = 1; waddr = 5'(i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    repeat (300) begin
      we = ($urandom % 4) != 0; waddr = 5'($urandom); wdata = $urandom;
      if (we && 32'(waddr) < NP) model[waddr] = wdata;
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        checks++;
        if (p[i] !== model[i]) begin
          failures++;
          $display("FAIL P[%0d] = %08h expected %08h", i, p[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
