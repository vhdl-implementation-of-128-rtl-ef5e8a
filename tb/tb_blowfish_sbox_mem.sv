// Testbench of blowfish_sbox_mem: fills the whole memory through the
// write port with random words, then reads random addresses on all read
// ports at once and compares with a model array; also checks that a write
// is visible on every port that reads its address right after the edge.
module tb_blowfish_sbox_mem;
  import blowfish_pkg::*;

  localparam int unsigned NRD = 8;

  logic   clk = 0;
  logic   we;
  saddr_t waddr;
  word_t  wdata;
  saddr_t raddr [NRD];
  word_t  rdata [NRD];
  word_t  model [SBOX_DEPTH];
  int checks = 0, failures = 0;

  blowfish_sbox_mem #(.NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ports();
    #1;
    for (int i = 0; i < NRD; i++) begin
      checks++;
      if (rdata[i] !== model[raddr[i]]) begin
        failures++;
        $display("FAIL port %0d addr %0d: %08h expected %08h", i, raddr[i], rdata[i], model[raddr[i]]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int i = 0; i < NRD; i++) raddr[i] = '0;
    @(negedge clk);
    for (int a = 0; a < SBOX_DEPTH; a++) begin
      we = 1; waddr = saddr_t'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    repeat (200) begin
      for (int i = 0; i < NRD; i++) raddr[i] = saddr_t'($urandom);
      check_ports();
    end
    // write then read back on all ports
    repeat (20) begin
      @(negedge clk);
      we = 1; waddr = saddr_t'($urandom); wdata = $urandom; model[waddr] = wdata;
      for (int i = 0; i < NRD; i++) raddr[i] = waddr;
      @(negedge clk);
      we = 0;
      check_ports();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
