// 128-bit pipelined Blowfish cipher with a 64-bit key.
//
// The core enciphers or deciphers a 128-bit block as two independent
// 64-bit Blowfish blocks (high half din[127:64], low half din[63:0]) under
// the same key.  It is built from
//   - the initial-value ROM (hex digits of pi) and the key expansion
//     controller, which turn the 64-bit key into the 18 P-array subkeys
//     and the 1024 S-box words (10,420 clocks per key);
//   - the P-array and the S-box memory, shared by every building block;
//   - a 16-stage pipeline whose stages each hold one Feistel building
//     block that is used twice per block, once per 64-bit half, under the
//     select input.
//
// Operation: pulse key_load with the key; wait for key_ready.  Then drive
// sel 0, 1, 0, 1 ... one value per clock (the pipeline moves on the sel = 1
// clocks) and present a block with in_valid on a sel = 1 clock, at most one
// per two clocks.  The result appears on dout with out_valid 17 moves
// (34 clocks) after it was captured; in_decrypt selects decryption per
// block and comes back on out_decrypt.  Blocks presented while key_ready is
// low are dropped.  clr clears every register asynchronously and drops
// the key (key_ready falls); a new key must not be loaded while blocks are
// in the pipeline.
module blowfish128_top
  import blowfish_pkg::*;
(
  input  logic               clk,
  input  logic               clr,
  input  logic               sel,
  input  logic [KEY_W-1:0]   key,
  input  logic               key_load,
  output logic               key_ready,
  input  logic               in_valid,
  input  logic               in_decrypt,
  input  logic [127:0]       din,
  output logic               out_valid,
  output logic               out_decrypt,
  output logic [127:0]       dout
);

  localparam int unsigned NRD_PIPE = 4 * NROUNDS;
  localparam int unsigned NRD      = NRD_PIPE + 4;

  logic               busy;
  logic [INIT_AW-1:0] rom_addr;
  word_t              rom_data;
  word_t              p_all [NP];
  logic               p_we, s_we;
  logic [4:0]         p_waddr;
  word_t              p_wdata, s_wdata;
  saddr_t             s_waddr;
  saddr_t             raddr [NRD];
  word_t              rdata [NRD];
  saddr_t             pipe_saddr [NRD_PIPE];
  word_t              pipe_sdata [NRD_PIPE];
  saddr_t             ks_saddr [4];
  word_t              ks_sdata [4];

  blowfish_init_rom u_rom (
    .addr (rom_addr),
    .data (rom_data)
  );

  blowfish_parray u_parray (
    .clk   (clk),
    .we    (p_we),
    .waddr (p_waddr),
    .wdata (p_wdata),
    .p     (p_all)
  );

  blowfish_sbox_mem #(.NRD(NRD)) u_sbox (
    .clk   (clk),
    .we    (s_we),
    .waddr (s_waddr),
    .wdata (s_wdata),
    .raddr (raddr),
    .rdata (rdata)
  );

  blowfish_keysched u_keysched (
    .clk       (clk),
    .clr       (clr),
    .key       (key),
    .key_load  (key_load),
    .busy      (busy),
    .key_ready (key_ready),
    .rom_addr  (rom_addr),
    .rom_data  (rom_data),
    .p_all     (p_all),
    .p_we      (p_we),
    .p_waddr   (p_waddr),
    .p_wdata   (p_wdata),
    .s_we      (s_we),
    .s_waddr   (s_waddr),
    .s_wdata   (s_wdata),
    .saddr     (ks_saddr),
    .sdata     (ks_sdata)
  );

  blowfish_pipeline u_pipe (
    .clk         (clk),
    .clr         (clr),
    .sel         (sel),
    .in_valid    (in_valid && key_ready),
    .in_decrypt  (in_decrypt),
    .din         (din),
    .p_all       (p_all),
    .saddr       (pipe_saddr),
    .sdata       (pipe_sdata),
    .out_valid   (out_valid),
    .out_decrypt (out_decrypt),
    .dout        (dout)
  );

  // S-box read ports: 0..63 pipeline, 64..67 key expansion.
  always_comb begin
    for (int i = 0; i < NRD_PIPE; i++) begin
      raddr[i]      = pipe_saddr[i];
      pipe_sdata[i] = rdata[i];
    end
    for (int n = 0; n < 4; n++) begin
      raddr[NRD_PIPE+n] = ks_saddr[n];
      ks_sdata[n]       = rdata[NRD_PIPE+n];
    end
  end

  // Blocks are only taken with a complete key schedule in place.
  a_no_key_while_busy: assert property (@(posedge clk) disable iff (clr) busy |-> !key_ready)
    else $error("key_ready high during key expansion");

endmodule
