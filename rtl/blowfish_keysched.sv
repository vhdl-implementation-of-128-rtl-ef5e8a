// Blowfish key expansion controller.
//
// On key_load the controller
//   1. copies the 1042-word initial table (18 P words, then 1024 S-box
//      words) into the P-array and the S-box memory, one word per clock,
//      xoring each P word with the key (the 64-bit key repeated: P1 with
//      its upper 32 bits, P2 with its lower 32 bits, P3 with the upper
//      again, and so on);
//   2. enciphers the all-zero 64-bit block with the subkeys as they stand
//      and writes the result over P1, P2; enciphers that result and writes
//      it over P3, P4; and so on through the P-array and then through all
//      four S-boxes, 521 encryptions in all.
// Each encryption runs on a building block of its own, one round per
// clock (16 clocks), followed by two write clocks in which the output
// whitening is applied and the two result words are stored.  A key takes
// 1042 + 521 * 18 = 10,420 clocks; key_ready rises when it is done and
// stays high until the next key_load or clr.  key_load is ignored while
// busy.  The S-box memory is read through one 4-port group (saddr/sdata).
//
// The steps are those of Blowfish's key schedule; the copy-then-iterate
// sequencing and the one-round-per-clock timing are this design's own.
module blowfish_keysched
  import blowfish_pkg::*;
(
  input  logic               clk,
  input  logic               clr,
  input  logic [KEY_W-1:0]   key,
  input  logic               key_load,
  output logic               busy,
  output logic               key_ready,
  // initial-value ROM
  output logic [INIT_AW-1:0] rom_addr,
  input  word_t              rom_data,
  // P-array
  input  word_t              p_all [NP],
  output logic               p_we,
  output logic [4:0]         p_waddr,
  output word_t              p_wdata,
  // S-box memory
  output logic               s_we,
  output saddr_t             s_waddr,
  output word_t              s_wdata,
  output saddr_t             saddr [4],
  input  word_t              sdata [4]
);

  typedef enum logic [2:0] {IDLE, COPY, ENC, WR_L, WR_R} state_t;

  localparam int unsigned NENC = (NP + SBOX_DEPTH) / 2;  // 521

  state_t             state;
  logic [KEY_W-1:0]   key_q;
  logic [INIT_AW-1:0] idx;     // copy index
  logic [3:0]         rnd;     // round of the running encryption
  logic [9:0]         t;       // encryption number 0 .. NENC-1
  word_t              l, r;
  half_t              rnd_out;
  word_t              cl, cr;  // whitened result

  blowfish_round u_round (
    .din   ({l, r}),
    .p     (p_all[{1'b0, rnd}]),
    .saddr (saddr),
    .sdata (sdata),
    .dout  (rnd_out)
  );

  // Output whitening after 16 rounds (undo the last swap).
  assign cl = r ^ p_all[NP-1];
  assign cr = l ^ p_all[NP-2];

  // Destination of word 0 or 1 of encryption t: P words first, then S.
  logic         to_p;
  logic [8:0]   t_s;           // t - 9: encryption number within the S-boxes
  logic [9:0]   dst;           // 2t into the P-array, or 2(t-9) into the S-boxes
  assign to_p = t < 10'(NP/2);
  assign t_s  = 9'(t - 10'(NP/2));
  assign dst  = to_p ? {t[8:0], 1'b0} : {t_s, 1'b0};

  always_comb begin
    rom_addr = idx;
    p_we     = 1'b0;
    p_waddr  = '0;
    p_wdata  = '0;
    s_we     = 1'b0;
    s_waddr  = '0;
    s_wdata  = '0;
    unique case (state)
      COPY: begin
        if (32'(idx) < NP) begin
          p_we    = 1'b1;
          p_waddr = idx[4:0];
          p_wdata = rom_data ^ (idx[0] ? key_q[31:0] : key_q[63:32]);
        end else begin
          s_we    = 1'b1;
          s_waddr = SBOX_AW'(idx - INIT_AW'(NP));
          s_wdata = rom_data;
        end
      end
      WR_L: begin
        p_we    = to_p;
        s_we    = !to_p;
        p_waddr = dst[4:0];
        s_waddr = dst[9:0];
        p_wdata = cl;
        s_wdata = cl;
      end
      WR_R: begin
        p_we    = to_p;
        s_we    = !to_p;
        p_waddr = dst[4:0] | 5'd1;
        s_waddr = dst[9:0] | 10'd1;
        p_wdata = r;
        s_wdata = r;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      state     <= IDLE;
      key_q     <= '0;
      idx       <= '0;
      rnd       <= '0;
      t         <= '0;
      l         <= '0;
      r         <= '0;
      key_ready <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (key_load) begin
          key_q     <= key;
          idx       <= '0;
          key_ready <= 1'b0;
          state     <= COPY;
        end
        COPY: begin
          idx <= idx + 1'b1;
          if (32'(idx) == INIT_DEPTH - 1) begin
            l     <= '0;
            r     <= '0;
            rnd   <= '0;
            t     <= '0;
            state <= ENC;
          end
        end
        ENC: begin
          {l, r} <= rnd_out;
          rnd    <= rnd + 1'b1;
          if (rnd == 4'(NROUNDS - 1)) state <= WR_L;
        end
        WR_L: begin
          l     <= cl;
          r     <= cr;
          state <= WR_R;
        end
        WR_R: begin
          rnd <= '0;
          t   <= t + 1'b1;
          if (32'(t) == NENC - 1) begin
            key_ready <= 1'b1;
            state     <= IDLE;
          end else begin
            state <= ENC;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
