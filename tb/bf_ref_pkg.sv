// Behavioural Blowfish reference for the testbenches.
//
// A plain software model of Blowfish with a 64-bit key: key schedule,
// 64-bit encryption and decryption, and the 128-bit two-half wrapper.  It
// is written independently of the RTL (loops over arrays, no pipeline) and
// reads the initial constants from the same table as the ROM; the
// known-answer vectors in the testbenches check that table and this model.
package bf_ref_pkg;

  class bf_ref;
    bit [31:0] init [1042];
    bit [31:0] P [18];
    bit [31:0] S [4][256];

    function new();
      $readmemh("rtl/blowfish_pi_init.hex", init);
    endfunction

    function bit [31:0] F(bit [31:0] x);
      return ((S[0][x[31:24]] + S[1][x[23:16]]) ^ S[2][x[15:8]]) + S[3][x[7:0]];
    endfunction

    function bit [63:0] encrypt(bit [63:0] blk);
      bit [31:0] l = blk[63:32], r = blk[31:0], t;
      for (int i = 0; i < 16; i++) begin
        l = l ^ P[i];
        r = r ^ F(l);
        t = l; l = r; r = t;
      end
      t = l; l = r; r = t;
      r = r ^ P[16];
      l = l ^ P[17];
      return {l, r};
    endfunction

    function bit [63:0] decrypt(bit [63:0] blk);
      bit [31:0] l = blk[63:32], r = blk[31:0], t;
      for (int i = 17; i > 1; i--) begin
        l = l ^ P[i];
        r = r ^ F(l);
        t = l; l = r; r = t;
      end
      t = l; l = r; r = t;
      r = r ^ P[1];
      l = l ^ P[0];
      return {l, r};
    endfunction

    function void set_key(bit [63:0] key);
      bit [63:0] b = '0;
      for (int i = 0; i < 18; i++) P[i] = init[i] ^ (i % 2 == 0 ? key[63:32] : key[31:0]);
      for (int s = 0; s < 4; s++)
        for (int j = 0; j < 256; j++) S[s][j] = init[18 + 256*s + j];
      for (int i = 0; i < 18; i += 2) begin
        b = encrypt(b);
        P[i] = b[63:32]; P[i+1] = b[31:0];
      end
      for (int s = 0; s < 4; s++)
        for (int j = 0; j < 256; j += 2) begin
          b = encrypt(b);
          S[s][j] = b[63:32]; S[s][j+1] = b[31:0];
        end
    endfunction

    function bit [127:0] cipher128(bit [127:0] blk, bit dec);
      return dec ? {decrypt(blk[127:64]), decrypt(blk[63:0])}
                 : {encrypt(blk[127:64]), encrypt(blk[63:0])};
    endfunction
  endclass

endpackage
