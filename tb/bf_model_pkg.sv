// bf_model_pkg: software reference model of Blowfish for the testbenches.
//
// A plain sequential description of the cipher, written from the algorithm
// and independent of the RTL structure: a state object holding P[18] and
// S[4][256], the round function, block encryption/decryption and the full key
// schedule (start from the pi table, XOR the key into P, then replace P and
// the S-boxes by 521 chained encryptions of the zero block). The pi table is
// read from rtl/blowfish_init.hex; the testbenches check known-answer vectors
// that also validate that table.
package bf_model_pkg;

  class bf_model;
    bit [31:0] P [18];
    bit [31:0] S [4][256];

    function void load_init();
      bit [31:0] w [1042];
      $readmemh("rtl/blowfish_init.hex", w);
      foreach (P[i]) P[i] = w[i];
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 256; j++) S[k][j] = w[18 + 256 * k + j];
    endfunction

    function bit [31:0] f(bit [31:0] x);
      return ((S[0][x[31:24]] + S[1][x[23:16]]) ^ S[2][x[15:8]]) + S[3][x[7:0]];
    endfunction

    function bit [63:0] crypt(bit [63:0] blk, bit decrypt);
      bit [31:0] l, r, t;
      l = blk[63:32];
      r = blk[31:0];
      for (int i = 0; i < 16; i++) begin
        l = l ^ P[decrypt ? 17 - i : i];
        r = r ^ f(l);
        t = l; l = r; r = t;
      end
      t = l; l = r; r = t;
      r = r ^ P[decrypt ? 1 : 16];
      l = l ^ P[decrypt ? 0 : 17];
      return {l, r};
    endfunction

    // key holds 56 bytes, byte 0 in bits 447:440.
    function void key_schedule(bit [447:0] key);
      bit [63:0] blk;
      load_init();
      for (int i = 0; i < 18; i++) P[i] ^= key[447 - 32 * (i % 14) -: 32];
      blk = '0;
      for (int i = 0; i < 18; i += 2) begin
        blk = crypt(blk, 1'b0);
        P[i] = blk[63:32]; P[i + 1] = blk[31:0];
      end
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 256; j += 2) begin
          blk = crypt(blk, 1'b0);
          S[k][j] = blk[63:32]; S[k][j + 1] = blk[31:0];
        end
    endfunction
  endclass

endpackage
