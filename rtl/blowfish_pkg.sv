// blowfish_pkg: sizes and types shared by the Blowfish crypto-processor.
//
// Blowfish works on 64-bit blocks split into two 32-bit halves, runs a
// 16-round Feistel network, and keys it with an 18-word P-array and four
// 256-word S-boxes. The key port is 448 bits wide (14 words); shorter keys are
// padded with zeros by the user. The initial P-array and S-boxes are the
// fractional hex digits of pi, held in one 1042-word table: P0..P17 first, then
// S0[0..255], S1, S2, S3.
package blowfish_pkg;

  localparam int unsigned WORD_W     = 32;
  localparam int unsigned BLOCK_W    = 64;
  localparam int unsigned KEY_W      = 448;
  localparam int unsigned KEY_WORDS  = KEY_W / WORD_W;      // 14
  localparam int unsigned N_ROUNDS   = 16;
  localparam int unsigned P_WORDS    = N_ROUNDS + 2;        // 18
  localparam int unsigned SBOX_N     = 4;
  localparam int unsigned SBOX_DEPTH = 256;
  localparam int unsigned INIT_WORDS = P_WORDS + SBOX_N * SBOX_DEPTH;  // 1042

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef word_t              parray_t [P_WORDS];

  // One write into an S-box: which box, which entry, what value.
  typedef struct packed {
    logic       we;
    logic [1:0] sel;
    logic [7:0] addr;
    word_t      data;
  } sbox_wr_t;

  // Which subkey order the cipher walks: forward for encryption,
  // reversed for decryption.
  typedef enum logic {DIR_ENCRYPT = 1'b0, DIR_DECRYPT = 1'b1} dir_e;

endpackage
