// blowfish_processor: Blowfish crypto-processor with WDDL round logic.
//
// The processor expands a 448-bit key into the P-array and S-boxes and then
// encrypts or decrypts 64-bit blocks with them, one block at a time.
//
// Key initialization (key_load while not busy) runs three steps:
//   1. copy the 1042 fixed words (hex digits of pi) from bf_init_rom into
//      P0..P17 and S0..S3, one word per cycle;
//   2. XOR the key words into the P-array (one cycle, subkey_unit);
//   3. encrypt a chained block 521 times, starting from all zeros; each
//      result overwrites the next two words of the same 1042-word sequence
//      (P0,P1, then P2,P3, ..., S3[254],S3[255]), each write followed at once by
//      the next encryption with the new tables.
// data_out shows each of those intermediate blocks as it is produced. The key
// is captured at key_load, so the key port need not be held afterwards. With
// WDDL rounds ready rises 18758 clock edges after the edge that samples
// key_load (1042 copy cycles, 1 key-XOR cycle, 521 blocks of 34 cycles, 1).
//
// Operation: while ready = 1, start reads data_in and encrypt (1 = encrypt,
// 0 = decrypt). ready falls, the block goes through bf_cipher, and in the cycle
// ready rises again data_out holds the result (ready rises 34 clock edges
// after the edge that samples start, with WDDL rounds). start while ready = 0 is ignored; key_load while ready = 1
// starts a new key initialization (ready stays low until it is done). After
// reset no key is loaded and ready is 0.
//
// From the paper: the port names Clk, Key[447:0], data_in, data_out, Encrypt
// and ready, and the rule that data_out changes only during key initialization
// and when ready rises. This design's own choices: the start, key_load and
// rst_n signals, capturing the key, and the order of the key-expansion steps
// in clock cycles (standard Blowfish).
module blowfish_processor
  import blowfish_pkg::*;
#(
  parameter bit WDDL = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  key_t   key,
  input  logic   key_load,
  input  block_t data_in,
  input  logic   encrypt,
  input  logic   start,
  output block_t data_out,
  output logic   ready
);
  typedef enum logic [2:0] {
    S_NOKEY, S_COPY, S_KEYXOR, S_EXP_WAIT, S_EXP_W1, S_READY, S_RUN
  } state_e;

  localparam logic [10:0] LAST_WORD = 11'(INIT_WORDS - 1);

  state_e      state_q;
  key_t        key_q;
  logic [10:0] widx_q;          // position in the 1042-word P/S sequence
  word_t       rom_data;

  // Table write port, shared by the copy and the expansion steps.
  logic        tw_en;
  logic [10:0] tw_idx, s_idx;
  word_t       tw_data;
  sbox_wr_t    sbox_wr;
  logic        p_we;

  // Cipher handshake.
  logic        c_start, c_busy, c_done;
  dir_e        c_dir;
  block_t      c_in, c_out;
  parray_t     p;

  bf_init_rom u_rom (.addr(widx_q), .data(rom_data));

  always_comb begin
    tw_en   = 1'b0;
    tw_idx  = widx_q;
    tw_data = rom_data;
    unique case (state_q)
      S_COPY:     tw_en = 1'b1;
      S_EXP_WAIT: begin tw_en = c_done; tw_data = c_out[BLOCK_W-1 -: WORD_W]; end
      S_EXP_W1:   begin tw_en = 1'b1; tw_idx = widx_q + 11'd1; tw_data = data_out[WORD_W-1:0]; end
      default: ;
    endcase
    s_idx        = tw_idx - 11'(P_WORDS);
    p_we         = tw_en && (tw_idx < 11'(P_WORDS));
    sbox_wr.we   = tw_en && (tw_idx >= 11'(P_WORDS));
    sbox_wr.sel  = s_idx[9:8];
    sbox_wr.addr = s_idx[7:0];
    sbox_wr.data = tw_data;
  end

  subkey_unit u_subkeys (
    .clk(clk), .we(p_we), .widx(tw_idx[4:0]), .wdata(tw_data),
    .key_xor(state_q == S_KEYXOR), .key(key_q), .p(p)
  );

  always_comb begin
    c_start = 1'b0;
    c_dir   = DIR_ENCRYPT;
    c_in    = data_out;
    unique case (state_q)
      S_KEYXOR: c_start = 1'b1;
      S_EXP_W1: c_start = (widx_q + 11'd1 != LAST_WORD);
      S_READY:  begin
        c_start = start && !key_load;
        c_in    = data_in;
        c_dir   = encrypt ? DIR_ENCRYPT : DIR_DECRYPT;
      end
      default: ;
    endcase
  end

  bf_cipher #(.WDDL(WDDL)) u_cipher (
    .clk(clk), .rst_n(rst_n), .start(c_start), .dir(c_dir), .block_in(c_in),
    .p(p), .sbox_wr(sbox_wr), .busy(c_busy), .done(c_done), .block_out(c_out),
    .pre()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_NOKEY;
      key_q    <= '0;
      widx_q   <= '0;
      data_out <= '0;
    end else begin
      unique case (state_q)
        S_NOKEY, S_READY: begin
          if (key_load) begin
            key_q    <= key;
            widx_q   <= '0;
            data_out <= '0;
            state_q  <= S_COPY;
          end else if (state_q == S_READY && start) begin
            state_q  <= S_RUN;
          end
        end
        S_COPY: begin
          if (widx_q == LAST_WORD) begin
            widx_q  <= '0;
            state_q <= S_KEYXOR;
          end else begin
            widx_q  <= widx_q + 11'd1;
          end
        end
        S_KEYXOR: state_q <= S_EXP_WAIT;
        S_EXP_WAIT: begin
          if (c_done) begin
            data_out <= c_out;
            state_q  <= S_EXP_W1;
          end
        end
        S_EXP_W1: begin
          if (widx_q + 11'd1 == LAST_WORD) begin
            state_q <= S_READY;
          end else begin
            widx_q  <= widx_q + 11'd2;
            state_q <= S_EXP_WAIT;
          end
        end
        S_RUN: begin
          if (c_done) begin
            data_out <= c_out;
            state_q  <= S_READY;
          end
        end
        default: state_q <= S_NOKEY;
      endcase
    end
  end

  assign ready = (state_q == S_READY);

  // The controller only starts the cipher when it is idle.
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) c_start |-> !c_busy)
    else $error("blowfish_processor: cipher started while busy");
  // P-array and S-boxes are never written while a block is in the rounds.
  a_tables_stable : assert property (@(posedge clk) disable iff (!rst_n) c_busy |-> !tw_en)
    else $error("blowfish_processor: tables written during a block");
endmodule
