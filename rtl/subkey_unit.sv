// subkey_unit: the P-array, eighteen 32-bit subkeys P0..P17.
//
// The 448-bit key is read as fourteen 32-bit words K0..K13, K0 being
// key[447:416] (the first key byte is the most significant). A key_xor pulse
// replaces every P[i] by P[i] ^ K[i mod 14], reusing the first four key words
// for P14..P17, all in one clock cycle. The write port (we, widx, wdata) loads
// the initial values and, later in key expansion, the encryption results that
// become the final subkeys. Both act at the rising edge; key_xor wins if both
// are asserted. All eighteen words are visible at p at all times, so the
// cipher can pick any subkey in either order. No reset: the P-array is always
// written before it is used.
//
// The paper gives the key XOR with reused key words; the key byte order and
// the single-cycle XOR are this design's choices.
module subkey_unit
  import blowfish_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [4:0] widx,
  input  word_t      wdata,
  input  logic       key_xor,
  input  key_t       key,
  output parray_t    p
);
  always_ff @(posedge clk) begin
    if (key_xor) begin
      for (int i = 0; i < P_WORDS; i++)
        p[i] <= p[i] ^ key[KEY_W - 1 - WORD_W * (i % KEY_WORDS) -: WORD_W];
    end else if (we && widx < 5'(P_WORDS)) begin
      p[widx] <= wdata;
    end
  end
endmodule
