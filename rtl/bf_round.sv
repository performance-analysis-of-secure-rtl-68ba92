// bf_round: one Blowfish Feistel round.
//
// With the block held as halves L and R and the round's subkey P:
//     L' = R ^ F(L ^ P),   R' = L ^ P
// that is: XOR the left half with the subkey, pass it through F, XOR F into
// the right half, and swap the halves. The same round serves encryption and
// decryption; only the subkey fed to it differs. All three XORs of the round
// (the two here and the one inside F) are WDDL XORs sharing the precharge
// input pre: with pre = 1 the outputs are not valid, with pre = 0 they are.
// Combinational apart from the S-box write port, which it passes to F.
// rail_ok is 1 when every WDDL XOR has well-formed rails. The false rails
// xl_f and xr_f drive nothing further: in a WDDL netlist they are the
// complementary half that keeps the switching balanced, and the lint warnings
// about them being unused are expected.
module bf_round
  import blowfish_pkg::*;
(
  input  logic     clk,
  input  logic     pre,
  input  word_t    l_in,
  input  word_t    r_in,
  input  word_t    p_key,
  input  sbox_wr_t sbox_wr,
  output word_t    l_out,
  output word_t    r_out,
  output logic     rail_ok
);
  word_t xl, xl_f, f, xr, xr_f;
  logic  ok_l, ok_f, ok_r;

  wddl_xor_word #(.W(WORD_W)) u_xor_key (
    .pre(pre), .a(l_in), .b(p_key), .y(xl), .y_f(xl_f), .balanced(ok_l)
  );

  feistel_f u_f (.clk(clk), .pre(pre), .x(xl), .sbox_wr(sbox_wr), .f(f), .rail_ok(ok_f));

  wddl_xor_word #(.W(WORD_W)) u_xor_f (
    .pre(pre), .a(r_in), .b(f), .y(xr), .y_f(xr_f), .balanced(ok_r)
  );

  assign l_out   = xr;
  assign r_out   = xl;
  assign rail_ok = ok_l & ok_f & ok_r;
endmodule
