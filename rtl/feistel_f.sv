// feistel_f: the Blowfish round function F, with the four S-boxes it reads.
//
// The 32-bit input is cut into four bytes a | b | c | d (a the most
// significant). Each byte addresses its own S-box, and
//     F = ((S0[a] + S1[b]) ^ S2[c]) + S3[d]      (additions modulo 2^32).
// The two additions use the parallel modulo adder; the XOR is done in WDDL
// logic, so its output is 0 while pre = 1 and the result is meaningful only
// while pre = 0. The S-boxes are written through sbox_wr (one word per cycle,
// at the rising edge) during key expansion. Reads are combinational, so F
// settles in the same cycle as its input. rail_ok is the WDDL rail check of
// the XOR (see wddl_xor_word).
//
// The formula is the paper's round function; making only the XOR a WDDL gate
// (adders single-rail) is this design's choice.
module feistel_f
  import blowfish_pkg::*;
(
  input  logic     clk,
  input  logic     pre,
  input  word_t    x,
  input  sbox_wr_t sbox_wr,
  output word_t    f,
  output logic     rail_ok
);
  word_t s [SBOX_N];
  word_t sum01, mix, xnor_unused;

  for (genvar k = 0; k < SBOX_N; k++) begin : g_sbox
    sbox_ram u_sbox (
      .clk   (clk),
      .we    (sbox_wr.we && (sbox_wr.sel == 2'(k))),
      .waddr (sbox_wr.addr),
      .wdata (sbox_wr.data),
      .raddr (x[WORD_W-1-8*k -: 8]),
      .rdata (s[k])
    );
  end

  mod_adder #(.W(WORD_W)) u_add01 (.x(s[0]), .y(s[1]), .s(sum01));

  wddl_xor_word #(.W(WORD_W)) u_xor (
    .pre(pre), .a(sum01), .b(s[2]), .y(mix), .y_f(xnor_unused), .balanced(rail_ok)
  );

  mod_adder #(.W(WORD_W)) u_add3 (.x(mix), .y(s[3]), .s(f));
endmodule
