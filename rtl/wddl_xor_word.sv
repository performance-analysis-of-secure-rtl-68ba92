// wddl_xor_word: W-bit XOR computed in WDDL logic.
//
// Both single-rail operands pass through the WDDL precharge circuit, which
// turns each bit into a differential pair, zeroed while pre = 1. W WDDL XOR
// gates then form the differential result. y is the true rail, the single-rail
// result that the rest of the datapath uses; y_f is the false rail. While pre = 1
// both rails are all zeros, so y reads 0. While pre = 0, y = a ^ b and y_f = ~y.
// balanced reports that the rails obey those two rules (always 1 in a fault-free
// circuit), so a clocked parent can assert it. Combinational.
module wddl_xor_word #(
  parameter int unsigned W = 32
) (
  input  logic         pre,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic [W-1:0] y_f,
  output logic         balanced
);
  logic [W-1:0] a_t, a_f, b_t, b_f;

  wddl_precharge #(.W(W)) u_pre_a (.pre(pre), .x(a), .t(a_t), .f(a_f));
  wddl_precharge #(.W(W)) u_pre_b (.pre(pre), .x(b), .t(b_t), .f(b_f));

  for (genvar i = 0; i < W; i++) begin : g_bit
    wddl_xor u_xor (.a_t(a_t[i]), .a_f(a_f[i]), .b_t(b_t[i]), .b_f(b_f[i]),
                    .y_t(y[i]), .y_f(y_f[i]));
  end

  assign balanced = pre ? ((y == '0) && (y_f == '0)) : ((y ^ y_f) == '1);
endmodule
