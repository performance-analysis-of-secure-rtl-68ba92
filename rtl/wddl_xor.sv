// wddl_xor: WDDL XOR / XNOR gate.
//
// Built from the WDDL AND and OR gates only, as XOR = (a & ~b) | (~a & b).
// Inversion costs nothing in WDDL: ~b is the pair (b_f, b_t), the rails
// swapped. The true output is a XOR b and the false output a XNOR b during
// evaluation; in precharge (all rails 0) both outputs are 0, so the gate
// passes the zero wave on. Combinational.
// The paper gives its behaviour; the construction from AND/OR gates is this
// design's.
module wddl_xor (
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  output logic y_t, y_f
);
  logic p_t, p_f;   // a & ~b
  logic q_t, q_f;   // ~a & b

  wddl_and u_and_p (.a_t(a_t), .a_f(a_f), .b_t(b_f), .b_f(b_t), .y_t(p_t), .y_f(p_f));
  wddl_and u_and_q (.a_t(a_f), .a_f(a_t), .b_t(b_t), .b_f(b_f), .y_t(q_t), .y_f(q_f));
  wddl_or  u_or    (.a_t(p_t), .a_f(p_f), .b_t(q_t), .b_f(q_f), .y_t(y_t), .y_f(y_f));
endmodule
