// wddl_or: WDDL OR gate.
//
// The true rail is an OR of the true inputs, the false rail an AND of the false
// inputs (the dual gate): y_t = a_t | b_t, y_f = a_f & b_f. Both outputs are 0
// in precharge (all inputs 0) and complementary in evaluation. Combinational.
// Follows the paper's WDDL OR gate.
module wddl_or (
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  output logic y_t, y_f
);
  assign y_t = a_t | b_t;
  assign y_f = a_f & b_f;
endmodule
