// wddl_and: WDDL AND gate.
//
// A WDDL gate is a pair of positive gates: the true rail computes the function
// from the true inputs and the false rail computes its dual from the false
// inputs. For AND the dual is OR: y_t = a_t & b_t, y_f = a_f | b_f.
// With all inputs 0 (precharge) both outputs are 0; with complementary inputs
// (evaluation) the outputs are complementary. Combinational.
// Follows the paper's WDDL AND gate.
module wddl_and (
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  output logic y_t, y_f
);
  assign y_t = a_t & b_t;
  assign y_f = a_f | b_f;
endmodule
