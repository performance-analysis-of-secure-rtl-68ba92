// mod_adder: modulo-M adder with two adders working in parallel.
//
// For residues X, Y < M held in W bits, one adder forms S1 = X + Y and a
// three-operand adder forms S2 = X + Y + m at the same time, where
// m = 2^W - M. If X + Y >= M then S2 carries out of W bits and its low W bits
// are X + Y - M, the wanted sum; otherwise X + Y < M is already reduced. So the
// carry of S2 alone selects the output, and no comparison follows the
// additions. For Blowfish M = 2^W (W = 32): then m = 0, both adders agree and
// the result is X + Y with the carry dropped. Inputs must be below M.
// Combinational.
//
// The two parallel adders and the carry selection follow the paper's modulo
// adder; the general parameter M is this design's addition.
module mod_adder #(
  parameter int unsigned W = 32,
  parameter logic [W:0]  M = {1'b1, {W{1'b0}}}   // 2^W
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  localparam logic [W:0] CORR = {1'b1, {W{1'b0}}} - M;   // m = 2^W - M

  logic [W:0] s1, s2;

  always_comb begin
    s1 = {1'b0, x} + {1'b0, y};
    s2 = {1'b0, x} + {1'b0, y} + CORR;
    s  = s2[W] ? s2[W-1:0] : s1[W-1:0];
  end
endmodule
