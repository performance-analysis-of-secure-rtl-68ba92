// wddl_precharge: entry point of a Wave Dynamic Differential Logic (WDDL) region.
//
// A single-rail bit x becomes the differential pair (t, f) = (x, ~x) while the
// region evaluates, and (0, 0) while it precharges. Because every WDDL gate is
// built from positive (AND/OR) gates only, forcing all inputs of a region to 0
// sends a wave of zeros through it, so in every precharge phase every rail
// discharges and in every evaluation phase exactly one rail of each pair
// rises: the switching activity does not depend on the data.
//
// Interface: pre = 1 selects the precharge phase, pre = 0 the evaluation
// phase. The gates of the original WDDL style use the clock level as pre
// (high = precharge, low = evaluate); this design drives pre from a flop
// instead so that the whole design stays single-edge synchronous. Purely
// combinational, no timing of its own.
module wddl_precharge #(
  parameter int unsigned W = 1
) (
  input  logic         pre,
  input  logic [W-1:0] x,
  output logic [W-1:0] t,
  output logic [W-1:0] f
);
  always_comb begin
    t = pre ? '0 :  x;
    f = pre ? '0 : ~x;
  end
endmodule
