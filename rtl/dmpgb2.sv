// Dual-mode propagate/generate block without carry out (DMPGB2).
//
// Inner node of the carry-lookahead tree placed as the upper child of its parent; it only
// merges the group signals of its two children:
//   APP = 0: P = PA & PB, G = GB | (GA & PB)
//   APP = 1: P = PA,      G = GB
//
// Interface: pa, ga, pb, gb, app in; p, g out. Combinational.
module dmpgb2 (
  input  logic pa,
  input  logic ga,
  input  logic pb,
  input  logic gb,
  input  logic app,
  output logic p,
  output logic g
);
  always_comb begin
    p = app ? pa : (pa & pb);
    g = app ? gb : (gb | (ga & pb));
  end
endmodule
