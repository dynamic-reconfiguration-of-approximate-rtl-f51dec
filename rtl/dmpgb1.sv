// Dual-mode propagate/generate block with carry out (DMPGB1).
//
// Inner node of the carry-lookahead tree. It merges the group signals of its lower child
// (PA, GA) and its upper child (PB, GB) into the group signals of the combined range, and
// forms the carry out of that range from the carry into it.
//   APP = 0: P = PA & PB, G = GB | (GA & PB), Cout = G | (P & Cin)
//   APP = 1: P = PA,      G = GB,             Cout = G | (P & Cin)
// The carry out keeps its accurate form in both modes; it only sees the approximated
// P and G. It sits as the lower child of its parent (and at the root), and its Cout is the
// Cin of the sibling block covering the next higher range.
//
// Both mode equations follow the described block, including the unchanged carry-out form.
//
// Interface: pa, ga, pb, gb, cin, app in; p, g, cout out. Combinational.
module dmpgb1 (
  input  logic pa,
  input  logic ga,
  input  logic pb,
  input  logic gb,
  input  logic cin,
  input  logic app,
  output logic p,
  output logic g,
  output logic cout
);
  always_comb begin
    p    = app ? pa : (pa & pb);
    g    = app ? gb : (gb | (ga & pb));
    cout = g | (p & cin);
  end
endmodule
