// Dual-mode carry-lookahead leaf block with carry out (DMCLB1).
//
// One bit of the first level of the carry-lookahead tree. It forms the bit's propagate
// and generate signals, its sum, and the carry into the next bit.
//   APP = 0: P = A ^ B, G = A & B, S = P ^ Cin, Cout = G | (P & Cin)
//   APP = 1: P = B,     G = A,     S = B,       Cout = A
// In the tree it sits on the lower bit of a pair, and its Cout is the Cin of the DMCLB2
// next to it.
//
// The described block approximates both S and P by B and both Cout and G by A; one
// tabulation of it gives P = A instead, which is not followed here.
//
// Interface: a, b, cin, app in; p, g, s, cout out. Combinational.
module dmclb1 (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic p,
  output logic g,
  output logic s,
  output logic cout
);
  logic p_acc, g_acc;

  always_comb begin
    p_acc = a ^ b;
    g_acc = a & b;
    p     = app ? b : p_acc;
    g     = app ? a : g_acc;
    s     = app ? b : (p_acc ^ cin);
    cout  = app ? a : (g_acc | (p_acc & cin));
  end
endmodule
