// Dual-mode carry-lookahead leaf block without carry out (DMCLB2).
//
// Same as DMCLB1 but with no Cout output: it sits on the upper bit of a pair, and the
// carry out of the pair is formed by the propagate/generate block above it.
//   APP = 0: P = A ^ B, G = A & B, S = P ^ Cin
//   APP = 1: P = B,     G = A,     S = B
//
// Interface: a, b, cin, app in; p, g, s out. Combinational.
module dmclb2 (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic p,
  output logic g,
  output logic s
);
  logic p_acc;

  always_comb begin
    p_acc = a ^ b;
    p     = app ? b : p_acc;
    g     = app ? a : (a & b);
    s     = app ? b : (p_acc ^ cin);
  end
endmodule
