// Conventional 1-bit full adder.
//
// The reference cell of the design: S = A ^ B ^ Cin and Cout = majority(A, B, Cin).
// The transistor-level cell it stands for is a 24-transistor mirror-style adder; at the
// logic level only its function matters, so it is written as two equations. It is the
// accurate core inside every dual-mode full adder (dmfa).
//
// The function is the standard one; nothing here is a design choice.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (b & cin) | (a & cin);
  end
endmodule
