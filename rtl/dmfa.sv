// Dual-mode full adder (DMFA).
//
// One adder cell that works either exactly or approximately, selected at run time by APP.
//   APP = 0 (accurate):    S = A ^ B ^ Cin, Cout = AB + B*Cin + A*Cin
//   APP = 1 (approximate): S = B,           Cout = A
// Two 2:1 multiplexers pick between the outputs of a conventional full adder core and the
// operand bits themselves, as in the cell's schematic. In silicon the core is power gated in
// approximate mode. At the logic level this is modelled by holding the core's inputs at 0
// while APP = 1, so the core does not switch. That isolation gating is this design's stand-in
// for the power switch, which has no logic function of its own.
//
// Interface: a, b, cin, app in; sum, cout out. Purely combinational.
module dmfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic sum,
  output logic cout
);
  logic fa_a, fa_b, fa_cin;
  logic fa_sum, fa_cout;

  // Operand isolation: the full adder core sees constant inputs in approximate mode.
  always_comb begin
    fa_a   = a   & ~app;
    fa_b   = b   & ~app;
    fa_cin = cin & ~app;
  end

  full_adder u_fa (
    .a   (fa_a),
    .b   (fa_b),
    .cin (fa_cin),
    .sum (fa_sum),
    .cout(fa_cout)
  );

  // Output multiplexers, select = APP.
  always_comb begin
    sum  = app ? b : fa_sum;
    cout = app ? a : fa_cout;
  end
endmodule
