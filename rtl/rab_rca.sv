// Reconfigurable ripple-carry adder/subtractor (RAB) built from dual-mode full adders.
//
// An N-bit ripple-carry adder (8 bits by default) in which every full adder is a DMFA cell.
// The degree of approximation DA selects how many low-order cells run approximately
// (S = B, Cout = A); the remaining upper cells add exactly. Because an approximate cell
// passes A on as its carry, the carry into the accurate part is simply a[DA-1].
//
// Subtraction: with sub = 1 the B operand is inverted before the cells and the carry
// into bit 0 is inverted, so the unit computes a - b - cin (cin acts as a borrow in);
// with sub = 0 it computes a + b + cin. The add/subtract control and its encoding are
// this design's choice; the cell array, the DMFA cells and the decoder follow the
// described architecture.
//
// Interface: a, b [N-1:0], cin, sub, da in; sum [N-1:0], cout out. cout is the carry
// out of the top cell (for subtraction, 1 means no borrow). Combinational, no clock.
module rab_rca #(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = $clog2(N + 1)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  input  logic          sub,
  input  logic [DW-1:0] da,
  output logic [N-1:0]  sum,
  output logic          cout
);
  logic [N-1:0] app;
  logic [N-1:0] b_eff;
  logic [N:0]   c;

  app_decoder #(.N(N), .DW(DW)) u_dec (
    .da (da),
    .app(app)
  );

  always_comb begin
    b_eff = b ^ {N{sub}};
    c[0]  = cin ^ sub;
  end

  for (genvar i = 0; i < N; i++) begin : g_cell
    dmfa u_dmfa (
      .a   (a[i]),
      .b   (b_eff[i]),
      .cin (c[i]),
      .app (app[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
