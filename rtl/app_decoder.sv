// Approximation decoder for the reconfigurable ripple-carry adder.
//
// Converts the degree of approximation DA (how many least significant bit positions run
// approximately) into one APP select line per dual-mode full adder: app[i] = (i < da).
// The output is therefore a thermometer code that grows from the LSB, so that the
// approximate part always sits below the accurate upper part of the word. Values of da
// above N approximate every cell.
//
// The architecture only names this decoder; the DA count and its thermometer decoding are
// this design's choice.
//
// Parameters: N, number of cells. Interface: da in, app[N-1:0] out. Combinational.
module app_decoder #(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = $clog2(N + 1)
) (
  input  logic [DW-1:0] da,
  output logic [N-1:0]  app
);
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      app[i] = (i < 32'(da));
    end
  end
endmodule
