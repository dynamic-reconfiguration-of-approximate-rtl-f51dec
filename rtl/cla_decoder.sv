// Approximation decoder for the reconfigurable carry-lookahead adder.
//
// Drives the APP input of every block of the N-bit CLA tree from one degree of
// approximation DA (number of low-order bit positions to approximate):
//   * leaf block of bit i (DMCLB1/DMCLB2): app_leaf[i] = (i < da);
//   * inner block (DMPGB1/DMPGB2): approximate only when every block in its fan-in cone
//     is approximate, which is the AND of its two children's APP signals.
// Inner blocks are numbered in heap order: node 1 is the root, node n has children 2n
// (lower half of its bit range) and 2n+1 (upper half), and nodes N..2N-1 are the leaves,
// leaf N+i holding bit i. app_node[n] is the APP of inner node n, n = 1..N-1.
//
// The rule for inner blocks follows the described architecture; the encoding of DA as a
// count of approximate low-order bits is this design's choice.
//
// Parameters: N, a power of two >= 2 (16 by default). Combinational.
module cla_decoder #(
  parameter int unsigned N  = 16,
  parameter int unsigned DW = $clog2(N + 1)
) (
  input  logic [DW-1:0] da,
  output logic [N-1:0]  app_leaf,
  output logic [N-1:1]  app_node
);
  // APP of every node of the tree, heap order, leaves included.
  logic [2*N-1:1] app_all;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      app_leaf[i] = (i < 32'(da));
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign app_all[N+i] = app_leaf[i];
  end

  for (genvar n = 1; n < N; n++) begin : g_node
    assign app_all[n]  = app_all[2*n] & app_all[2*n+1];
    assign app_node[n] = app_all[n];
  end

  // A block may only be approximate when both of its children are.
  always_comb begin
    for (int unsigned n = 1; n < N; n++) begin
      assert (!app_node[n] || (app_all[2*n] && app_all[2*n+1]))
        else $error("cla_decoder: inner node %0d approximate over an accurate child", n);
    end
  end
endmodule
