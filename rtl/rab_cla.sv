// Reconfigurable N-bit carry-lookahead adder (16 bits by default).
//
// A binary carry-lookahead tree in which every basic block is a dual-mode block:
//   * first level, one block per bit: DMCLB1 on the lower bit of each pair (it also
//     produces the carry into the upper bit) and DMCLB2 on the upper bit;
//   * higher levels: DMPGB1 as the lower child of each parent and at the root (it also
//     produces the carry out of its range), DMPGB2 as the upper child.
// The lower child of every block takes the block's carry in; the upper child takes the
// carry out of its lower sibling. The P and G of a DMCLB1/DMPGB1 feed the PA and GA inputs
// of the parent, those of a DMCLB2/DMPGB2 its PB and GB inputs. The root's carry out is
// the adder's carry out. For N = 16 the tree has 16 leaves and 8 + 4 + 2 + 1 inner blocks.
//
// The decoder sets the low DA leaves to approximate mode (S = B, P = B, G = A, Cout = A)
// and an inner block to approximate mode (P = PA, G = GB) only when all blocks below it
// are approximate. With DA = 0 the adder is exact: {cout, sum} = a + b + cin.
//
// The block types, their equations, the tree shape and the approximation rule follow the
// described architecture. Which carry feeds each block above the first level (the parent's
// carry for a lower child, the sibling's Cout for an upper one) and the grp_p/grp_g outputs
// are this design's own completion of it.
//
// Nodes are numbered in heap order (root 1, children 2n and 2n+1, leaf N+i = bit i).
// ci[n] is the carry into the bit range of node n.
//
// Interface: a, b [N-1:0], cin, da in; sum [N-1:0], cout out, plus the root block's
// group propagate and generate (grp_p, grp_g) for cascading several adders.
// Combinational, no clock.
module rab_cla #(
  parameter int unsigned N  = 16,
  parameter int unsigned DW = $clog2(N + 1)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  input  logic [DW-1:0] da,
  output logic [N-1:0]  sum,
  output logic          cout,
  output logic          grp_p,
  output logic          grp_g
);
  logic [N-1:0]   app_leaf;
  logic [N-1:1]   app_node;
  logic [2*N-1:1] p, g;   // group propagate / generate of every node
  logic [2*N-1:1] ci;     // carry into the range of every node

  cla_decoder #(.N(N), .DW(DW)) u_dec (
    .da      (da),
    .app_leaf(app_leaf),
    .app_node(app_node)
  );

  assign ci[1] = cin;
  assign grp_p = p[1];
  assign grp_g = g[1];

  // The lower child inherits its parent's carry in; the upper child's carry in is driven
  // by the Cout of its lower sibling (see the DMCLB1 / DMPGB1 instances).
  for (genvar n = 2; n < 2 * N; n += 2) begin : g_cin
    assign ci[n] = ci[n/2];
  end

  // First level: one dual-mode carry-lookahead block per bit.
  for (genvar i = 0; i < N; i++) begin : g_leaf
    localparam int unsigned K = N + i;
    if (K % 2 == 0) begin : g_clb1
      dmclb1 u_clb (
        .a   (a[i]),
        .b   (b[i]),
        .cin (ci[K]),
        .app (app_leaf[i]),
        .p   (p[K]),
        .g   (g[K]),
        .s   (sum[i]),
        .cout(ci[K+1])
      );
    end else begin : g_clb2
      dmclb2 u_clb (
        .a  (a[i]),
        .b  (b[i]),
        .cin(ci[K]),
        .app(app_leaf[i]),
        .p  (p[K]),
        .g  (g[K]),
        .s  (sum[i])
      );
    end
  end

  // Higher levels: dual-mode propagate/generate blocks.
  for (genvar n = 1; n < N; n++) begin : g_node
    if (n == 1) begin : g_root
      dmpgb1 u_pgb (
        .pa  (p[2]),
        .ga  (g[2]),
        .pb  (p[3]),
        .gb  (g[3]),
        .cin (ci[1]),
        .app (app_node[1]),
        .p   (p[1]),
        .g   (g[1]),
        .cout(cout)
      );
    end else if (n % 2 == 0) begin : g_pgb1
      dmpgb1 u_pgb (
        .pa  (p[2*n]),
        .ga  (g[2*n]),
        .pb  (p[2*n+1]),
        .gb  (g[2*n+1]),
        .cin (ci[n]),
        .app (app_node[n]),
        .p   (p[n]),
        .g   (g[n]),
        .cout(ci[n+1])
      );
    end else begin : g_pgb2
      dmpgb2 u_pgb (
        .pa (p[2*n]),
        .ga (g[2*n]),
        .pb (p[2*n+1]),
        .gb (g[2*n+1]),
        .app(app_node[n]),
        .p  (p[n]),
        .g  (g[n])
      );
    end
  end
endmodule
