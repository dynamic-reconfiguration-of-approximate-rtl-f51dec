// Reference models for the reconfigurable adders, used by the testbenches.
//
// ref_rca: an n-bit ripple adder/subtractor whose k low cells are approximate. The low k
//   sum bits are the (possibly inverted) B bits, the carry into bit k is a[k-1] (or the
//   carry in when k = 0), and the upper bits are an exact integer addition.
// ref_cla: an n-bit carry-lookahead tree evaluated level by level (level L, group j covers
//   bits j*2^L .. (j+1)*2^L-1), with each group approximate when its top bit is below k.
//   It is written on levels and group positions rather than on the hardware's node
//   numbering, so it checks the tree wiring independently.
// Widths up to 64 bits.
package rab_ref_pkg;

  typedef struct packed {
    logic [63:0] sum;
    logic        cout;
    logic        p;
    logic        g;
  } ref_res_t;

  function automatic ref_res_t ref_rca(input logic [63:0] a, input logic [63:0] b,
                                       input logic cin, input logic sub,
                                       input int n, input int k);
    ref_res_t    r;
    logic [63:0] bb, mask;
    logic [64:0] hi_sum;
    logic        c;
    int          kk;
    kk   = (k > n) ? n : k;
    mask = (n == 64) ? '1 : ((64'd1 << n) - 64'd1);
    bb   = (sub ? ~b : b) & mask;
    c    = (kk == 0) ? (cin ^ sub) : a[kk-1];
    hi_sum = 65'(a >> kk) + 65'(bb >> kk) + 65'(c);
    r.sum  = '0;
    for (int i = 0; i < n; i++) begin
      r.sum[i] = (i < kk) ? bb[i] : hi_sum[i-kk];
    end
    r.cout = (kk == n) ? a[n-1] : hi_sum[n-kk];
    r.p = 1'b0;
    r.g = 1'b0;
    return r;
  endfunction

  function automatic ref_res_t ref_cla(input logic [63:0] a, input logic [63:0] b,
                                       input logic cin, input int n, input int k);
    ref_res_t r;
    logic     P [0:6][0:63];
    logic     G [0:6][0:63];
    logic     C [0:6][0:63];
    int       levels, groups, span;
    bit       apx;
    levels = $clog2(n);
    for (int L = 0; L <= 6; L++)
      for (int j = 0; j < 64; j++) begin
        P[L][j] = 1'b0; G[L][j] = 1'b0; C[L][j] = 1'b0;
      end
    // Group propagate / generate, bottom up.
    for (int j = 0; j < n; j++) begin
      apx = (j < k);
      P[0][j] = apx ? b[j] : (a[j] ^ b[j]);
      G[0][j] = apx ? a[j] : (a[j] & b[j]);
    end
    for (int L = 1; L <= levels; L++) begin
      groups = n >> L;
      span   = 1 << L;
      for (int j = 0; j < groups; j++) begin
        apx = ((j + 1) * span - 1 < k);
        if (apx) begin
          P[L][j] = P[L-1][2*j];
          G[L][j] = G[L-1][2*j+1];
        end else begin
          P[L][j] = P[L-1][2*j] & P[L-1][2*j+1];
          G[L][j] = G[L-1][2*j+1] | (G[L-1][2*j] & P[L-1][2*j+1]);
        end
      end
    end
    // Carries into every group, top down.
    C[levels][0] = cin;
    for (int L = levels; L >= 1; L--) begin
      groups = n >> L;
      for (int j = 0; j < groups; j++) begin
        C[L-1][2*j] = C[L][j];
        if (L - 1 == 0 && 2 * j < k)
          C[L-1][2*j+1] = a[2*j];  // approximate leaf: carry out is A
        else
          C[L-1][2*j+1] = G[L-1][2*j] | (P[L-1][2*j] & C[L][j]);
      end
    end
    r.sum = '0;
    for (int i = 0; i < n; i++) begin
      r.sum[i] = (i < k) ? b[i] : (a[i] ^ b[i] ^ C[0][i]);
    end
    r.p    = P[levels][0];
    r.g    = G[levels][0];
    r.cout = G[levels][0] | (P[levels][0] & cin);
    return r;
  endfunction

endpackage
