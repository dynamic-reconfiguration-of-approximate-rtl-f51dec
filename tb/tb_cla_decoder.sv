// Testbench for cla_decoder at N = 16: every value of DA. A leaf of bit i must be
// approximate when i < DA. An inner node must be approximate exactly when the highest bit
// of its range is below DA, i.e. when every leaf under it is approximate. The bit range of
// node n is worked out from its depth and position in the tree.
module tb_cla_decoder;
  localparam int unsigned N  = 16;
  localparam int unsigned DW = $clog2(N + 1);
  logic [DW-1:0] da;
  logic [N-1:0]  app_leaf;
  logic [N-1:1]  app_node;
  int            checks = 0, failures = 0;

  cla_decoder dut (.da(da), .app_leaf(app_leaf), .app_node(app_node));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << DW); v++) begin
      da = DW'(v);
      #1;
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (app_leaf[i] !== (i < v)) begin
          failures++;
          $display("FAIL da=%0d leaf %0d app=%b", v, i, app_leaf[i]);
        end
      end
      for (int n = 1; n < int'(N); n++) begin
        int depth, level, pos, hi;
        depth = $clog2(n + 1) - 1;
        level = $clog2(N) - depth;
        pos   = n - (1 << depth);
        hi    = (pos + 1) * (1 << level) - 1;
        checks++;
        if (app_node[n] !== (hi < v)) begin
          failures++;
          $display("FAIL da=%0d node %0d (top bit %0d) app=%b", v, n, hi, app_node[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
