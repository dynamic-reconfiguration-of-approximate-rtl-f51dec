// Testbench for dmpgb1: all 64 input combinations. Accurate mode: the merged group
// propagates when both halves do and generates when the upper half generates or the lower
// half generates into a propagating upper half. Approximate mode: P = PA, G = GB. In both
// modes Cout = G | (P & Cin) of the block's own P and G.
module tb_dmpgb1;
  logic pa, ga, pb, gb, cin, app, p, g, cout;
  int   checks = 0, failures = 0;

  dmpgb1 dut (.pa(pa), .ga(ga), .pb(pb), .gb(gb), .cin(cin), .app(app),
              .p(p), .g(g), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic ep, eg, ec;
      {app, pa, ga, pb, gb, cin} = 6'(v);
      #1;
      if (app) begin
        ep = pa;
        eg = gb;
      end else begin
        ep = pa && pb;
        eg = gb || (ga && pb);
      end
      ec = eg || (ep && cin);
      checks++;
      if ({p, g, cout} !== {ep, eg, ec}) begin
        failures++;
        $display("FAIL in=%b got %b%b%b exp %b%b%b", 6'(v), p, g, cout, ep, eg, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
