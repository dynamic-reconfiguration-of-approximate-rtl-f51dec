// Testbench for dmpgb2: all 32 input combinations. Accurate mode: P = PA & PB,
// G = GB | (GA & PB). Approximate mode: P = PA, G = GB.
module tb_dmpgb2;
  logic pa, ga, pb, gb, app, p, g;
  int   checks = 0, failures = 0;

  dmpgb2 dut (.pa(pa), .ga(ga), .pb(pb), .gb(gb), .app(app), .p(p), .g(g));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic ep, eg;
      {app, pa, ga, pb, gb} = 5'(v);
      #1;
      if (app) begin
        ep = pa;
        eg = gb;
      end else begin
        ep = pa && pb;
        eg = gb || (ga && pb);
      end
      checks++;
      if ({p, g} !== {ep, eg}) begin
        failures++;
        $display("FAIL in=%b got %b%b exp %b%b", 5'(v), p, g, ep, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
