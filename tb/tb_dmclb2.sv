// Testbench for dmclb2: all input combinations. Accurate mode: P = exactly one operand
// set, G = both set, S = (A + B + Cin) mod 2. Approximate mode: P = B, G = A, S = B.
module tb_dmclb2;
  logic a, b, cin, app, p, g, s;
  int   checks = 0, failures = 0;

  dmclb2 dut (.a(a), .b(b), .cin(cin), .app(app), .p(p), .g(g), .s(s));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [2:0] exp_val;  // {p, g, s}
      int         total;
      {app, a, b, cin} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      if (app) exp_val = {b, a, b};
      else     exp_val = {(int'(a) + int'(b)) == 1, a && b, (total % 2) == 1};
      checks++;
      if ({p, g, s} !== exp_val) begin
        failures++;
        $display("FAIL app=%b a=%b b=%b cin=%b got pgs=%b exp %b", app, a, b, cin,
                 {p, g, s}, exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
