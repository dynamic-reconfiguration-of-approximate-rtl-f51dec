// Testbench for dmclb1: all input combinations. Accurate mode is checked against the bit's
// arithmetic (P = exactly one operand set, G = both set, {Cout, S} = A + B + Cin);
// approximate mode against P = B, G = A, S = B, Cout = A.
module tb_dmclb1;
  logic a, b, cin, app, p, g, s, cout;
  int   checks = 0, failures = 0;

  dmclb1 dut (.a(a), .b(b), .cin(cin), .app(app), .p(p), .g(g), .s(s), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [3:0] exp_val;  // {p, g, s, cout}
      int         total;
      {app, a, b, cin} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      if (app) exp_val = {b, a, b, a};
      else     exp_val = {(int'(a) + int'(b)) == 1, a && b, total[0], total >= 2};
      checks++;
      if ({p, g, s, cout} !== exp_val) begin
        failures++;
        $display("FAIL app=%b a=%b b=%b cin=%b got pgsc=%b exp %b", app, a, b, cin,
                 {p, g, s, cout}, exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
