// Testbench for dmfa: all sixteen combinations of A, B, Cin and APP. Accurate mode must
// match integer addition; approximate mode must give S = B and Cout = A.
module tb_dmfa;
  logic a, b, cin, app, sum, cout;
  int   checks = 0, failures = 0;

  dmfa dut (.a(a), .b(b), .cin(cin), .app(app), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] exp_val;
      {app, a, b, cin} = 4'(v);
      #1;
      exp_val = app ? {a, b} : 2'(int'(a) + int'(b) + int'(cin));
      checks++;
      if ({cout, sum} !== exp_val) begin
        failures++;
        $display("FAIL app=%b a=%b b=%b cin=%b got %b%b exp %b", app, a, b, cin, cout, sum,
                 exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
