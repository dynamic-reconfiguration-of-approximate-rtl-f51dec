// Testbench for full_adder: all eight input combinations against integer addition.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_val;
      {a, b, cin} = 3'(v);
      #1;
      exp_val = 2'(int'(a) + int'(b) + int'(cin));
      checks++;
      if ({cout, sum} !== exp_val) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b got %b%b exp %b", a, b, cin, cout, sum, exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
