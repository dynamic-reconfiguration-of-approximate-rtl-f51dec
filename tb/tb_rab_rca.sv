// Testbench for rab_rca at its default 8 bits: every pair of operands, both carry-in
// values, add and subtract, and every degree of approximation 0..8, compared with the
// reference model (exact addition above the approximate cells, B bits below them, A of
// the top approximate cell as the carry across). DA = 0 is also checked against plain
// integer addition and subtraction.
module tb_rab_rca;
  import rab_ref_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned DW = $clog2(N + 1);
  logic [N-1:0]  a, b, sum;
  logic          cin, sub, cout;
  logic [DW-1:0] da;
  int            checks = 0, failures = 0;

  rab_rca dut (.a(a), .b(b), .cin(cin), .sub(sub), .da(da), .sum(sum), .cout(cout));

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= int'(N); k++) begin
      for (int m = 0; m < 4; m++) begin
        for (int x = 0; x < (1 << N); x++) begin
          for (int y = 0; y < (1 << N); y++) begin
            ref_res_t r;
            a   = N'(x);
            b   = N'(y);
            cin = m[0];
            sub = m[1];
            da  = DW'(k);
            #1;
            r = ref_rca(64'(a), 64'(b), cin, sub, N, k);
            checks++;
            if ({cout, sum} !== {r.cout, r.sum[N-1:0]}) begin
              failures++;
              if (failures < 10)
                $display("FAIL k=%0d a=%0d b=%0d cin=%b sub=%b got %b_%b exp %b_%b", k, x, y,
                         cin, sub, cout, sum, r.cout, r.sum[N-1:0]);
            end
            if (k == 0) begin
              int exact;
              exact = sub ? (x + ((1 << N) - 1 - y) + (cin ? 0 : 1))
                          : (x + y + int'(cin));
              checks++;
              if ({cout, sum} !== (N+1)'(exact)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL exact a=%0d b=%0d cin=%b sub=%b got %b_%b", x, y, cin, sub,
                           cout, sum);
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
