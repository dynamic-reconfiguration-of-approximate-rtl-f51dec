// Testbench for rab_cla at its default 16 bits. For every degree of approximation 0..16 it
// applies corner operands and random ones and compares sum, carry out and the group
// P/G with a level-by-level reference model of the tree. DA = 0 is also checked against
// integer addition, and DA = 16 against its closed form (sum = B, carry out =
// A[15] | (B[0] & Cin)).
module tb_rab_cla;
  import rab_ref_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned DW = $clog2(N + 1);
  localparam int          RANDOM_PER_K = 4000;
  logic [N-1:0]  a, b, sum;
  logic          cin, cout, grp_p, grp_g;
  logic [DW-1:0] da;
  int            checks = 0, failures = 0;

  rab_cla dut (.a(a), .b(b), .cin(cin), .da(da), .sum(sum), .cout(cout),
               .grp_p(grp_p), .grp_g(grp_g));

  task automatic check_one(input int k);
    ref_res_t r;
    da = DW'(k);
    #1;
    r = ref_cla(64'(a), 64'(b), cin, N, k);
    checks++;
    if ({cout, sum, grp_p, grp_g} !== {r.cout, r.sum[N-1:0], r.p, r.g}) begin
      failures++;
      if (failures < 10)
        $display("FAIL k=%0d a=%h b=%h cin=%b got c=%b s=%h pg=%b%b exp c=%b s=%h pg=%b%b",
                 k, a, b, cin, cout, sum, grp_p, grp_g, r.cout, r.sum[N-1:0], r.p, r.g);
    end
    if (k == 0) begin
      checks++;
      if ({cout, sum} !== (N+1)'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL exact a=%h b=%h cin=%b", a, b, cin);
      end
    end
    if (k == int'(N)) begin
      checks++;
      if (sum !== b || cout !== (a[N-1] | (b[0] & cin))) begin
        failures++;
        if (failures < 10) $display("FAIL full approx a=%h b=%h cin=%b", a, b, cin);
      end
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] corners [6];
    corners = '{'0, '1, N'('h5555), N'('haaaa), N'(1), N'(1) << (N - 1)};
    for (int k = 0; k <= int'(N); k++) begin
      foreach (corners[i]) foreach (corners[j]) for (int c = 0; c < 2; c++) begin
        a = corners[i];
        b = corners[j];
        cin = c[0];
        check_one(k);
      end
      for (int t = 0; t < RANDOM_PER_K; t++) begin
        a   = N'($urandom);
        b   = N'($urandom);
        cin = 1'($urandom);
        check_one(k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
