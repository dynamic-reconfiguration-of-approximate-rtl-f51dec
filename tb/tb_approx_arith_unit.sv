// End-to-end testbench for approx_arith_unit at its default sizes (8-bit ripple-carry
// adder/subtractor, 16-bit carry-lookahead adder).
//
// Both adders are driven at once with a stream of operations whose degree of approximation
// changes from one operation to the next, the way a video encoder would retune accuracy at
// run time. Every result is compared with the reference models, and exact mode with plain
// integer arithmetic. It counts how often each mechanism of the design occurred: exact,
// partly approximate and fully approximate operation of each adder, subtraction, an
// approximated propagate/generate block in the CLA, a change of accuracy between
// consecutive operations, and an approximate result that differs from the exact one. A
// mechanism that never occurred counts as a failure.
module tb_approx_arith_unit;
  import rab_ref_pkg::*;
  localparam int RW = 8;
  localparam int CW = 16;
  localparam int OPS = 20000;

  logic [RW-1:0] rca_a, rca_b, rca_sum;
  logic          rca_cin, rca_sub, rca_cout;
  logic [3:0]    rca_da;
  logic [CW-1:0] cla_a, cla_b, cla_sum;
  logic          cla_cin, cla_cout, cla_grp_p, cla_grp_g;
  logic [4:0]    cla_da;
  int            checks = 0, failures = 0;

  // Mechanism counters.
  int n_rca_exact = 0, n_rca_partial = 0, n_rca_full = 0, n_rca_sub = 0, n_rca_switch = 0;
  int n_rca_err = 0;
  int n_cla_exact = 0, n_cla_partial = 0, n_cla_full = 0, n_cla_pgb_apx = 0;
  int n_cla_switch = 0, n_cla_err = 0;

  approx_arith_unit dut (
    .rca_a(rca_a), .rca_b(rca_b), .rca_cin(rca_cin), .rca_sub(rca_sub), .rca_da(rca_da),
    .rca_sum(rca_sum), .rca_cout(rca_cout),
    .cla_a(cla_a), .cla_b(cla_b), .cla_cin(cla_cin), .cla_da(cla_da),
    .cla_sum(cla_sum), .cla_cout(cla_cout), .cla_grp_p(cla_grp_p), .cla_grp_g(cla_grp_g)
  );

  task automatic expect_count(input string what, input int n);
    $display("  %-34s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_rk, prev_ck;
    prev_rk = 0;
    prev_ck = 0;
    for (int op = 0; op < OPS; op++) begin
      ref_res_t rr, cr;
      int       rk, ck, rexact, cexact;
      // Accuracy setting: sweep in order for the first passes, random afterwards.
      rk = (op < 4 * (RW + 1)) ? (op % (RW + 1)) : int'($urandom_range(RW, 0));
      ck = (op < 4 * (CW + 1)) ? (op % (CW + 1)) : int'($urandom_range(CW, 0));
      rca_a = RW'($urandom); rca_b = RW'($urandom);
      rca_cin = 1'($urandom); rca_sub = 1'($urandom); rca_da = 4'(rk);
      cla_a = CW'($urandom); cla_b = CW'($urandom);
      cla_cin = 1'($urandom); cla_da = 5'(ck);
      #1;

      rr = ref_rca(64'(rca_a), 64'(rca_b), rca_cin, rca_sub, RW, rk);
      cr = ref_cla(64'(cla_a), 64'(cla_b), cla_cin, CW, ck);
      rexact = rca_sub ? (int'(rca_a) + ((1 << RW) - 1 - int'(rca_b)) + (rca_cin ? 0 : 1))
                       : (int'(rca_a) + int'(rca_b) + int'(rca_cin));
      cexact = int'(cla_a) + int'(cla_b) + int'(cla_cin);

      checks++;
      if ({rca_cout, rca_sum} !== {rr.cout, rr.sum[RW-1:0]}) begin
        failures++;
        if (failures < 10) $display("FAIL rca op %0d da=%0d", op, rk);
      end
      checks++;
      if ({cla_cout, cla_sum, cla_grp_p, cla_grp_g} !== {cr.cout, cr.sum[CW-1:0], cr.p, cr.g})
      begin
        failures++;
        if (failures < 10) $display("FAIL cla op %0d da=%0d", op, ck);
      end
      if (rk == 0) begin
        checks++;
        if ({rca_cout, rca_sum} !== (RW+1)'(rexact)) begin
          failures++;
          $display("FAIL rca exact op %0d", op);
        end
      end
      if (ck == 0) begin
        checks++;
        if ({cla_cout, cla_sum} !== (CW+1)'(cexact)) begin
          failures++;
          $display("FAIL cla exact op %0d", op);
        end
      end

      if (rk == 0) n_rca_exact++;
      else if (rk == RW) n_rca_full++;
      else n_rca_partial++;
      if (rca_sub) n_rca_sub++;
      if (op > 0 && rk != prev_rk) n_rca_switch++;
      if (rk != 0 && {rca_cout, rca_sum} != (RW+1)'(rexact)) n_rca_err++;
      if (ck == 0) n_cla_exact++;
      else if (ck == CW) n_cla_full++;
      else n_cla_partial++;
      if (ck >= 2) n_cla_pgb_apx++;
      if (op > 0 && ck != prev_ck) n_cla_switch++;
      if (ck != 0 && {cla_cout, cla_sum} != (CW+1)'(cexact)) n_cla_err++;
      prev_rk = rk;
      prev_ck = ck;
    end

    $display("mechanisms exercised:");
    expect_count("RCA exact operations", n_rca_exact);
    expect_count("RCA partly approximate operations", n_rca_partial);
    expect_count("RCA fully approximate operations", n_rca_full);
    expect_count("RCA subtractions", n_rca_sub);
    expect_count("RCA accuracy changes", n_rca_switch);
    expect_count("RCA approximation errors", n_rca_err);
    expect_count("CLA exact operations", n_cla_exact);
    expect_count("CLA partly approximate operations", n_cla_partial);
    expect_count("CLA fully approximate operations", n_cla_full);
    expect_count("CLA approximate PG-block operations", n_cla_pgb_apx);
    expect_count("CLA accuracy changes", n_cla_switch);
    expect_count("CLA approximation errors", n_cla_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
