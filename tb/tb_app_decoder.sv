// Testbench for app_decoder: every value of DA, expecting a thermometer code of DA ones
// from the LSB (all ones once DA reaches N).
module tb_app_decoder;
  localparam int unsigned N  = 8;
  localparam int unsigned DW = $clog2(N + 1);
  logic [DW-1:0] da;
  logic [N-1:0]  app;
  int            checks = 0, failures = 0;

  app_decoder dut (.da(da), .app(app));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << DW); v++) begin
      logic [N-1:0] exp_val;
      da = DW'(v);
      #1;
      exp_val = (v >= int'(N)) ? '1 : N'((64'd1 << v) - 64'd1);
      checks++;
      if (app !== exp_val) begin
        failures++;
        $display("FAIL da=%0d app=%b exp %b", v, app, exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
