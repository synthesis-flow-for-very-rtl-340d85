// tb_aqfp_clkgen: checks the 4-phase and 3-phase excitation generators.
// After reset the excited phase must be 0 and advance by one per clk edge,
// wrapping at NPHASE; ex must be one-hot on the phase; the digitised ac
// clocks must follow cos/sin over the four quarter cycles (4-phase) or mark
// phases 0 and 1 (3-phase).
module tb_aqfp_clkgen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] ex4;
  logic [2:0] ex3;
  logic [1:0] ph4, ph3;
  logic a1_4, a2_4, a1_3, a2_3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aqfp_clkgen #(.NPHASE(4)) u4 (.clk, .rst_n, .ex(ex4), .phase(ph4), .ac1(a1_4), .ac2(a2_4));
  aqfp_clkgen #(.NPHASE(3)) u3 (.clk, .rst_n, .ex(ex3), .phase(ph3), .ac1(a1_3), .ac2(a2_3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp4, exp3;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    exp4 = 0;
    exp3 = 0;
    for (int t = 0; t < 40; t++) begin
      check(ph4 == 2'(exp4), $sformatf("4-phase index %0d exp %0d", ph4, exp4));
      check(ex4 == 4'(1 << exp4), $sformatf("4-phase strobe %b", ex4));
      check(a1_4 == (exp4 == 0 || exp4 == 3), "ac1 sign");
      check(a2_4 == (exp4 == 2 || exp4 == 3), "ac2 sign");
      check(ph3 == 2'(exp3), $sformatf("3-phase index %0d exp %0d", ph3, exp3));
      check(ex3 == 3'(1 << exp3), $sformatf("3-phase strobe %b", ex3));
      check(a1_3 == (exp3 == 0) && a2_3 == (exp3 == 1), "3-phase ac");
      @(negedge clk);
      exp4 = (exp4 + 1) % 4;
      exp3 = (exp3 + 1) % 3;
    end
    // Reset in mid-cycle returns to phase 0.
    rst_n <= 1'b0;
    @(negedge clk);
    rst_n <= 1'b1;
    check(ph4 == 2'd0 && ph3 == 2'd0, "reset to phase 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
