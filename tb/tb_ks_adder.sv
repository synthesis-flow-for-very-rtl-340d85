// tb_ks_adder: exhaustive check of the 8-bit Kogge-Stone adder.
// All 65536 operand pairs are applied in ascending order with cin = 0, then
// 4000 random pairs with random carry-in, one pair per ac cycle. Each 9-bit
// result must appear exactly LAT = 5 phases after the operands were captured
// (and not one phase earlier), and hold for a full ac cycle. A second adder
// of 16 bits (latency 6) is checked with random operands, and a third, the
// 8-bit adder clocked in 3-phase mode, with 2000 random pairs (the latency in
// phases is the same).
module tb_ks_adder;
  localparam int NPHASE = 4;
  localparam int P0 = 0;
  localparam int W = 8;
  localparam int LAT = 5;
  localparam int W2 = 16;
  localparam int LAT2 = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic [W-1:0] a, b;
  logic cin;
  logic [W:0] sum;
  logic [W2-1:0] a2, b2;
  logic [W2:0] sum2;
  logic [2:0] ex3;
  logic [W:0] sum3;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  int unsigned npat = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);
  assign ex3 = 3'(1) << (cyc % 3);

  ks_adder #(.WIDTH(W), .NPHASE(NPHASE), .PHASE0(P0)) dut (.clk, .rst_n, .ex, .a, .b, .cin, .sum);
  ks_adder #(.WIDTH(W2), .NPHASE(NPHASE), .PHASE0(P0)) dut16 (.clk, .rst_n, .ex, .a(a2), .b(b2), .cin, .sum(sum2));

  ks_adder #(.WIDTH(W), .NPHASE(3), .PHASE0(P0)) dut3 (.clk, .rst_n, .ex(ex3), .a, .b, .cin, .sum(sum3));

  // The 3-phase adder: apply in a cycle with phase 0 of three, check LAT
  // phases later.
  task automatic apply3(logic [W-1:0] av, logic [W-1:0] bv, logic cv);
    logic [W:0] expv;
    while (cyc % 3 != P0) @(negedge clk);
    a = av; b = bv; cin = cv;
    expv = {1'b0, av} + {1'b0, bv} + {{W{1'b0}}, cv};
    repeat (LAT) @(negedge clk);
    checks++;
    if (sum3 != expv) begin
      failures++;
      $display("FAIL3 %0d + %0d + %0d = %0d, got %0d", av, bv, cv, expv, sum3);
    end
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one pair in cycle c (phase P0), then check in cycles c+LAT-1
  // (old value still there), c+LAT (new value) for both adders.
  task automatic apply(logic [W-1:0] av, logic [W-1:0] bv, logic cv, logic [W2-1:0] a2v, logic [W2-1:0] b2v);
    logic [W:0]  expv, prev;
    logic [W2:0] exp2;
    while (cyc % NPHASE != P0) @(negedge clk);
    a = av; b = bv; cin = cv; a2 = a2v; b2 = b2v;
    expv = {1'b0, av} + {1'b0, bv} + {{W{1'b0}}, cv};
    exp2 = {1'b0, a2v} + {1'b0, b2v} + {{W2{1'b0}}, cv};
    prev = sum;
    repeat (LAT - 1) @(negedge clk);
    if (prev != expv) begin
      checks++;
      if (sum != prev) begin failures++; $display("FAIL early result at %0d", cyc); end
    end
    @(negedge clk);
    checks++;
    if (sum != expv) begin
      failures++;
      $display("FAIL %0d + %0d + %0d = %0d, got %0d", av, bv, cv, expv, sum);
    end
    @(negedge clk);
    checks++;
    if (sum2 != exp2) begin
      failures++;
      $display("FAIL16 %0d + %0d + %0d = %0d, got %0d", a2v, b2v, cv, exp2, sum2);
    end
    npat++;
  endtask

  initial begin
    a = '0; b = '0; cin = 1'b0; a2 = '0; b2 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < (1 << (2 * W)); i++)
      apply(W'(i >> W), W'(i), 1'b0, W2'($urandom), W2'($urandom));
    for (int i = 0; i < 4000; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom), W2'($urandom), W2'($urandom));
    for (int i = 0; i < 2000; i++) apply3(W'($urandom), W'($urandom), 1'($urandom));
    $display("patterns applied: %0d", npat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
