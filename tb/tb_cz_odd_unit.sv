// tb_cz_odd_unit: random odd numbers through the 3n+1 unit, one per ac
// cycle, plus unselected (zero, no carry-in) slots. The result (mod 2^16)
// and the overflow flag must appear exactly LAT = 6 phases after capture.
// A 4-bit unit (latency 4) is checked exhaustively beside it.
module tb_cz_odd_unit;
  localparam int NPHASE = 4;
  localparam int P0 = 2;
  localparam int W = 16;
  localparam int LAT = 6;
  localparam int W4 = 4;
  localparam int LAT4 = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic [W-1:0] n, res;
  logic go, ovf;
  logic [W4-1:0] n4, res4;
  logic ovf4;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  cz_odd_unit #(.WIDTH(W), .NPHASE(NPHASE), .PHASE0(P0)) dut (.clk, .rst_n, .ex, .n, .go, .res, .ovf);
  cz_odd_unit #(.WIDTH(W4), .NPHASE(NPHASE), .PHASE0(P0)) dut4 (.clk, .rst_n, .ex, .n(n4), .go, .res(res4), .ovf(ovf4));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n = '0; go = 1'b0; n4 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] v;
      logic [W4-1:0] v4;
      logic sel;
      logic [W+1:0] full;
      logic [W4+1:0] full4;
      while (cyc % NPHASE != P0) @(negedge clk);
      sel = (i % 5) != 0;
      v = sel ? (W'($urandom) | W'(1)) : W'(0);
      if (i < 40) v = sel ? W'(16'hFFFF - 2 * i) : W'(0);   // overflow corner
      v4 = sel ? W4'(2 * (i % 8) + 1) : W4'(0);
      n = v; go = sel; n4 = v4;
      full = 3 * {2'b0, v} + (sel ? 1 : 0);
      full4 = 3 * {2'b0, v4} + (sel ? 1 : 0);
      repeat (LAT4) @(negedge clk);
      checks++;
      if (res4 != full4[W4-1:0] || ovf4 != (full4[W4+1:W4] != 0)) begin
        failures++; $display("FAIL4 3*%0d+1 got %0d ovf %b", v4, res4, ovf4);
      end
      repeat (LAT - LAT4) @(negedge clk);
      checks++;
      if (res != full[W-1:0] || ovf != (full[W+1:W] != 0)) begin
        failures++; $display("FAIL 3*%0d+%0d got %0d ovf %b", v, sel, res, ovf);
      end
      if (ovf) n_ovf++;
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
