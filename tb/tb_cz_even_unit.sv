// tb_cz_even_unit: random numbers, one per ac cycle, through the even unit.
// The halved number must appear exactly LAT = 6 phases (16-bit adder
// latency) after capture, with the previous result still present one phase
// earlier.
module tb_cz_even_unit;
  localparam int NPHASE = 4;
  localparam int P0 = 2;
  localparam int W = 16;
  localparam int LAT = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic [W-1:0] n, res;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  cz_even_unit #(.WIDTH(W), .NPHASE(NPHASE), .PHASE0(P0)) dut (.clk, .rst_n, .ex, .n, .res);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] v, prev;
      while (cyc % NPHASE != P0) @(negedge clk);
      v = W'($urandom) & ~W'(1);
      n = v;
      prev = res;
      repeat (LAT - 1) @(negedge clk);
      if (prev != (v >> 1)) begin
        checks++;
        if (res != prev) begin failures++; $display("FAIL early result"); end
      end
      @(negedge clk);
      checks++;
      if (res != (v >> 1)) begin failures++; $display("FAIL %0d/2 got %0d", v, res); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
