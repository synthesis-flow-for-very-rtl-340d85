// tb_decoder16: applies all 32 combinations of (en, bin) to the AQFP 4-16
// decoder, twice and then in random order, one per ac cycle. The output must
// be en ? 1 << bin : 0, exactly 5 phases after capture, and one phase
// earlier still show the previous result. The same patterns are then run
// through a second decoder clocked in 3-phase mode (same latency in phases).
module tb_decoder16;
  localparam int NPHASE = 4;
  localparam int P0 = 0;
  localparam int LAT = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic [3:0] bin;
  logic en;
  logic [15:0] dec_out, dec_out3;
  logic [2:0] ex3;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  assign ex3 = 3'(1) << (cyc % 3);

  decoder16 #(.NPHASE(NPHASE), .PHASE0(P0)) dut (.clk, .rst_n, .ex, .bin, .en, .dec_out);
  decoder16 #(.NPHASE(3), .PHASE0(P0)) dut3 (.clk, .rst_n, .ex(ex3), .bin, .en, .dec_out(dec_out3));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // np selects the decoder under test: NPHASE (4) or 3.
  task automatic apply(logic ev, logic [3:0] bv, int np = NPHASE);
    logic [15:0] expv, prev;
    while (cyc % np != P0) @(negedge clk);
    en = ev; bin = bv;
    expv = 16'(0);
    if (ev) expv[bv] = 1'b1;
    prev = (np == 3) ? dec_out3 : dec_out;
    repeat (LAT - 1) @(negedge clk);
    if (prev != expv) begin
      checks++;
      if (((np == 3) ? dec_out3 : dec_out) != prev) begin failures++; $display("FAIL early output at %0d", cyc); end
    end
    @(negedge clk);
    checks++;
    if (((np == 3) ? dec_out3 : dec_out) != expv) begin
      failures++;
      $display("FAIL %0d-phase en=%b bin=%0d out=%h exp=%h", np, ev, bv, (np == 3) ? dec_out3 : dec_out, expv);
    end
  endtask

  initial begin
    en = 1'b0; bin = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 32; i++) apply(1'(i >> 4), 4'(i));
    for (int i = 0; i < 200; i++) apply(1'($urandom), 4'($urandom));
    for (int i = 0; i < 32; i++) apply(1'(i >> 4), 4'(i), 3);
    for (int i = 0; i < 100; i++) apply(1'($urandom), 4'($urandom), 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
