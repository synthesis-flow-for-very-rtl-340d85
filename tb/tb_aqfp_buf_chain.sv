// tb_aqfp_buf_chain: checks a 5-deep balancing chain starting in phase 1.
// A new word enters once per ac cycle; it must appear exactly DEPTH phases
// after it was captured and hold for one ac cycle.
module tb_aqfp_buf_chain;
  localparam int NPHASE = 4;
  localparam int P0 = 1;
  localparam int DEPTH = 5;
  localparam int W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic [W-1:0] d, q;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [int unsigned];   // captured word by capture cycle

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  aqfp_buf_chain #(.NPHASE(NPHASE), .PHASE0(P0), .DEPTH(DEPTH), .WIDTH(W)) dut (
    .clk, .rst_n, .ex, .d, .q);

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 600; t++) begin
      d = W'($urandom);
      if (cyc % NPHASE == P0) hist[cyc] = d;
      @(negedge clk);
      // The word captured at the end of cycle c is visible from cycle
      // c + DEPTH to c + DEPTH + NPHASE - 1.
      for (int k = 0; k < NPHASE; k++) begin
        int unsigned c0;
        c0 = cyc - DEPTH - k;
        if (cyc >= DEPTH + k && hist.exists(c0) && c0 > 4) begin
          checks++;
          if (q !== hist[c0]) begin
            failures++;
            $display("FAIL cyc=%0d q=%h exp=%h (captured %0d)", cyc, q, hist[c0], c0);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
