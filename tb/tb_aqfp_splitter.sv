// tb_aqfp_splitter: checks 1-to-2, 1-to-3 and 1-to-4 splitters. The input
// changes every tick; all copies must take it on the edge of the splitter's
// phase (1) and hold it for the rest of the ac cycle.
module tb_aqfp_splitter;
  localparam int NPHASE = 4;
  localparam int PH = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic a, exp_v;
  logic [1:0] y2;
  logic [2:0] y3;
  logic [3:0] y4;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  aqfp_splitter #(.PHASE(PH), .FANOUT(2)) s2 (.clk, .rst_n, .ex, .a, .y(y2));
  aqfp_splitter #(.PHASE(PH), .FANOUT(3)) s3 (.clk, .rst_n, .ex, .a, .y(y3));
  aqfp_splitter #(.PHASE(PH), .FANOUT(4)) s4 (.clk, .rst_n, .ex, .a, .y(y4));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    exp_v = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      a = 1'($urandom);
      @(posedge clk);
      if (ex[PH]) exp_v = a;
      @(negedge clk);
      checks++;
      if (y2 != {2{exp_v}} || y3 != {3{exp_v}} || y4 != {4{exp_v}}) begin
        failures++;
        $display("FAIL t=%0d y2=%b y3=%b y4=%b exp=%b", t, y2, y3, y4, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
