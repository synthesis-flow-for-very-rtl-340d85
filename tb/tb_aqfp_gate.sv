// tb_aqfp_gate: checks every function of the AQFP cell with inverted inputs
// and outputs. Inputs change randomly every tick; a gate excited in phase 2
// must take f(a, b, c) only on the edge where ex[2] is high and hold it for
// the rest of the ac cycle.
module tb_aqfp_gate;
  import aqfp_pkg::*;
  localparam int NPHASE = 4;
  localparam int PH = 2;
  localparam int NG = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic a, b, c;
  logic [NG-1:0] y, yexp;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  // 0 BUF, 1 NOT, 2 AND, 3 and_bi (a & ~b), 4 OR, 5 NAND, 6 NOR, 7 MAJ,
  // 8 MAJ with inverted c, 9 CONST1
  aqfp_gate #(.PHASE(PH), .FUNC(GF_BUF))                           g0 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[0]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_BUF), .INV(3'b001))             g1 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[1]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_AND))                           g2 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[2]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_AND), .INV(3'b010))             g3 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[3]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_OR))                            g4 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[4]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_AND), .OUT_INV(1'b1))           g5 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[5]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_OR), .OUT_INV(1'b1))            g6 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[6]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_MAJ))                           g7 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[7]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_MAJ), .INV(3'b100))             g8 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[8]));
  aqfp_gate #(.PHASE(PH), .FUNC(GF_CONST1))                        g9 (.clk, .rst_n, .ex, .a, .b, .c, .y(y[9]));

  function automatic logic [NG-1:0] ref_f(logic a_, logic b_, logic c_);
    logic [NG-1:0] r;
    r[0] = a_;
    r[1] = !a_;
    r[2] = a_ && b_;
    r[3] = a_ && !b_;
    r[4] = a_ || b_;
    r[5] = !(a_ && b_);
    r[6] = !(a_ || b_);
    r[7] = (a_ && b_) || (b_ && c_) || (a_ && c_);
    r[8] = (a_ && b_) || (b_ && !c_) || (a_ && !c_);
    r[9] = 1'b1;
    return r;
  endfunction

  // Reference: the expected output is loaded on every excitation edge.
  always @(posedge clk) if (!rst_n) yexp = '0; else if (ex[PH]) yexp = ref_f(a, b, c);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; c = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (y != '0) begin failures++; $display("FAIL reset value %b", y); end
    rst_n = 1'b1;
    for (int t = 0; t < 800; t++) begin
      // At the negedge: set new inputs for the coming edge.
      {a, b, c} = 3'($urandom);
      @(negedge clk);
      checks++;
      if (y !== yexp) begin
        failures++;
        $display("FAIL t=%0d abc=%b%b%b y=%b exp=%b", t, a, b, c, y, yexp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
