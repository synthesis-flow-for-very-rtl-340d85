// tb_cz_parity_sel: random slots through the odd-even check. An odd number
// must reach only the odd path (with the add-one request), an even number
// only the even path, an empty slot neither; tags pass unchanged; all on the
// edge of the stage's phase, holding in between.
module tb_cz_parity_sel;
  localparam int NPHASE = 4;
  localparam int PH = 1;
  localparam int W = 16;
  localparam int SW = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic s_valid, odd_go, t_valid;
  logic [W-1:0] s_n, s_n0, odd_n, even_n, t_n0;
  logic [SW-1:0] s_steps, t_steps;
  logic [2*W+W+SW+2:0] expv, got;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  int n_odd = 0, n_even = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  cz_parity_sel #(.WIDTH(W), .STEP_W(SW), .NPHASE(NPHASE), .PHASE(PH)) dut (
    .clk, .rst_n, .ex, .s_valid, .s_n, .s_n0, .s_steps,
    .odd_n, .odd_go, .even_n, .t_valid, .t_n0, .t_steps);

  assign got = {odd_n, odd_go, even_n, t_valid, t_n0, t_steps};

  always @(posedge clk) begin
    if (!rst_n) expv = '0;
    else if (ex[PH]) begin
      logic o;
      o = s_valid && s_n[0];
      if (o) n_odd++;
      if (s_valid && !s_n[0]) n_even++;
      expv = {o ? s_n : W'(0), o, (s_valid && !s_n[0]) ? s_n : W'(0), s_valid, s_n0, s_steps};
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 1'b0; s_n = '0; s_n0 = '0; s_steps = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 1200; t++) begin
      s_valid = ($urandom % 4) != 0;
      s_n = W'($urandom); s_n0 = W'($urandom); s_steps = SW'($urandom);
      @(negedge clk);
      checks++;
      if (got != expv) begin
        failures++; $display("FAIL got %h exp %h", got, expv);
      end
    end
    checks++;
    if (n_odd == 0 || n_even == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
