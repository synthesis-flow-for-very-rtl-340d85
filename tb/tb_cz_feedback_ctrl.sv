// tb_cz_feedback_ctrl: random traffic on the feedback and external inputs.
// On each edge of the stage's phase the slot must take the returning number
// when there is one, otherwise the external number (count 0) if offered,
// otherwise become empty; in_ready must be high only in that phase and only
// with no returning number; between phase edges the slot must hold.
module tb_cz_feedback_ctrl;
  localparam int NPHASE = 4;
  localparam int PH = 0;
  localparam int W = 16;
  localparam int SW = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic fb_valid, in_valid, in_ready, s_valid;
  logic [W-1:0] fb_n, fb_n0, in_n, s_n, s_n0;
  logic [SW-1:0] fb_steps, s_steps;
  logic e_valid;
  logic [W-1:0] e_n, e_n0;
  logic [SW-1:0] e_steps;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  int n_fb = 0, n_in = 0, n_empty = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  cz_feedback_ctrl #(.WIDTH(W), .STEP_W(SW), .NPHASE(NPHASE), .PHASE(PH)) dut (
    .clk, .rst_n, .ex, .fb_valid, .fb_n, .fb_n0, .fb_steps,
    .in_valid, .in_n, .in_ready, .s_valid, .s_n, .s_n0, .s_steps);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      e_valid = 1'b0; e_n = '0; e_n0 = '0; e_steps = '0;
    end else if (ex[PH]) begin
      if (fb_valid) begin
        e_valid = 1'b1; e_n = fb_n; e_n0 = fb_n0; e_steps = fb_steps; n_fb++;
      end else if (in_valid) begin
        e_valid = 1'b1; e_n = in_n; e_n0 = in_n; e_steps = '0; n_in++;
      end else begin
        e_valid = 1'b0; e_n = '0; e_n0 = '0; e_steps = '0; n_empty++;
      end
    end
  end

  initial begin
    {fb_valid, in_valid} = '0;
    fb_n = '0; fb_n0 = '0; fb_steps = '0; in_n = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 1200; t++) begin
      fb_valid = 1'($urandom);
      in_valid = 1'($urandom);
      fb_n = W'($urandom); fb_n0 = W'($urandom); fb_steps = SW'($urandom);
      in_n = W'($urandom);
      #1;
      checks++;
      if (in_ready != (ex[PH] && !fb_valid)) begin
        failures++; $display("FAIL in_ready=%b ex=%b fb_valid=%b", in_ready, ex, fb_valid);
      end
      @(negedge clk);
      checks++;
      if ({s_valid, s_n, s_n0, s_steps} != {e_valid, e_n, e_n0, e_steps}) begin
        failures++;
        $display("FAIL slot %b %h %h %0d exp %b %h %h %0d", s_valid, s_n, s_n0, s_steps,
                 e_valid, e_n, e_n0, e_steps);
      end
    end
    checks++;
    if (n_fb == 0 || n_in == 0 || n_empty == 0) begin
      failures++; $display("FAIL coverage fb=%0d in=%0d empty=%0d", n_fb, n_in, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
