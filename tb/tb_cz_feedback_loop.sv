// tb_cz_feedback_loop: slots through the 3-stage feedback buffers. A slot
// entering in phase P0 must come out exactly 3 phases later; while loop_en
// is low the slot must come out empty.
module tb_cz_feedback_loop;
  localparam int NPHASE = 4;
  localparam int P0 = 1;
  localparam int W = 16;
  localparam int SW = 10;
  localparam int DEPTH = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic loop_en, f_valid, fb_valid;
  logic [W-1:0] f_n, f_n0, fb_n, fb_n0;
  logic [SW-1:0] f_steps, fb_steps;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  int n_cut = 0, n_pass = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  cz_feedback_loop #(.WIDTH(W), .STEP_W(SW), .NPHASE(NPHASE), .PHASE0(P0), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .ex, .loop_en, .f_valid, .f_n, .f_n0, .f_steps,
    .fb_valid, .fb_n, .fb_n0, .fb_steps);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    loop_en = 1; f_valid = 0; f_n = 0; f_n0 = 0; f_steps = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      logic ev, le;
      logic [W-1:0] en, en0;
      logic [SW-1:0] es;
      while (cyc % NPHASE != P0) @(negedge clk);
      ev = ($urandom % 4) != 0; le = ($urandom % 4) != 0;
      en = W'($urandom); en0 = W'($urandom); es = SW'($urandom);
      f_valid = ev; loop_en = le; f_n = en; f_n0 = en0; f_steps = es;
      repeat (DEPTH - 1) @(negedge clk);
      f_valid = 1'($urandom); loop_en = 1'($urandom);  // must not matter now
      @(negedge clk);
      checks++;
      if ({fb_valid, fb_n, fb_n0, fb_steps} != {ev && le, en, en0, es}) begin
        failures++; $display("FAIL out %b %0d exp %b %0d", fb_valid, fb_n, ev && le, en);
      end
      if (ev && !le) n_cut++;
      if (ev && le) n_pass++;
    end
    checks++;
    if (n_cut == 0 || n_pass == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
