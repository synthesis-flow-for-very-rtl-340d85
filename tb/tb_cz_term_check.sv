// tb_cz_term_check: random and directed results into the termination check.
// A slot whose merged result is 1 must leave with out_valid (one tick wide),
// its start value and count+1, out_err low; an overflowed or zero result
// must leave with out_err high; every other valid slot must be forwarded to
// the feedback loop with count+1; an empty slot produces nothing.
module tb_cz_term_check;
  localparam int NPHASE = 4;
  localparam int PH = 0;
  localparam int W = 16;
  localparam int SW = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic [W-1:0] odd_res, even_res, t_n0, f_n, f_n0, out_n0;
  logic odd_ovf, t_valid, f_valid, out_valid, out_err;
  logic [SW-1:0] t_steps, f_steps, out_steps;
  logic e_fv, e_ov, e_oe;
  logic [W-1:0] e_fn, e_fn0, e_on0;
  logic [SW-1:0] e_fs, e_os;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  int n_done = 0, n_err = 0, n_fwd = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  cz_term_check #(.WIDTH(W), .STEP_W(SW), .NPHASE(NPHASE), .PHASE(PH)) dut (
    .clk, .rst_n, .ex, .odd_res, .odd_ovf, .even_res, .t_valid, .t_n0, .t_steps,
    .f_valid, .f_n, .f_n0, .f_steps, .out_valid, .out_n0, .out_steps, .out_err);

  always @(posedge clk) begin
    if (!rst_n) begin
      e_fv = 0; e_fn = 0; e_fn0 = 0; e_fs = 0; e_ov = 0; e_on0 = 0; e_os = 0; e_oe = 0;
    end else if (ex[PH]) begin
      logic [W-1:0] m;
      logic one, bad, done;
      m = odd_res | even_res;
      one = (m == 1);
      bad = odd_ovf || (m == 0) || (t_steps == SW'('1 - 1));
      done = t_valid && (one || bad);
      e_fv = t_valid && !done; e_fn = m; e_fn0 = t_n0; e_fs = t_steps + 1;
      e_ov = done;
      if (done) begin
        e_on0 = t_n0; e_os = t_steps + 1; e_oe = bad && !one;
        if (e_oe) n_err++; else n_done++;
      end
      if (e_fv) n_fwd++;
    end else begin
      e_ov = 0;
    end
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    odd_res = 0; even_res = 0; odd_ovf = 0; t_valid = 0; t_n0 = 0; t_steps = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      int kind;
      kind = $urandom % 6;
      t_valid = ($urandom % 5) != 0;
      t_n0 = W'($urandom);
      t_steps = SW'($urandom);
      odd_ovf = 1'b0;
      if ($urandom % 2) begin odd_res = W'($urandom); even_res = 0; end
      else begin even_res = W'($urandom); odd_res = 0; end
      case (kind)
        0: begin odd_res = 1; even_res = 0; end
        1: begin even_res = 1; odd_res = 0; end
        2: odd_ovf = 1'b1;
        3: begin odd_res = 0; even_res = 0; end
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if ({f_valid, f_n, f_n0, f_steps} != {e_fv, e_fn, e_fn0, e_fs}) begin
        failures++; $display("FAIL forward %b %0d %0d %0d exp %b %0d %0d %0d",
          f_valid, f_n, f_n0, f_steps, e_fv, e_fn, e_fn0, e_fs);
      end
      checks++;
      if ({out_valid, out_n0, out_steps, out_err} != {e_ov, e_on0, e_os, e_oe}) begin
        failures++; $display("FAIL output %b %0d %0d %b exp %b %0d %0d %b",
          out_valid, out_n0, out_steps, out_err, e_ov, e_on0, e_os, e_oe);
      end
    end
    checks++;
    if (n_done == 0 || n_err == 0 || n_fwd == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
